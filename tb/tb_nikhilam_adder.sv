// Self-checking testbench of nikhilam_adder. Every product 0..81 (the range
// of a product of two BCD digits) and every BCD units digit is applied; the
// expected tens and units digits and carry are found by counting tens off the
// integer sum.
module tb_nikhilam_adder;
  import bcd_div_pkg::*;

  logic [7:0] prod;
  bcd_digit_t lsd;
  bcd2_t      sum;
  logic       carry;
  int checks = 0, failures = 0;

  nikhilam_adder dut (.prod(prod), .lsd(lsd), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pv = 0; pv <= 81; pv++) begin
      for (int l = 0; l <= 9; l++) begin
        int s, t;
        prod = 8'(pv);
        lsd  = 4'(l);
        #1;
        s = pv + l;
        t = 0;
        while (s >= 10) begin
          s -= 10;
          t++;
        end
        checks++;
        if (int'(sum.hi) != t || int'(sum.lo) != s || carry !== (t != 0)) begin
          failures++;
          $display("FAIL %0d+%0d -> %0d%0d c=%0b", pv, l, sum.hi, sum.lo, carry);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
