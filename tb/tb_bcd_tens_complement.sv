// Self-checking testbench of bcd_tens_complement: every 4-bit divisor code is
// applied and the result compared with 10 - a computed modulo 16.
module tb_bcd_tens_complement;
  import bcd_div_pkg::*;

  bcd_digit_t a, c;
  int checks = 0, failures = 0;

  bcd_tens_complement dut (.a(a), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [3:0] exp_c;
      a = 4'(i);
      #1;
      exp_c = 4'((16 + 10 - i) % 16);
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL a=%0d c=%0d expected %0d", a, c, exp_c);
      end
    end
    // worked example of the source: 10's complement of 1001 is 0001
    a = 4'b1001; #1;
    checks++;
    if (c !== 4'b0001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
