// Self-checking testbench of incrementer: all quotient/increment pairs with
// the enable on and off.
module tb_incrementer;
  import bcd_div_pkg::*;

  bcd_digit_t q_in, inc, q_out;
  logic       en;
  int checks = 0, failures = 0;

  incrementer dut (.q_in(q_in), .inc(inc), .en(en), .q_out(q_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int qi = 0; qi < 16; qi++) begin
      for (int n = 0; n < 16; n++) begin
        for (int e = 0; e < 2; e++) begin
          int exp_q;
          q_in = 4'(qi);
          inc  = 4'(n);
          en   = e[0];
          #1;
          exp_q = e ? (qi + n) % 16 : qi;
          checks++;
          if (int'(q_out) != exp_q) begin
            failures++;
            $display("FAIL q=%0d inc=%0d en=%0d -> %0d", qi, n, e, q_out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
