// Self-checking testbench of decision_box: every tens digit with both carry
// values. A round must be taken when the tens digit is non-zero or, with a
// zero tens digit, when the adder carries.
module tb_decision_box;
  import bcd_div_pkg::*;

  bcd_digit_t msd;
  logic       carry, corr, more;
  int checks = 0, failures = 0;

  decision_box dut (.msd(msd), .carry(carry), .corr(corr), .more(more));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 16; h++) begin
      for (int cy = 0; cy < 2; cy++) begin
        logic exp_corr, exp_more;
        msd   = 4'(h);
        carry = cy[0];
        #1;
        exp_corr = (h == 0);
        exp_more = (h != 0) || (cy == 1);
        checks++;
        if (corr !== exp_corr || more !== exp_more) begin
          failures++;
          $display("FAIL msd=%0d carry=%0b corr=%0b more=%0b", h, cy, corr, more);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
