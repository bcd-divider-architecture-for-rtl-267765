// End-to-end testbench of bcd_vedic_divider at its default size.
//
// First the seven divisions the design was demonstrated with (20/9, 29/9,
// 22/8, 40/9, 52/9, 72/9, 19/9) are applied with their known quotients and
// remainders. Then every one of the 4096 possible 12-bit input codes is
// applied and compared with integer division of the decimal values; inputs
// that are not BCD, divide by zero or need a quotient above 9 must raise err
// with q = r = 0.
//
// The rounds inside the divider are watched to prove that every mechanism
// occurred: a Nikhilam round (tens digit moved into the quotient), a
// correction round (remainder >= divisor detected by the complement carry),
// a feedback chain of two or more rounds, a division that needs all rounds,
// and the error flag. A mechanism that never occurred counts as a failure.
module tb_bcd_vedic_divider;
  import bcd_div_pkg::*;

  bcd_digit_t a, q, r;
  bcd2_t      b;
  logic       err;
  int checks = 0, failures = 0;
  int n_nikhilam = 0, n_correction = 0, n_multi = 0, n_all_rounds = 0, n_err = 0;

  bcd_vedic_divider dut (.a(a), .b(b), .q(q), .r(r), .err(err));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int av, input int bv);
    int hi, lo, dec, exp_q, exp_r, taken_n;
    logic exp_err;
    a = 4'(av);
    b = 8'(bv);
    #1;
    hi  = bv / 16;
    lo  = bv % 16;
    dec = 10 * hi + lo;
    exp_err = (av == 0) || (av > 9) || (hi > 9) || (lo > 9) || (hi >= av);
    exp_q = exp_err ? 0 : dec / av;
    exp_r = exp_err ? 0 : dec % av;
    checks++;
    if (err !== exp_err || int'(q) != exp_q || int'(r) != exp_r) begin
      failures++;
      $display("FAIL b=%h a=%0d: q=%0d r=%0d err=%0b, expected q=%0d r=%0d err=%0b",
               bv, av, q, r, err, exp_q, exp_r, exp_err);
    end
    if (exp_err) n_err++;
    else begin
      taken_n = 0;
      for (int k = 0; k < MAX_ROUNDS; k++) begin
        if (dut.taken[k]) begin
          taken_n++;
          if (dut.corr[k]) n_correction++;
          else n_nikhilam++;
        end
      end
      if (taken_n >= 2) n_multi++;
      if (taken_n == MAX_ROUNDS) n_all_rounds++;
    end
  endtask

  task automatic expect_example(input int av, input int bv, input int eq, input int er);
    apply(av, bv);
    checks++;
    if (int'(q) != eq || int'(r) != er || err) begin
      failures++;
      $display("FAIL example %h/%0d: q=%0d r=%0d", bv, av, q, r);
    end
  endtask

  initial begin
    expect_example(9, 'h20, 2, 2);
    expect_example(9, 'h29, 3, 2);
    expect_example(8, 'h22, 2, 6);
    expect_example(9, 'h40, 4, 4);
    expect_example(9, 'h52, 5, 7);
    expect_example(9, 'h72, 8, 0);
    expect_example(9, 'h19, 2, 1);

    for (int av = 0; av < 16; av++)
      for (int bv = 0; bv < 256; bv++)
        apply(av, bv);

    $display("mechanisms: nikhilam_rounds=%0d correction_rounds=%0d multi_round=%0d all_rounds=%0d err=%0d",
             n_nikhilam, n_correction, n_multi, n_all_rounds, n_err);
    checks++;
    if (n_nikhilam == 0 || n_correction == 0 || n_multi == 0 || n_all_rounds == 0 || n_err == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
