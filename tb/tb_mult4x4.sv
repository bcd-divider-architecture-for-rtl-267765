// Self-checking testbench of mult4x4: all 256 operand pairs, product compared
// with an integer multiplication.
module tb_mult4x4;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  mult4x4 dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int exp_p;
        x = 4'(i);
        y = 4'(j);
        #1;
        exp_p = i * j;
        checks++;
        if (int'(p) != exp_p) begin
          failures++;
          $display("FAIL %0d*%0d=%0d expected %0d", i, j, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
