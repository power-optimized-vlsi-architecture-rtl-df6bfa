// tb_mu_mul: self-checking test of the step-size multiplier, inc = (mu*v) >> 4.
module tb_mu_mul;
  logic        clk = 1'b0;
  logic [15:0] v, inc;
  logic [3:0]  mu;
  int          checks = 0, failures = 0;

  mu_mul dut (.v, .mu, .inc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      v = (k == 0) ? 16'hFFFF : 16'($urandom);
      for (int m = 0; m < 16; m++) begin
        longint unsigned exp;
        mu = 4'(m);
        #1;
        exp = (longint'(v) * m) / 16;
        checks++;
        if (inc !== 16'(exp)) begin
          failures++;
          if (failures < 10) $display("FAIL v=%h mu=%0d got %h exp %h", v, m, inc, exp);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
