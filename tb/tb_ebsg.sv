// tb_ebsg: self-checking test of the error block, e = d - y per lane (mod 2**16).
module tb_ebsg;
  logic             clk = 1'b0;
  logic [3:0][15:0] d, y, e;
  int               checks = 0, failures = 0;

  ebsg dut (.d, .y, .e);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < 4; i++) begin
        d[i] = 16'($urandom);
        y[i] = (k % 3 == 0) ? d[i] : 16'($urandom);
      end
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (e[i] !== 16'(d[i] - y[i])) begin
          failures++;
          $display("FAIL lane %0d d=%h y=%h e=%h", i, d[i], y[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
