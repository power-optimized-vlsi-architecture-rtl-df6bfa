// tb_vedic_mult: exhaustive test of the 8x8 Vedic multiplier.
// All 65536 operand pairs are compared with the integer product.
module tb_vedic_mult;
  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;

  vedic_mult dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        a = 8'(i); b = 8'(k);
        #1;
        checks++;
        if (p !== 16'(i * k)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, k, p);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
