// tb_decision: exhaustive test of the decision device.
// Every 16-bit input: upper byte when it is non-zero, otherwise the lower byte.
module tb_decision;
  logic        clk = 1'b0;
  logic [15:0] din;
  logic [7:0]  dout;
  logic        hi_sel;
  int          checks = 0, failures = 0;

  decision dut (.din, .dout, .hi_sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] exp;
      logic       exp_hi;
      din = 16'(v);
      #1;
      exp_hi = (v >= 256);
      exp    = exp_hi ? 8'(v / 256) : 8'(v % 256);
      checks++;
      if (dout !== exp || hi_sel !== exp_hi) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h got %h/%b exp %h/%b", din, dout, hi_sel, exp, exp_hi);
      end
      if (v % 256 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
