// tb_demux1to16: self-checking test of the 1:16 demultiplexer with held outputs.
// A reference array tracks writes; disabled cycles must change nothing.
module tb_demux1to16;
  logic              clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0]        sel = '0;
  logic [15:0]       din = '0;
  logic [15:0][15:0] dout, ref_q;
  int                checks = 0, failures = 0;

  demux1to16 dut (.clk, .rst_n, .en, .sel, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 3000; k++) begin
      en  <= ($urandom % 4) != 0;
      sel <= 4'($urandom);
      din <= 16'($urandom);
      @(posedge clk);
      #1;
      if (en) ref_q[sel] = din;
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (dout[n] !== ref_q[n]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got %h exp %h", n, dout[n], ref_q[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
