// tb_sample_buffer: self-checking test of the input sample store.
// After each load of 4 samples, entry m must hold the sample m steps back
// in time, as tracked by a reference stream.
module tb_sample_buffer;
  logic            clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [3:0][7:0] x_new = '0;
  logic [18:0][7:0] hist;
  byte unsigned    stream[$];
  int              checks = 0, failures = 0;

  sample_buffer dut (.clk, .rst_n, .load, .x_new, .hist);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 19; m++) stream.push_front(8'h00);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 500; k++) begin
      logic do_load;
      do_load = ($urandom % 3) != 0;
      for (int l = 0; l < 4; l++) x_new[l] <= 8'($urandom);
      load <= do_load;
      @(posedge clk);
      #1;
      // stream[0] is the newest sample; x_new[0] is newest within the block.
      if (do_load) for (int l = 3; l >= 0; l--) stream.push_front(x_new[l]);
      for (int m = 0; m < 19; m++) begin
        checks++;
        if (hist[m] !== stream[m]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d m=%0d got %h exp %h", k, m, hist[m], stream[m]);
        end
      end
    end
    load <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
