// tb_wbsg: self-checking test of the weight update block.
// v_sel must be v_all[sel] and w_new must be w_old[sel] + inc (mod 2**16).
module tb_wbsg;
  logic              clk = 1'b0;
  logic [3:0]        sel;
  logic [15:0][15:0] v_all;
  logic [15:0][7:0]  w_old;
  logic [15:0]       v_sel, inc, w_new;
  int                checks = 0, failures = 0;

  wbsg dut (.sel, .v_all, .w_old, .v_sel, .inc, .w_new);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int n = 0; n < 16; n++) begin
        v_all[n] = 16'($urandom);
        w_old[n] = 8'($urandom);
      end
      for (int n = 0; n < 16; n++) begin
        sel = 4'(n);
        inc = (k == 0) ? 16'hFFFF : 16'($urandom);
        #1;
        checks++;
        if (v_sel !== v_all[n] || w_new !== 16'(16'(w_old[n]) + inc)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d v_sel=%h w_new=%h", n, v_sel, w_new);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
