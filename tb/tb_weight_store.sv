// tb_weight_store: self-checking test of the weight registers and their
// decision devices. Each enabled write stores the truncated value of
// w_full[sel]; disabled cycles change nothing.
module tb_weight_store;
  logic              clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0]        sel = '0;
  logic [15:0][15:0] w_full = '0;
  logic [15:0][7:0]  w, ref_w;
  logic              hi_sel;
  int                checks = 0, failures = 0;

  weight_store dut (.clk, .rst_n, .en, .sel, .w_full, .w, .hi_sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] trunc8(input logic [15:0] x);
    return (x[15:8] != 0) ? x[15:8] : x[7:0];
  endfunction

  initial begin
    ref_w = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 2000; k++) begin
      logic exp_hi;
      for (int n = 0; n < 16; n++)
        w_full[n] <= ($urandom % 2) ? 16'($urandom % 256) : 16'($urandom);
      en  <= ($urandom % 4) != 0;
      sel <= 4'($urandom);
      #1;
      exp_hi = (w_full[sel][15:8] != 0);
      checks++;
      if (hi_sel !== exp_hi) begin
        failures++;
        if (failures < 10) $display("FAIL hi_sel %b exp %b", hi_sel, exp_hi);
      end
      @(posedge clk);
      #1;
      if (en) ref_w[sel] = trunc8(w_full[sel]);
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (w[n] !== ref_w[n]) begin
          failures++;
          if (failures < 10) $display("FAIL w[%0d] got %h exp %h", n, w[n], ref_w[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
