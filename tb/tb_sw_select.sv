// tb_sw_select: self-checking test of selection device SW.
// For every index n the output lane l must be sample n + l of the history.
module tb_sw_select;
  logic             clk = 1'b0;
  logic [18:0][7:0] hist;
  logic [3:0]       sel;
  logic [3:0][7:0]  row;
  int               checks = 0, failures = 0;

  sw_select dut (.hist, .sel, .row);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      for (int m = 0; m < 19; m++) hist[m] = 8'($urandom);
      for (int n = 0; n < 16; n++) begin
        sel = 4'(n);
        #1;
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (row[l] !== hist[n + l]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d l=%0d got %h exp %h", n, l, row[l], hist[n + l]);
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
