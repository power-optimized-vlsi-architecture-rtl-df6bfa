// tb_sw2_select: self-checking test of selection device SW2.
// ctr1 = 1: lane l is weight 4j + l; ctr1 = 0: lane l is error l.
module tb_sw2_select;
  logic             clk = 1'b0;
  logic             ctr1;
  logic [1:0]       j;
  logic [15:0][7:0] w;
  logic [3:0][7:0]  e, out;
  int               checks = 0, failures = 0;

  sw2_select dut (.ctr1, .j, .w, .e, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      for (int n = 0; n < 16; n++) w[n] = 8'($urandom);
      for (int l = 0; l < 4; l++)  e[l] = 8'($urandom);
      ctr1 = 1'($urandom);
      j    = 2'($urandom);
      @(posedge clk);
      for (int l = 0; l < 4; l++) begin
        logic [7:0] exp;
        exp = ctr1 ? w[4*j + l] : e[l];
        checks++;
        if (out[l] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL ctr1=%b j=%0d l=%0d got %h exp %h", ctr1, j, l, out[l], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
