// tb_rca: self-checking test of the 16-bit ripple carry adder.
// Corner cases plus random operands are compared with {cout, sum} = a+b+cin.
module tb_rca;
  logic        clk = 1'b0;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0, failures = 0;

  rca dut (.a, .b, .cin, .sum, .cout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] ta, tb, input logic tc);
    logic [16:0] exp;
    a = ta; b = tb; cin = tc;
    @(posedge clk);
    exp = {1'b0, ta} + {1'b0, tb} + 17'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h exp %h", ta, tb, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    check(16'hFFFF, 16'h0001, 1'b0);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'h0000, 16'h0000, 1'b1);
    check(16'h8000, 16'h8000, 1'b0);
    check(16'h5555, 16'hAAAA, 1'b1);
    for (int k = 0; k < 2000; k++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
