// tb_csa_adder: self-checking test of the 4-operand carry save adder.
// Random and all-ones operands are compared with their sum modulo 2**16.
module tb_csa_adder;
  logic                 clk = 1'b0;
  logic [3:0][15:0]     ops;
  logic [15:0]          sum;
  int                   checks = 0, failures = 0;

  csa_adder dut (.ops, .sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0] exp;
    @(posedge clk);
    exp = ops[0] + ops[1] + ops[2] + ops[3];
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL ops=%h got %h exp %h", ops, sum, exp);
    end
  endtask

  initial begin
    ops = '1;                           check();
    ops = {4{16'h8000}};                check();
    ops = {16'h0001, 16'h0001, 16'h0001, 16'h0001}; check();
    for (int k = 0; k < 3000; k++) begin
      for (int j = 0; j < 4; j++) ops[j] = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
