// tb_mac_unit: self-checking test of the shared MAC.
// Random operands: with en = 1 the dot product (mod 2**16) must appear on u
// when ctr1 = 1 and on v when ctr1 = 0, the other output being 0; with
// en = 0 both outputs are 0.
module tb_mac_unit;
  logic            clk = 1'b0;
  logic            en, ctr1;
  logic [3:0][7:0] a, b;
  logic [15:0]     u, v;
  int              checks = 0, failures = 0;

  mac_unit dut (.en, .ctr1, .a, .b, .u, .v);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic [15:0] dot, exp_u, exp_v;
      for (int l = 0; l < 4; l++) begin
        a[l] = (k == 0) ? 8'hFF : 8'($urandom);
        b[l] = (k == 0) ? 8'hFF : 8'($urandom);
      end
      en   = (k % 5) != 4;
      ctr1 = 1'($urandom);
      @(posedge clk);
      dot = '0;
      for (int l = 0; l < 4; l++) dot = dot + 16'(int'(a[l]) * int'(b[l]));
      exp_u = (en && ctr1)  ? dot : '0;
      exp_v = (en && !ctr1) ? dot : '0;
      checks++;
      if (u !== exp_u || v !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL en=%b ctr1=%b u=%h v=%h exp %h %h", en, ctr1, u, v, exp_u, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
