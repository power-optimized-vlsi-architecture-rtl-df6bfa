// wbsg: weight update block, new weight = old weight + mu * v.
//
// Two N:1 multiplexers steered by `sel` (the weight index n = jL + i) pick
// the collected weight increment product v(n), which leaves on `v_sel` for
// the step-size multiplier, and the old weight w(n). The scaled increment
// `inc` comes back from the step-size multiplier and is added to the
// zero-extended old weight by a 16-bit ripple carry adder, giving the
// untruncated new weight `w_new` (modulo 2**WIDTH). One weight per cycle,
// so all N weights take N cycles. Purely combinational.
module wbsg #(
  parameter int unsigned B     = 8,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned N     = 16,
  localparam int unsigned SW   = $clog2(N)
) (
  input  logic [SW-1:0]              sel,
  input  logic [N-1:0][WIDTH-1:0]    v_all,
  input  logic [N-1:0][B-1:0]        w_old,
  output logic [WIDTH-1:0]           v_sel,
  input  logic [WIDTH-1:0]           inc,
  output logic [WIDTH-1:0]           w_new
);

  logic [B-1:0] w_sel;
  logic         unused_cout;

  always_comb begin
    v_sel = '0;
    w_sel = '0;
    for (int n = 0; n < N; n++) begin
      if (SW'(n) == sel) begin
        v_sel = v_all[n];
        w_sel = w_old[n];
      end
    end
  end

  rca #(.WIDTH(WIDTH)) u_rca (
    .a(WIDTH'(w_sel)), .b(inc), .cin(1'b0), .sum(w_new), .cout(unused_cout)
  );

endmodule
