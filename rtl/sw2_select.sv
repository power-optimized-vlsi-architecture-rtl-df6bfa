// sw2_select: selection device SW2, passes L weights or the L errors.
//
// With ctr1 = 1 it passes the weight sub-vector c_k^j = w[jL .. jL+L-1]
// selected by `j`; with ctr1 = 0 it passes the L truncated errors
// e(kL-l), l = 0..L-1. Its inputs are B' = 8 bits wide. Steering SW2 with
// the same CTR1 signal that steers the MAC's output demultiplexer is this
// design's choice. Purely combinational.
module sw2_select #(
  parameter int unsigned B  = 8,
  parameter int unsigned N  = 16,
  parameter int unsigned L  = 4,
  localparam int unsigned M  = N / L,
  localparam int unsigned JW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 ctr1,
  input  logic [JW-1:0]        j,
  input  logic [N-1:0][B-1:0]  w,
  input  logic [L-1:0][B-1:0]  e,
  output logic [L-1:0][B-1:0]  out
);

  always_comb begin
    for (int l = 0; l < L; l++) begin
      out[l] = '0;
      if (ctr1) begin
        for (int jj = 0; jj < M; jj++) begin
          if (JW'(jj) == j) out[l] = w[jj*L + l];
        end
      end else begin
        out[l] = e[l];
      end
    end
  end

endmodule
