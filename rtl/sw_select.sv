// sw_select: selection device SW, passes one row of the input matrix.
//
// Sub-matrix S_k^j is the L x L Toeplitz block with entries
// S_k^j(i,l) = x(kL - jL - i - l); it is symmetric, so its row i and its
// column i are the same L samples. Given the index n = jL + i (0..N-1),
// SW passes out[l] = x(kL - n - l) = hist[n + l], l = 0..L-1, to the MAC.
// The same row serves the partial filter product u(i,j) (row of S_k^j)
// and the weight increment product v(i,j) (column of S_k^j).
// Purely combinational.
module sw_select #(
  parameter int unsigned B     = 8,
  parameter int unsigned N     = 16,
  parameter int unsigned L     = 4,
  localparam int unsigned DEPTH = N + L - 1,
  localparam int unsigned SW    = $clog2(N)
) (
  input  logic [DEPTH-1:0][B-1:0] hist,
  input  logic [SW-1:0]           sel,
  output logic [L-1:0][B-1:0]     row
);

  always_comb begin
    for (int l = 0; l < L; l++) begin
      row[l] = '0;
      for (int n = 0; n < N; n++) begin
        if (SW'(n) == sel) row[l] = hist[n + l];
      end
    end
  end

endmodule
