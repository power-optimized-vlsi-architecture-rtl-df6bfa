// sample_buffer: holds the N+L-1 most recent input samples.
//
// Entry m holds x(kL-m). The N x L input matrix of the block (and its
// M = N/L square sub-matrices S_k^j) are all drawn from these N+L-1
// samples. On `load` the buffer shifts by L: the L new samples x_new[l]
// = x(kL-l) (x_new[0] newest) enter at entries 0..L-1 and the older
// entries move up by L; the oldest L fall out. Synchronous active-low
// reset clears the buffer to zero (the filter starts from silence).
// How the samples are stored is this design's choice.
module sample_buffer #(
  parameter int unsigned B     = 8,
  parameter int unsigned N     = 16,
  parameter int unsigned L     = 4,
  localparam int unsigned DEPTH = N + L - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [L-1:0][B-1:0]      x_new,
  output logic [DEPTH-1:0][B-1:0]  hist
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist <= '0;
    end else if (load) begin
      for (int m = DEPTH - 1; m >= L; m--) hist[m] <= hist[m-L];
      for (int m = 0; m < L; m++)          hist[m] <= x_new[m];
    end
  end

endmodule
