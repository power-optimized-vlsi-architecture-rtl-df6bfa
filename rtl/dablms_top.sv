// dablms_top: distributed-arithmetic block LMS adaptive filter.
//
// Filter length N, block size L, M = N/L. Per block k the filter computes
//   y(kL-i) = sum_j u(i,j),   u(i,j) = sum_l x(kL-jL-i-l) * w(jL+l)
//   e(kL-i) = d(kL-i) - y(kL-i)
//   w(n)   <- trunc( w(n) + mu * sum_l e(kL-l) * x(kL-n-l) )
// with one shared MAC of L Vedic multipliers. The iteration runs in four
// N-cycle phases (64 cycles at N = 16):
//   U: SW picks row n = jL+i of the input matrix, SW2 the weights c_k^j;
//      the MAC result u(i,j) goes through DEMUX1 to register n. Four carry
//      save adders sum the partial products into y; the error block forms
//      e = d - y and four decision devices truncate e to 8 bits.
//   V: SW2 switches to the truncated error; the same rows give v(n),
//      collected by a second demultiplexer.
//   W: WBSG picks v(n) and w(n); mu*v(n) + w(n) goes through the 16-bit
//      RCA and a 1:16 demultiplexer into the untruncated weight registers.
//   T: the decision device of weight n loads its truncated value.
// Interface: pulse `start` while `busy` is low with the new block
// x_blk[l] = x(kL-l) (x_blk[0] newest) and d_blk[l] = d(kL-l). `done`
// pulses 64 cycles after the start cycle; y and e (16-bit, modulo 2**16)
// and the weights w are then valid and stay so until the next start.
// All arithmetic is unsigned (the Vedic multipliers are unsigned). The
// block structure, widths, phase lengths and truncation follow the
// document; the signed-free modular arithmetic, mu as a fraction mu/16,
// the handshake, the sample storage and zero initial weights are this
// design's choices. Everything runs on a single clock.
module dablms_top
  import dablms_pkg::*;
#(
  parameter int unsigned N     = N_TAPS,
  parameter int unsigned L     = L_BLK,
  parameter int unsigned B     = B_IN,
  parameter int unsigned WIDTH = W_ACC,
  parameter int unsigned MUW   = MU_W,
  localparam int unsigned M    = N / L,
  localparam int unsigned SW   = $clog2(N),
  localparam int unsigned JW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [L-1:0][B-1:0]        x_blk,
  input  logic [L-1:0][WIDTH-1:0]    d_blk,
  input  logic [MUW-1:0]             mu,
  output logic [L-1:0][WIDTH-1:0]    y,
  output logic [L-1:0][WIDTH-1:0]    e,
  output logic [L-1:0][B-1:0]        e_fb,
  output logic [N-1:0][B-1:0]        w,
  output logic                       busy,
  output logic                       done,
  // Observation of the internal mechanisms (for test and monitoring).
  output phase_e                     phase,
  output logic [L-1:0]               e_hi_sel,
  output logic                       w_hi_sel
);

  logic                          load, ctr1, u_en, v_en, w_en, t_en;
  logic [SW-1:0]                 cnt;
  logic [N+L-2:0][B-1:0]         hist;
  logic [L-1:0][WIDTH-1:0]       d_reg;
  logic [L-1:0][B-1:0]           sw_row, sw2_out;
  logic [WIDTH-1:0]              mac_u, mac_v;
  logic [N-1:0][WIDTH-1:0]       u_all, v_all, w_full;
  logic [WIDTH-1:0]              v_sel, inc, w_new;

  dablms_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .load, .phase, .cnt, .ctr1,
    .u_en, .v_en, .w_en, .t_en, .busy, .done
  );

  sample_buffer #(.B(B), .N(N), .L(L)) u_buf (
    .clk, .rst_n, .load, .x_new(x_blk), .hist
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    d_reg <= '0;
    else if (load) d_reg <= d_blk;
  end

  sw_select #(.B(B), .N(N), .L(L)) u_sw (.hist, .sel(cnt), .row(sw_row));

  sw2_select #(.B(B), .N(N), .L(L)) u_sw2 (
    .ctr1, .j(JW'(cnt / SW'(L))), .w, .e(e_fb), .out(sw2_out)
  );

  mac_unit #(.B(B), .WIDTH(WIDTH), .L(L)) u_mac (
    .en(u_en | v_en), .ctr1, .a(sw_row), .b(sw2_out), .u(mac_u), .v(mac_v)
  );

  // DEMUX1: partial filter products u(i,j) into register n = jL + i.
  demux1to16 #(.WIDTH(WIDTH), .OUTS(N)) u_dmux_u (
    .clk, .rst_n, .en(u_en), .sel(cnt), .din(mac_u), .dout(u_all)
  );

  // Filter outputs: y(kL-i) = sum_j u(i,j), one carry save adder per output.
  for (genvar i = 0; i < L; i++) begin : g_out
    logic [M-1:0][WIDTH-1:0] ops;
    for (genvar j = 0; j < M; j++) begin : g_op
      assign ops[j] = u_all[j*L + i];
    end
    csa_adder #(.WIDTH(WIDTH), .NUM_OPS(M)) u_csa (.ops, .sum(y[i]));

    decision #(.IN_W(WIDTH), .OUT_W(B)) u_dec (
      .din(e[i]), .dout(e_fb[i]), .hi_sel(e_hi_sel[i])
    );
  end

  ebsg #(.WIDTH(WIDTH), .LANES(L)) u_err (.d(d_reg), .y, .e);

  // Weight increment products v(i,j) for weight n = jL + i.
  demux1to16 #(.WIDTH(WIDTH), .OUTS(N)) u_dmux_v (
    .clk, .rst_n, .en(v_en), .sel(cnt), .din(mac_v), .dout(v_all)
  );

  wbsg #(.B(B), .WIDTH(WIDTH), .N(N)) u_wbsg (
    .sel(cnt), .v_all, .w_old(w), .v_sel, .inc, .w_new
  );

  mu_mul #(.WIDTH(WIDTH), .MU_W(MUW)) u_mu (.v(v_sel), .mu, .inc);

  // Updated, untruncated weights.
  demux1to16 #(.WIDTH(WIDTH), .OUTS(N)) u_dmux_w (
    .clk, .rst_n, .en(w_en), .sel(cnt), .din(w_new), .dout(w_full)
  );

  weight_store #(.B(B), .WIDTH(WIDTH), .N(N)) u_wst (
    .clk, .rst_n, .en(t_en), .sel(cnt), .w_full, .w, .hi_sel(w_hi_sel)
  );

  // The MAC serves exactly one of its two outputs at a time.
  a_mac_excl: assert property (@(posedge clk) disable iff (!rst_n) !(u_en && v_en));

endmodule
