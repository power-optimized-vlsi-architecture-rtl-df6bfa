// tb_dablms_top: end-to-end test of the DA-BLMS adaptive filter at its
// default size (N = 16, L = 4, 8-bit samples and weights).
//
// A reference model of the block LMS iteration, written directly from the
// equations with the design's number formats (unsigned, modulo 2**16,
// decision-device truncation, mu/16), runs next to the filter. For each of
// a series of blocks it checks the 4 outputs y, the 4 errors e, the 4
// truncated errors and all 16 weights, and that `done` follows the start
// cycle by exactly 64 cycles. Blocks of sml and large values alternate
// so that both halves of each decision device are used. The test also
// counts how often each mechanism occurred: the four phases, CTR1 steering
// the MAC to u and to v, the error and weight decision devices passing the
// upper and the lower byte, and a start request ignored while busy. A
// mechanism that never occurred counts as a failure.
module tb_dablms_top;
  import dablms_pkg::*;

  localparam int N = 16, L = 4;
  localparam int ITER = 60;

  logic                   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [L-1:0][7:0]      x_blk = '0;
  logic [L-1:0][15:0]     d_blk = '0;
  logic [3:0]             mu = '0;
  logic [L-1:0][15:0]     y, e;
  logic [L-1:0][7:0]      e_fb;
  logic [N-1:0][7:0]      w;
  logic                   busy, done, w_hi_sel;
  logic [L-1:0]           e_hi_sel;
  phase_e                 phase;

  int checks = 0, failures = 0;
  int n_ph_u = 0, n_ph_v = 0, n_ph_w = 0, n_ph_t = 0;
  int n_e_hi = 0, n_e_lo = 0, n_w_hi = 0, n_w_lo = 0, n_ignored = 0;

  dablms_top dut (
    .clk, .rst_n, .start, .x_blk, .d_blk, .mu, .y, .e, .e_fb, .w,
    .busy, .done, .phase, .e_hi_sel, .w_hi_sel
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ITER * 80 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  always @(posedge clk) begin
    if (rst_n) begin
      case (phase)
        PH_U: n_ph_u++;
        PH_V: n_ph_v++;
        PH_W: n_ph_w++;
        PH_T: begin
          n_ph_t++;
          if (w_hi_sel) n_w_hi++; else n_w_lo++;
        end
        default: ;
      endcase
      if (start && busy) n_ignored++;
    end
  end

  // Reference model state.
  logic [7:0]  r_hist[N+L-1];
  logic [7:0]  r_w[N];

  function automatic logic [7:0] trunc8(input logic [15:0] x);
    return (x[15:8] != 0) ? x[15:8] : x[7:0];
  endfunction

  task automatic expect_eq(input logic [15:0] got, exp, input string what, input int idx);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s[%0d] got %h exp %h", what, idx, got, exp);
    end
  endtask

  initial begin
    logic [15:0] r_u[N], r_v[N], r_y[L], r_e[L];
    logic [7:0]  r_ef[L];
    int          cycles;

    for (int m = 0; m < N + L - 1; m++) r_hist[m] = '0;
    for (int n = 0; n < N; n++) r_w[n] = '0;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    for (int it = 0; it < ITER; it++) begin
      logic sml;
      sml = (it % 3) != 0;
      // Stimulus: small blocks keep values low so the lower byte is used.
      // Every fourth block sets d just above the expected y, which makes
      // the error small and exercises the lower byte of the error decision.
      for (int l = 0; l < L; l++) x_blk[l] = sml ? 8'($urandom % 4) : 8'($urandom);
      // Reference iteration, part 1: new samples, outputs.
      for (int m = N + L - 2; m >= L; m--) r_hist[m] = r_hist[m-L];
      for (int l = 0; l < L; l++) r_hist[l] = x_blk[l];
      for (int n = 0; n < N; n++) begin
        r_u[n] = '0;
        for (int l = 0; l < L; l++)
          r_u[n] = r_u[n] + 16'(int'(r_hist[n+l]) * int'(r_w[(n/L)*L + l]));
      end
      for (int i = 0; i < L; i++) begin
        r_y[i] = '0;
        for (int j = 0; j < N / L; j++) r_y[i] = r_y[i] + r_u[j*L + i];
        if (it % 4 == 1)  d_blk[i] = r_y[i] + 16'($urandom % 200);
        else if (sml)     d_blk[i] = 16'($urandom % 64);
        else              d_blk[i] = 16'($urandom);
        r_e[i]  = d_blk[i] - r_y[i];
        r_ef[i] = trunc8(r_e[i]);
      end
      mu = sml ? 4'($urandom % 3) : 4'($urandom);
      start <= 1'b1;
      @(posedge clk);   // start cycle
      #1;
      // Reference iteration, part 2: weight update.
      for (int n = 0; n < N; n++) begin
        logic [15:0] inc;
        r_v[n] = '0;
        for (int l = 0; l < L; l++)
          r_v[n] = r_v[n] + 16'(int'(r_hist[n+l]) * int'(r_ef[l]));
        inc    = 16'((int'(r_v[n]) * int'(mu)) / 16);
        r_w[n] = trunc8(16'(r_w[n]) + inc);
      end
      // Odd iterations keep requesting while busy: the request is ignored.
      start <= (it % 2) == 1;
      cycles = 1;
      while (!done) begin
        @(posedge clk);
        #1;
        cycles++;
        if (cycles > 200) break;
      end
      start <= 1'b0;
      checks++;
      if (cycles != 65) begin
        failures++;
        $display("FAIL iteration %0d took %0d cycles after start, expected 64", it, cycles - 1);
      end
      for (int i = 0; i < L; i++) begin
        expect_eq(y[i], r_y[i], "y", i);
        expect_eq(e[i], r_e[i], "e", i);
        expect_eq(16'(e_fb[i]), 16'(r_ef[i]), "e_fb", i);
        if (e_hi_sel[i]) n_e_hi++; else n_e_lo++;
      end
      for (int n = 0; n < N; n++) expect_eq(16'(w[n]), 16'(r_w[n]), "w", n);
      @(posedge clk);
    end

    $display("phases U/V/W/T cycles: %0d %0d %0d %0d", n_ph_u, n_ph_v, n_ph_w, n_ph_t);
    $display("error decision hi/lo: %0d %0d, weight decision hi/lo: %0d %0d",
             n_e_hi, n_e_lo, n_w_hi, n_w_lo);
    $display("start requests ignored while busy: %0d", n_ignored);
    begin
      int counts[9];
      counts = '{n_ph_u, n_ph_v, n_ph_w, n_ph_t, n_e_hi, n_e_lo, n_w_hi, n_w_lo, n_ignored};
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never occurred", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
