// tb_dablms_ctrl: self-checking test of the phase sequencer.
// Checks the phase order U, V, W, T with cnt running 0..15 in each, the
// enables and CTR1 of each phase, done exactly 64 cycles after the start
// cycle, and that a start while busy is ignored.
module tb_dablms_ctrl;
  import dablms_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       load, ctr1, u_en, v_en, w_en, t_en, busy, done;
  phase_e     phase;
  logic [3:0] cnt;
  int         checks = 0, failures = 0;

  dablms_ctrl dut (.clk, .rst_n, .start, .load, .phase, .cnt, .ctr1,
                   .u_en, .v_en, .w_en, .t_en, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    phase_e order[4] = '{PH_U, PH_V, PH_W, PH_T};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    expect_true(!busy && !done && !load, "idle after reset");
    for (int it = 0; it < 5; it++) begin
      // Idle for a few cycles: nothing moves.
      repeat (it + 1) begin
        @(posedge clk); #1;
        expect_true(phase == PH_IDLE && !u_en && !v_en && !w_en && !t_en, "idle enables");
      end
      start = 1'b1;
      #1;
      expect_true(load, "load in start cycle");
      @(posedge clk); #1;
      start = (it % 2) == 1; // odd iterations hold start high while busy
      for (int p = 0; p < 4; p++) begin
        for (int c = 0; c < 16; c++) begin
          expect_true(phase == order[p] && cnt == 4'(c), "phase/cnt sequence");
          expect_true(u_en == (p == 0) && v_en == (p == 1) && w_en == (p == 2) &&
                      t_en == (p == 3) && ctr1 == (p == 0), "enables");
          expect_true(busy && !done && !load, "busy without load");
          @(posedge clk); #1;
        end
      end
      // 64 cycles after the start cycle: done, back to idle.
      expect_true(done && phase == PH_IDLE && !busy, "done after 64 cycles");
      start = 1'b0;
      @(posedge clk); #1;
      expect_true(!done, "done is a single-cycle pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
