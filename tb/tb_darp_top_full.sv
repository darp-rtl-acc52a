// tb_darp_top_full: darp_top with every parameter at its default (11
// stages, 4096-entry prediction table, 100,000-cycle epochs) taken through
// one complete epoch and the reconfiguration that ends it, running a
// straight-line program of 20,000 distinct instructions so that the
// prediction table fills and starts evicting. See darp_top_env.svh for the
// environment and the checks. A single epoch cannot show both a frequency
// rise and a fall, so those two are not required here.
module tb_darp_top_full;
  import darp_pkg::*;
  localparam bit PREDICT = 1'b1;
  localparam bit NEED_FALL = 1'b1;
  localparam int P = P_STAGES, PCW = PC_W, DW = 32;
  localparam int EPOCH = EPOCH_CYCLES, TEPT_ENTRIES = 4096, RHO = 8, ETA = 32;
  localparam int REGION_LEN = 20000, N_REGIONS = 2, N_EPOCHS = 1;
  localparam longint WATCHDOG_NS = 64'd1_200_000;

  `include "darp_top_env.svh"

  // Watchdog: ends the run as failed if the epochs do not complete in time.
  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  darp_top dut (
    .clk, .clk_shadow, .rst_n, .fetch_valid, .fetch_pc, .fetch_ready,
    .redirect_valid, .redirect_pc, .stage_valid, .stage_pc, .stage_first,
    .stage_d, .stage_q, .retire_valid, .retire_pc, .stage_clk, .cvd_cfg,
    .freq_mhz, .period_ps, .freq_change, .freq_locked, .hold, .stage_err,
    .tept_hit, .tept_full, .tept_evict, .err_count, .skew, .freq_up,
    .freq_down, .reconfig, .epoch_done);
endmodule
