// tb_darp_top: end-to-end test of darp_top at reduced size: 2000-cycle
// epochs, a 16-entry prediction table, 16 epochs over 4 program phases.
// The frequency thresholds are set so that the controller both raises and
// lowers the frequency within the run. See darp_top_env.svh for the
// environment and the checks.
module tb_darp_top;
  import darp_pkg::*;
  localparam bit PREDICT = 1'b1;
  localparam bit NEED_FALL = 1'b1;
  localparam int P = 11, PCW = 32, DW = 32;
  localparam int EPOCH = 2000, TEPT_ENTRIES = 16, RHO = 200, ETA = 3;
  localparam int REGION_LEN = 40, N_REGIONS = 4, N_EPOCHS = 16;
  localparam longint WATCHDOG_NS = 64'd2_000_000;

  `include "darp_top_env.svh"

  // Watchdog: ends the run as failed if the epochs do not complete in time.
  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  darp_top #(.EPOCH(EPOCH), .TEPT_ENTRIES(TEPT_ENTRIES), .RHO(RHO), .ETA(ETA)) dut (
    .clk, .clk_shadow, .rst_n, .fetch_valid, .fetch_pc, .fetch_ready,
    .redirect_valid, .redirect_pc, .stage_valid, .stage_pc, .stage_first,
    .stage_d, .stage_q, .retire_valid, .retire_pc, .stage_clk, .cvd_cfg,
    .freq_mhz, .period_ps, .freq_change, .freq_locked, .hold, .stage_err,
    .tept_hit, .tept_full, .tept_evict, .err_count, .skew, .freq_up,
    .freq_down, .reconfig, .epoch_done);
endmodule
