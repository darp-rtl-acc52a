// darp_top: Dynamically Adaptable Resilient Pipeline, the error-prediction
// and clock-tuning layer wrapped around an 11-stage processor pipeline.
//
// It ties together:
//   * darp_pipeline - instruction meta-data, razor flip-flops on every
//     stage output, predicted stalls and replay on detected errors;
//   * tept          - the timing error prediction table, looked up by the
//     decode stage and filled on every detected error;
//   * error_counter - one per stage, counting the errors prediction missed;
//   * darp_controller - once per epoch, new frequency and skew codes;
//   * darp_epoch_seq  - epoch timing, drain, controller run, skew loading
//     and the frequency change handshake;
//   * cvd           - one clock vernier device per stage.
//
// Outside this block, and reached through its ports, are the stage logic of
// the processor (stage_* ports: each stage reports its result on stage_d,
// captured into stage_q), the instruction fetch source (fetch_* and
// redirect_*), and the clock generator, which is told the new frequency
// (freq_mhz, period_ps, freq_change) and answers with freq_locked.
// clk is the pipeline clock, clk_shadow its delayed copy for the shadow
// samplers, and stage_clk[i] the copy of clk skewed by stage i's CVD for
// the datapath registers of that stage.
//
// PREDICT selects between the two proposed variants: with the prediction
// table (the default, "DARP-Pred") or without it (plain DARP, frequency and
// skew tuning with replay only). Without the table, the replay guard in
// darp_pipeline still gives a replayed instruction its second cycle.
//
// The structure follows the design's overview; the split into these
// modules, the port set and the single-instruction-per-stage token flow are
// this implementation's choices.
module darp_top
  import darp_pkg::*;
#(
  parameter bit          PREDICT      = 1'b1,
  parameter int unsigned P            = P_STAGES,
  parameter int unsigned PCW          = PC_W,
  parameter int unsigned DW           = 32,
  parameter int unsigned TEPT_ENTRIES = 4096,
  parameter int unsigned EPOCH        = EPOCH_CYCLES,
  parameter int unsigned F_INIT       = 3000,
  parameter int unsigned F_STEP       = 50,
  parameter int unsigned F_MIN        = 1000,
  parameter int unsigned F_MAX        = 5000,
  parameter int unsigned RHO          = 8,
  parameter int unsigned ETA          = 32,
  parameter realtime     CVD_DELTA    = 0.010,
  localparam int unsigned SW          = $clog2(P)
) (
  input  logic              clk,
  input  logic              clk_shadow,
  input  logic              rst_n,
  // instruction fetch source
  input  logic              fetch_valid,
  input  logic [PCW-1:0]    fetch_pc,
  output logic              fetch_ready,
  output logic              redirect_valid,
  output logic [PCW-1:0]    redirect_pc,
  // stage logic of the processor
  output logic              stage_valid [P],
  output logic [PCW-1:0]    stage_pc    [P],
  output logic              stage_first [P],
  input  logic [DW-1:0]     stage_d     [P],
  output logic [DW-1:0]     stage_q     [P],
  output logic              retire_valid,
  output logic [PCW-1:0]    retire_pc,
  // skewed stage clocks
  output logic              stage_clk   [P],
  output logic [SKEW_W-1:0] cvd_cfg     [P],
  // clock generator
  output logic [FREQ_W-1:0] freq_mhz,
  output logic [PER_W-1:0]  period_ps,
  output logic              freq_change,
  input  logic              freq_locked,
  // status
  output logic              hold,
  output logic [P-1:0]      stage_err,
  output logic              tept_hit,
  output logic              tept_full,
  output logic              tept_evict,
  output logic [CNT_W-1:0]  err_count   [P],
  output logic [SKEW_W-1:0] skew        [P],
  output logic              freq_up,
  output logic              freq_down,
  output logic              reconfig,
  output logic              epoch_done
);

  logic [PCW-1:0] dec_pc, ins_pc;
  logic [P-1:0]   tept_mask;
  logic           ins_valid;
  logic [SW-1:0]  ins_stage;
  logic           drain, pipe_empty;
  logic           ctrl_start, ctrl_done, ctrl_busy;
  logic           cvd_shift;
  logic [P-1:0]   cvd_sin;
  logic           cnt_clr;

  darp_pipeline #(.P(P), .PCW(PCW), .DW(DW)) u_pipe (
    .clk, .clk_shadow, .rst_n,
    .fetch_valid, .fetch_pc, .fetch_ready, .drain,
    .redirect_valid, .redirect_pc,
    .dec_pc, .tept_hit, .tept_mask,
    .ins_valid, .ins_pc, .ins_stage,
    .stage_valid, .stage_pc, .stage_first, .stage_d, .stage_q,
    .stage_err, .hold, .retire_valid, .retire_pc,
    .empty (pipe_empty)
  );

  if (PREDICT) begin : g_tept
    tept #(.ENTRIES(TEPT_ENTRIES), .PCW(PCW), .P(P)) u_tept (
      .clk, .rst_n,
      .lk_pc (dec_pc), .lk_hit (tept_hit), .lk_mask (tept_mask),
      .ins_valid, .ins_pc, .ins_stage,
      .full (tept_full), .evict (tept_evict)
    );
  end else begin : g_no_tept
    // Plain DARP: errors are only detected and replayed, never predicted.
    assign tept_hit   = 1'b0;
    assign tept_mask  = '0;
    assign tept_full  = 1'b0;
    assign tept_evict = 1'b0;
  end

  for (genvar i = 0; i < P; i++) begin : g_cnt
    error_counter #(.W(CNT_W)) u_cnt (
      .clk, .rst_n,
      .clr   (cnt_clr),
      .inc   (stage_err[i]),
      .count (err_count[i])
    );
  end

  darp_controller #(
    .P(P), .CW(CNT_W), .F_INIT(F_INIT), .F_STEP(F_STEP), .F_MIN(F_MIN),
    .F_MAX(F_MAX), .RHO(RHO), .ETA(ETA)
  ) u_ctrl (
    .clk, .rst_n,
    .start (ctrl_start), .n (err_count),
    .busy (ctrl_busy), .done (ctrl_done),
    .skew, .freq_mhz, .period_ps, .freq_up, .freq_down
  );

  darp_epoch_seq #(.P(P), .EPOCH(EPOCH)) u_seq (
    .clk, .rst_n,
    .drain, .pipe_empty,
    .ctrl_start, .ctrl_done, .skew,
    .cvd_shift, .cvd_sin,
    .freq_change, .freq_locked,
    .cnt_clr, .reconfig, .epoch_done
  );

  for (genvar i = 0; i < P; i++) begin : g_cvd
    cvd #(.DELTA(CVD_DELTA)) u_cvd (
      .shift  (cvd_shift),
      .s_in   (cvd_sin[i]),
      .T_in   (clk),
      .T_skew (stage_clk[i]),
      .cfg    (cvd_cfg[i])
    );
  end

  // The controller is only started by the sequencer while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) ctrl_start |-> !ctrl_busy)
    else $error("darp_top: controller restarted while busy");

endmodule
