// darp_pipeline: the DARP control layer of a P-stage pipeline. It carries
// one instruction per stage with its error-prediction meta-data, protects
// the output of every stage with a double-sampling flip-flop, stalls the
// pipeline for predicted timing errors and replays instructions after
// detected ones.
//
// Instruction flow. Token register tok[i] (i < P) holds the instruction
// that stage i works on in the current cycle; tok[P] holds the instruction
// that has left the last stage and waits for its error check. A token is
// {valid, pc, mask}: mask has one bit per stage in which the instruction is
// predicted to miss timing. The stage logic itself is outside this block:
// for every stage it receives stage_valid/stage_pc/stage_first and returns
// its result on stage_d, which a razor_ff captures; stage_q is that
// captured result, aligned with the token that moved on to tok[i+1].
//
// Error avoidance. While the decode stage holds an instruction, its pc is
// offered to the prediction table (dec_pc); the returned mask is merged
// into the token when it leaves decode. When a token arrives in a stage
// whose mask bit is set, hold is raised for one cycle: no token moves, all
// stages see the same inputs again, so the marked stage gets two cycles.
// hold is also the stall input of every razor_ff, so the flag that a
// stalled (and therefore slower) evaluation may raise is discarded.
// The instruction fetched first after a replay (the replayed one) also
// gets the failing stage set in its mask at fetch, so its re-execution is
// given two cycles there (accumulating over repeated replays of the same
// instruction); this also covers the stages before decode, which the
// prediction table cannot reach, and guarantees forward progress.
//
// Error detection and replay. A razor error of stage i in the cycle after
// a normal advance belongs to the token now in tok[i+1]. The oldest such
// token (largest i) is replayed: it and every younger token are squashed,
// fetch is redirected to its pc (redirect_valid/redirect_pc, combinational,
// acted on at the coming clk edge), and the pc and stage are sent to the
// prediction table (ins_*). Older tokens keep flowing. stage_err reports
// every detected error for the per-stage error counters.
//
// Retirement. tok[P] retires (retire_valid, retire_pc) in the cycle its
// last-stage error check is clean.
//
// Fetch is accepted (fetch_valid && fetch_ready) when there is no hold, no
// replay and no drain request; empty is high when no token is in flight.
//
// Double sampling, the predicted stall by recirculation, stall-invalidated
// error flags, replay and table insertion on every detected error follow
// the design description. One instruction per stage instead of a 4-wide
// bundle, the in-order squash of younger tokens and the choice of the
// oldest error when several stages fail together are this
// implementation's choices.
module darp_pipeline
  import darp_pkg::*;
#(
  parameter int unsigned P   = P_STAGES,
  parameter int unsigned PCW = PC_W,
  parameter int unsigned DW  = 32,
  parameter int unsigned DEC = 2,
  localparam int unsigned SW = $clog2(P)
) (
  input  logic           clk,
  input  logic           clk_shadow,
  input  logic           rst_n,
  // fetch side
  input  logic           fetch_valid,
  input  logic [PCW-1:0] fetch_pc,
  output logic           fetch_ready,
  input  logic           drain,
  output logic           redirect_valid,
  output logic [PCW-1:0] redirect_pc,
  // prediction table lookup (decode) and insert (error detection)
  output logic [PCW-1:0] dec_pc,
  input  logic           tept_hit,
  input  logic [P-1:0]   tept_mask,
  output logic           ins_valid,
  output logic [PCW-1:0] ins_pc,
  output logic [SW-1:0]  ins_stage,
  // stage logic interface
  output logic           stage_valid [P],
  output logic [PCW-1:0] stage_pc    [P],
  output logic           stage_first [P],
  input  logic [DW-1:0]  stage_d     [P],
  output logic [DW-1:0]  stage_q     [P],
  // status
  output logic [P-1:0]   stage_err,
  output logic           hold,
  output logic           retire_valid,
  output logic [PCW-1:0] retire_pc,
  output logic           empty
);

  typedef struct packed {
    logic           valid;
    logic [PCW-1:0] pc;
    logic [P-1:0]   mask;
  } token_t;

  token_t tok   [P+1];
  logic   first [P];
  logic [P-1:0] razor_err;
  logic [DW-1:0] shadow_unused [P];

  // ---------------- razor flip-flops ----------------
  for (genvar i = 0; i < P; i++) begin : g_razor
    razor_ff #(.W(DW)) u_razor (
      .clk        (clk),
      .clk_shadow (clk_shadow),
      .rst_n      (rst_n),
      .d          (stage_d[i]),
      .stall      (hold),
      .q          (stage_q[i]),
      .q_shadow   (shadow_unused[i]),
      .err        (razor_err[i])
    );
  end

  // ---------------- effective masks ----------------
  logic [P-1:0] mask_eff [P];
  always_comb begin
    for (int i = 0; i < P; i++) begin
      mask_eff[i] = tok[i].mask;
      if (i == DEC && tept_hit) mask_eff[i] = tok[i].mask | tept_mask;
    end
  end
  assign dec_pc = tok[DEC].pc;

  // ---------------- error detection ----------------
  logic          replay;
  int unsigned   err_stage;
  always_comb begin
    replay    = 1'b0;
    err_stage = 0;
    for (int i = 0; i < P; i++) begin
      stage_err[i] = razor_err[i] && tok[i+1].valid;
      if (stage_err[i]) begin
        replay    = 1'b1;
        err_stage = i;
      end
    end
  end

  assign redirect_valid = replay;
  assign redirect_pc    = tok[err_stage+1].pc;
  assign ins_valid      = replay;
  assign ins_pc         = tok[err_stage+1].pc;
  assign ins_stage      = SW'(err_stage);

  // A token survives this edge unless it is the replayed one or younger.
  logic keep [P+1];
  always_comb begin
    for (int j = 0; j <= P; j++) keep[j] = !replay || (j > int'(err_stage) + 1);
  end

  // ---------------- predicted stall ----------------
  always_comb begin
    hold = 1'b0;
    for (int i = 0; i < P; i++) begin
      if (keep[i] && tok[i].valid && first[i] && mask_eff[i][i]) hold = 1'b1;
    end
  end

  assign retire_valid = tok[P].valid && !stage_err[P-1];
  assign retire_pc    = tok[P].pc;
  assign fetch_ready  = !hold && !replay && !drain;

  always_comb begin
    empty = 1'b1;
    for (int j = 0; j <= P; j++) if (tok[j].valid) empty = 1'b0;
  end

  // ---------------- replay guard ----------------
  // The first instruction fetched after a replay is the replayed one; it
  // carries the failing stage in its mask so that its re-execution gets two
  // cycles there, even in the stages before decode. Stages collected by
  // successive replays of the same instruction accumulate.
  logic           rp_pending;
  logic [P-1:0]   rp_mask;
  logic [PCW-1:0] rp_pc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_pending <= 1'b0;
      rp_mask    <= '0;
      rp_pc      <= '0;
    end else if (replay) begin
      rp_pending <= 1'b1;
      rp_pc      <= redirect_pc;
      if (redirect_pc == rp_pc) rp_mask <= rp_mask | (P'(1) << err_stage);
      else                      rp_mask <= P'(1) << err_stage;
    end else if (fetch_valid && fetch_ready) begin
      rp_pending <= 1'b0;
    end
  end

  // ---------------- token registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= P; j++) tok[j] <= '0;
      for (int j = 0; j < P; j++)  first[j] <= 1'b0;
    end else if (hold) begin
      // recirculate: every surviving token stays where it is
      for (int j = 0; j < P; j++) begin
        if (!keep[j]) tok[j].valid <= 1'b0;
        first[j] <= 1'b0;
      end
      tok[P].valid <= 1'b0;   // retired (or replayed) this cycle
    end else begin
      tok[0].valid <= fetch_valid && fetch_ready;
      tok[0].pc    <= fetch_pc;
      tok[0].mask  <= rp_pending ? rp_mask : '0;
      first[0]     <= fetch_valid && fetch_ready;
      for (int j = 1; j <= P; j++) begin
        tok[j].valid <= tok[j-1].valid && keep[j-1];
        tok[j].pc    <= tok[j-1].pc;
        tok[j].mask  <= mask_eff[j-1];
        if (j < P) first[j] <= tok[j-1].valid && keep[j-1];
      end
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_out
    assign stage_valid[i] = tok[i].valid;
    assign stage_pc[i]    = tok[i].pc;
    assign stage_first[i] = tok[i].valid && first[i];
  end

  // A replayed token must be valid, and hold never lasts two cycles.
  assert property (@(posedge clk) disable iff (!rst_n) replay |-> tok[err_stage+1].valid)
    else $error("darp_pipeline: replay of an empty slot");
  assert property (@(posedge clk) disable iff (!rst_n) hold |=> !hold)
    else $error("darp_pipeline: stall longer than one cycle");

endmodule
