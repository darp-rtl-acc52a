// tb_darp_pipeline: runs a looping 48-instruction program through the
// pipeline control with the behavioural stage model and an ideal
// (unbounded) prediction table kept in the testbench.
// Checks: instructions retire exactly once and in program order despite
// replays and stalls; every replay names an instruction/stage that the
// stage model made slow; a slow instruction recorded for a stage at or
// after decode never causes a replay there again (its error is avoided by
// a stall); a stall lasts one cycle and moves nothing; drain empties the
// pipeline. Stalls, replays and drains must each happen.
module tb_darp_pipeline;
  localparam int P = 11, PCW = 32, DW = 32, DEC = 2, PROG = 48;
  localparam logic [PCW-1:0] BASE = 32'h0000_1000;
  logic clk = 1'b0, clk_shadow = 1'b0, rst_n = 1'b0;
  logic fetch_valid, fetch_ready, drain = 1'b0, redirect_valid;
  logic [PCW-1:0] fetch_pc, redirect_pc, dec_pc, ins_pc, retire_pc;
  logic tept_hit, ins_valid, hold, retire_valid, empty;
  logic [P-1:0] tept_mask, stage_err;
  logic [3:0] ins_stage;
  logic stage_valid [P], stage_first [P];
  logic [PCW-1:0] stage_pc [P];
  logic [DW-1:0] stage_d [P], stage_q [P];
  int budget_ps [P];
  int checks = 0, failures = 0;
  int n_hold = 0, n_replay = 0, n_retire = 0, n_drain = 0, n_avoid_fail = 0;

  darp_pipeline #(.P(P), .PCW(PCW), .DW(DW)) dut (
    .clk, .clk_shadow, .rst_n, .fetch_valid, .fetch_pc, .fetch_ready, .drain,
    .redirect_valid, .redirect_pc, .dec_pc, .tept_hit, .tept_mask,
    .ins_valid, .ins_pc, .ins_stage, .stage_valid, .stage_pc, .stage_first,
    .stage_d, .stage_q, .stage_err, .hold, .retire_valid, .retire_pc, .empty);

  tb_stage_model #(.P(P), .PCW(PCW), .DW(DW)) model (
    .clk, .stage_valid, .stage_pc, .stage_first, .budget_ps, .stage_d);

  always #5 clk = ~clk;
  always @(clk) clk_shadow <= #3 clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ideal prediction table
  logic [P-1:0] table_mask [logic [PCW-1:0]];
  always_comb begin
    tept_hit  = table_mask.exists(dec_pc);
    tept_mask = tept_hit ? table_mask[dec_pc] : '0;
  end

  function automatic logic [PCW-1:0] next_pc(logic [PCW-1:0] pc);
    return (pc == BASE + 4 * (PROG - 1)) ? BASE : pc + 4;
  endfunction

  // fetch source
  logic [PCW-1:0] pc_reg;
  assign fetch_valid = rst_n;
  assign fetch_pc    = pc_reg;
  always @(posedge clk) begin
    if (!rst_n)                          pc_reg <= BASE;
    else if (redirect_valid)             pc_reg <= redirect_pc;
    else if (fetch_valid && fetch_ready) pc_reg <= next_pc(pc_reg);
  end

  // checkers, sampled just before each edge
  logic [PCW-1:0] exp_retire;
  logic           prev_hold;
  logic [PCW-1:0] prev_pc [P];
  logic           prev_valid [P];
  always @(negedge clk) begin
    if (rst_n) begin
      if (retire_valid) begin
        chk("retire order", int'(retire_pc), int'(exp_retire));
        exp_retire = next_pc(exp_retire);
        n_retire++;
      end
      if (redirect_valid) begin
        n_replay++;
        chk("replayed instruction was slow", int'(model.is_slow(ins_pc, int'(ins_stage),
            budget_ps[ins_stage])), 1);
        if (int'(ins_stage) >= DEC && table_mask.exists(ins_pc) &&
            table_mask[ins_pc][ins_stage]) begin
          n_avoid_fail++;
          chk("predicted error avoided", 0, 1);
        end
        if (table_mask.exists(ins_pc)) table_mask[ins_pc][ins_stage] = 1'b1;
        else table_mask[ins_pc] = P'(1) << ins_stage;
      end
      if (hold) n_hold++;
      if (prev_hold) begin
        chk("stall is one cycle", int'(hold), 0);
        for (int i = 0; i < P; i++)
          if (prev_valid[i] && stage_valid[i]) chk("stall keeps tokens", int'(stage_pc[i]), int'(prev_pc[i]));
      end
      prev_hold = hold && !redirect_valid;
      for (int i = 0; i < P; i++) begin
        prev_pc[i] = stage_pc[i];
        prev_valid[i] = stage_valid[i];
      end
    end
  end

  initial begin
    exp_retire = BASE;
    prev_hold  = 1'b0;
    for (int i = 0; i < P; i++) budget_ps[i] = 300 + 10 * i;   // stage 0 tightest
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      repeat (1500) @(posedge clk);
      #1 drain = 1'b1;
      n_drain++;
      repeat (P + 3) @(posedge clk);
      #1 chk("drained", int'(empty), 1);
      drain = 1'b0;
    end
    chk("instructions retired", int'(n_retire > 2000), 1);
    chk("replays happened", int'(n_replay > 10), 1);
    chk("stalls happened", int'(n_hold > 10), 1);
    $display("retired=%0d replays=%0d stalls=%0d drains=%0d", n_retire, n_replay, n_hold, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
