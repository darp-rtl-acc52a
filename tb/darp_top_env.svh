// darp_top_env.svh: body shared by the end-to-end testbenches of darp_top.
// The including module declares the localparams PREDICT, NEED_FALL, P, PCW, DW, EPOCH,
// TEPT_ENTRIES, RHO, ETA, REGION_LEN, N_REGIONS, N_EPOCHS and WATCHDOG_NS,
// instantiates darp_top as dut with the signals declared here, and holds
// its own watchdog.
//
// Environment: a 10 ns pipeline clock with the shadow clock 3 ns later; a
// fetch source that runs a loop of REGION_LEN instructions and moves to the
// next of N_REGIONS code regions at every epoch boundary (a new program
// phase); the behavioural stage model, whose time budget per stage is the
// clock period plus the skew difference between the stage's capture clock
// and its launch clock, (s_i - s_(i-1)) * 10 ps; and a clock generator model
// that drops lock when told to change frequency and regains it 10 cycles
// later.
//
// Checks: program-order retirement across replays, stalls and epoch
// boundaries; every per-stage error counter equals the errors seen on
// stage_err in the epoch; the frequency after each epoch follows the
// min/max error rule from the counts of the epoch; the period is 1e6/f;
// after each epoch the CVDs hold the controller's codes. Mechanisms that
// must each be seen: replay, stall, prediction hit, table eviction, frequency
// rise, frequency fall (when the run is long enough and NEED_FALL is set),
// skew change, epoch;
// prediction hits and evictions only when the table is present (PREDICT).

  logic clk = 1'b0, clk_shadow = 1'b0, rst_n = 1'b0;
  logic fetch_valid, fetch_ready, redirect_valid, retire_valid;
  logic [PCW-1:0] fetch_pc, redirect_pc, retire_pc;
  logic stage_valid [P], stage_first [P], stage_clk [P];
  logic [PCW-1:0] stage_pc [P];
  logic [DW-1:0] stage_d [P], stage_q [P];
  logic [2:0] cvd_cfg [P], skew [P];
  logic [12:0] freq_mhz;
  logic [19:0] period_ps;
  logic freq_change, freq_locked, hold, tept_hit, tept_full, tept_evict;
  logic freq_up, freq_down, reconfig, epoch_done;
  logic [P-1:0] stage_err;
  logic [darp_pkg::CNT_W-1:0] err_count [P];
  int budget_ps [P];
  int checks = 0, failures = 0;
  int n_replay = 0, n_hold = 0, n_hit = 0, n_evict = 0, n_epoch = 0, n_retire = 0;
  int n_up = 0, n_down = 0, n_skew_change = 0;
  bit expect_down_seen = 0;

  tb_stage_model #(.P(P), .PCW(PCW), .DW(DW)) model (
    .clk, .stage_valid, .stage_pc, .stage_first, .budget_ps, .stage_d);

  always #5 clk = ~clk;
  always @(clk) clk_shadow <= #3 clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // stage time budgets from the frequency and the CVD codes
  always_comb begin
    for (int i = 0; i < P; i++) begin
      int launch;
      launch = (i == 0) ? 3 : int'(cvd_cfg[i-1]);
      budget_ps[i] = int'(period_ps) + (int'(cvd_cfg[i]) - launch) * 10;
    end
  end

  // fetch source
  int region = 0;
  function automatic logic [PCW-1:0] region_base(int r);
    return PCW'(32'h0001_0000 + r * 32'h0010_0000);
  endfunction
  function automatic logic [PCW-1:0] next_pc(logic [PCW-1:0] pc);
    return (pc == region_base(region) + PCW'(4 * (REGION_LEN - 1))) ? region_base(region) : pc + 4;
  endfunction
  logic [PCW-1:0] pc_reg, exp_retire;
  assign fetch_valid = rst_n;
  assign fetch_pc    = pc_reg;

  // clock generator model
  int lock_cnt = 0;
  always @(posedge clk) begin
    if (!rst_n) freq_locked <= 1'b1;
    else if (freq_change) begin
      freq_locked <= 1'b0;
      lock_cnt    <= 10;
    end else if (lock_cnt > 0) begin
      lock_cnt <= lock_cnt - 1;
      if (lock_cnt == 1) freq_locked <= 1'b1;
    end
  end

  int ep_err [P];
  int ep_min, ep_max, f_prev;
  logic [2:0] cfg_prev [P];

  // The fetch source samples the pipeline's handshake at the falling edge
  // and applies it at the next rising edge.
  bit s_rd, s_fire;
  logic [PCW-1:0] s_rdpc;
  always @(posedge clk) begin
    if (!rst_n)      pc_reg <= region_base(0);
    else if (s_rd)   pc_reg <= s_rdpc;
    else if (s_fire) pc_reg <= next_pc(pc_reg);
    s_rd   = 1'b0;
    s_fire = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (epoch_done) begin
        // a new program phase starts on the empty pipeline
        region = (region + 1) % N_REGIONS;
        pc_reg = region_base(region);
      end
      s_rd   = redirect_valid;
      s_rdpc = redirect_pc;
      s_fire = fetch_valid && fetch_ready;
      if (retire_valid) begin
        chk("retire order", int'(retire_pc), int'(exp_retire));
        exp_retire = next_pc(exp_retire);
        n_retire++;
      end
      if (redirect_valid) n_replay++;
      if (hold) n_hold++;
      if (tept_hit && stage_valid[2]) n_hit++;
      if (tept_evict) n_evict++;
      if (freq_up) n_up++;
      if (freq_down) n_down++;
      if (!reconfig) chk("period", int'(period_ps), 1000000 / int'(freq_mhz));
      if (epoch_done) begin
        n_epoch++;
        // frequency rule, from the errors counted in the epoch
        ep_min = 1 << 30; ep_max = 0;
        for (int i = 0; i < P; i++) begin
          if (ep_err[i] < ep_min) ep_min = ep_err[i];
          if (ep_err[i] > ep_max) ep_max = ep_err[i];
        end
        if (ep_min == 0 && ep_max <= RHO)
          chk("frequency rises", int'(freq_mhz), f_prev + 50 > 5000 ? 5000 : f_prev + 50);
        else if (ep_min >= ETA)
          chk("frequency falls", int'(freq_mhz), f_prev - 50 < 1000 ? 1000 : f_prev - 50);
        else
          chk("frequency holds", int'(freq_mhz), f_prev);
        for (int i = 0; i < P; i++) begin
          chk("cvd holds new code", int'(cvd_cfg[i]), int'(skew[i]));
          if (cvd_cfg[i] != cfg_prev[i]) n_skew_change++;
          cfg_prev[i] = cvd_cfg[i];
        end
        $display("epoch %0d: f=%0d MHz errors min=%0d max=%0d skews %0d%0d%0d%0d%0d%0d%0d%0d%0d%0d%0d retired=%0d",
          n_epoch, freq_mhz, ep_min, ep_max, skew[0], skew[1], skew[2], skew[3], skew[4],
          skew[5], skew[6], skew[7], skew[8], skew[9], skew[10], n_retire);
        f_prev = int'(freq_mhz);
        for (int i = 0; i < P; i++) ep_err[i] = 0;
        exp_retire = region_base(region);
      end else begin
        for (int i = 0; i < P; i++) begin
          chk("error counter", int'(err_count[i]), ep_err[i]);
          if (stage_err[i]) ep_err[i]++;
        end
      end
    end
  end

  initial begin
    f_prev = 3000;
    exp_retire = region_base(0);
    for (int i = 0; i < P; i++) begin
      ep_err[i] = 0;
      cfg_prev[i] = 3'd3;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (n_epoch < N_EPOCHS) @(posedge clk);
    repeat (20) @(posedge clk);
    $display("retired=%0d replays=%0d stalls=%0d hits=%0d evictions=%0d epochs=%0d up=%0d down=%0d skew_changes=%0d",
      n_retire, n_replay, n_hold, n_hit, n_evict, n_epoch, n_up, n_down, n_skew_change);
    chk("instructions retired", int'(n_retire > 0), 1);
    chk("replay seen", int'(n_replay > 0), 1);
    chk("stall seen", int'(n_hold > 0), 1);
    if (PREDICT) begin
      chk("prediction hit seen", int'(n_hit > 0), 1);
      chk("table eviction seen", int'(n_evict > 0), 1);
    end else begin
      chk("no prediction without the table", n_hit + n_evict, 0);
    end
    chk("epoch seen", int'(n_epoch > 0), 1);
    chk("skew change seen", int'(n_skew_change > 0), 1);
    if (N_EPOCHS > 1) begin
      chk("frequency rise seen", int'(n_up > 0), 1);
      if (NEED_FALL) chk("frequency fall seen", int'(n_down > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
