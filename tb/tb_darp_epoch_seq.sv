// tb_darp_epoch_seq: runs the sequencer (epoch shortened to 50 cycles)
// against testbench models of the pipeline (empty a few cycles after
// drain), the controller (done some cycles after start, new random skew
// codes) and the clock generator (lock drops on freq_change, returns after
// a delay). Real CVD models receive the shifted codes.
// Checks: the initial codes are loaded before the first epoch; each epoch
// runs exactly EPOCH cycles with drain low; the controller starts only on an
// empty pipeline; after done the CVDs hold exactly the controller's codes;
// the counters are cleared and fetch resumes only after lock returns.
module tb_darp_epoch_seq;
  localparam int P = 11, EPOCH = 50, LOCK_DLY = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic drain, pipe_empty, ctrl_start, ctrl_done, cvd_shift, freq_change, freq_locked;
  logic cnt_clr, reconfig, epoch_done;
  logic [P-1:0] cvd_sin;
  logic [2:0] skew [P];
  logic T_skew_unused [P];
  logic [2:0] cfg [P];
  int checks = 0, failures = 0, epochs = 0;

  darp_epoch_seq #(.P(P), .EPOCH(EPOCH)) dut (
    .clk, .rst_n, .drain, .pipe_empty, .ctrl_start, .ctrl_done, .skew,
    .cvd_shift, .cvd_sin, .freq_change, .freq_locked, .cnt_clr, .reconfig, .epoch_done);

  for (genvar i = 0; i < P; i++) begin : g_cvd
    cvd u_cvd (.shift(cvd_shift), .s_in(cvd_sin[i]), .T_in(clk), .T_skew(T_skew_unused[i]), .cfg(cfg[i]));
  end

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  // pipeline model: empty 4 cycles after drain rises
  int drain_cnt = 0;
  always @(posedge clk) drain_cnt <= drain ? drain_cnt + 1 : 0;
  assign pipe_empty = drain && drain_cnt >= 4;

  // controller model
  int ctrl_cnt = -1;
  always @(posedge clk) begin
    ctrl_done <= 1'b0;
    if (ctrl_start) begin
      chk("controller started on empty pipeline", int'(pipe_empty), 1);
      ctrl_cnt <= 20;
    end else if (ctrl_cnt > 0) begin
      ctrl_cnt <= ctrl_cnt - 1;
    end else if (ctrl_cnt == 0) begin
      for (int i = 0; i < P; i++) skew[i] <= 3'($urandom);
      ctrl_done <= 1'b1;
      ctrl_cnt  <= -1;
    end
  end

  // clock generator model
  int lock_cnt = 0;
  always @(posedge clk) begin
    if (freq_change) begin
      freq_locked <= 1'b0;
      lock_cnt    <= LOCK_DLY;
    end else if (lock_cnt > 0) begin
      lock_cnt <= lock_cnt - 1;
      if (lock_cnt == 1) freq_locked <= 1'b1;
    end
  end

  // run-length and ordering checks
  int run_len = 0;
  bit in_run = 0, seen_lock_drop = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (cnt_clr) begin
        if (epochs > 0) chk("resume after lock", int'(seen_lock_drop && freq_locked), 1);
        for (int i = 0; i < P; i++) chk("cvd code", int'(cfg[i]), int'(skew[i]));
        in_run  = 1;
        run_len = 1;   // the clearing cycle is the first cycle of the epoch
        seen_lock_drop = 0;
      end else if (in_run) begin
        if (!drain) run_len++;
        else begin
          chk("epoch length", run_len, EPOCH);
          in_run = 0;
          epochs++;
        end
      end
      if (!freq_locked) seen_lock_drop = 1;
      if (!in_run && !reconfig) chk("reconfig low only while running", 0, 1);
    end
  end

  initial begin
    freq_locked = 1'b1;
    for (int i = 0; i < P; i++) skew[i] = 3'(i % 8);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (epochs < 12) @(posedge clk);
    chk("epochs completed", epochs, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
