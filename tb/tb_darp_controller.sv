// tb_darp_controller: random epochs of error counts through the controller.
// A reference model computes Algorithm 1 with a real-valued average:
// frequency step on n_min/n_max against RHO/ETA, +/-1 skew step against the
// average with saturation, then the balancing passes that return the net
// skew to zero, and the period as 1e6 / f. Each run must finish within 100
// cycles. The count patterns are chosen so that the frequency rises, falls
// and stays, and so that balancing is needed.
module tb_darp_controller;
  localparam int P = 11, CW = 17, RHO = 8, ETA = 32, F_INIT = 3000, F_STEP = 50;
  localparam int F_MIN = 1000, F_MAX = 5000, BAL_PASSES = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CW-1:0] n [P];
  logic busy, done, freq_up, freq_down;
  logic [2:0] skew [P];
  logic [12:0] freq_mhz;
  logic [19:0] period_ps;
  int checks = 0, failures = 0, ups = 0, downs = 0, bal_runs = 0;

  darp_controller #(.P(P), .CW(CW), .RHO(RHO), .ETA(ETA)) dut (
    .clk, .rst_n, .start, .n, .busy, .done, .skew, .freq_mhz, .period_ps,
    .freq_up, .freq_down);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rs [P];
  int rf;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic reference(int cnt [P]);
    int mx, mn, sum, net, pass;
    int dir [P];
    real avg;
    mx = 0; mn = 1 << 30; sum = 0; net = 0;
    for (int i = 0; i < P; i++) begin
      if (cnt[i] > mx) mx = cnt[i];
      if (cnt[i] < mn) mn = cnt[i];
      sum += cnt[i];
      net += rs[i] - 3;
    end
    if (mn == 0 && mx <= RHO) rf = (rf + F_STEP > F_MAX) ? F_MAX : rf + F_STEP;
    else if (mn >= ETA)       rf = (rf - F_STEP < F_MIN) ? F_MIN : rf - F_STEP;
    avg = real'(sum) / real'(P);
    for (int i = 0; i < P; i++) begin
      dir[i] = 0;
      if (real'(cnt[i]) < avg) begin
        dir[i] = -1;
        if (rs[i] > 0) begin rs[i]--; net--; end
      end else if (real'(cnt[i]) > avg) begin
        dir[i] = 1;
        if (rs[i] < 7) begin rs[i]++; net++; end
      end
    end
    if (net != 0) bal_runs++;
    pass = 0;
    while (net != 0 && pass < BAL_PASSES) begin
      for (int i = 0; i < P && net != 0; i++) begin
        if (net > 0 && rs[i] > 0 && (pass > 0 || dir[i] != 1)) begin
          rs[i]--; net--;
        end else if (net < 0 && rs[i] < 7 && (pass > 0 || dir[i] != -1)) begin
          rs[i]++; net++;
        end
      end
      pass++;
    end
  endtask

  initial begin
    int cnt [P];
    int lat, f_before, max_lat;
    rf = F_INIT;
    max_lat = 0;
    for (int i = 0; i < P; i++) begin rs[i] = 3; n[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk("reset freq", int'(freq_mhz), F_INIT);
    chk("reset period", int'(period_ps), 1000000 / F_INIT);
    for (int e = 0; e < 300; e++) begin
      int kind;
      kind = e % 4;
      for (int i = 0; i < P; i++) begin
        case (kind)
          0: cnt[i] = ($urandom % 3 == 0) ? 0 : $urandom % (RHO + 1);     // quiet: rise
          1: cnt[i] = ETA + $urandom % 200;                                // busy: fall
          2: cnt[i] = $urandom % 100;                                      // mixed
          default: cnt[i] = (i < 2 + (e % 5)) ? 500 + $urandom % 50 : 0;  // few hot stages
        endcase
        n[i] = CW'(cnt[i]);
      end
      f_before = rf;
      reference(cnt);
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      lat = 1;
      while (!done && lat < 200) begin @(posedge clk); #1 lat++; end
      chk("latency within 100 cycles", int'(lat <= 100), 1);
      if (lat > max_lat) max_lat = lat;
      chk("freq", int'(freq_mhz), rf);
      chk("period", int'(period_ps), 1000000 / rf);
      for (int i = 0; i < P; i++) chk("skew", int'(skew[i]), rs[i]);
      if (rf > f_before) ups++;
      if (rf < f_before) downs++;
    end
    chk("frequency rose", int'(ups > 10), 1);
    chk("frequency fell", int'(downs > 10), 1);
    chk("balancing needed", int'(bal_runs > 10), 1);
    $display("ups=%0d downs=%0d balancing=%0d longest run=%0d cycles", ups, downs, bal_runs, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
