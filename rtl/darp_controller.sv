// darp_controller: once per epoch, retunes the pipeline clock frequency and
// the clock skew configuration of every pipe stage from the stage timing
// error counts of the epoch that just ended.
//
// Algorithm, run after a start pulse:
//  * SCAN (one stage per cycle): sum of the error counts, the largest
//    count n_max and the smallest count n_min, and the net skew
//    sum(s_i - 3'b011).
//  * FREQ: if n_min == 0 and n_max <= RHO the frequency rises by F_STEP;
//    otherwise if n_min >= ETA it falls by F_STEP. It is kept inside
//    [F_MIN, F_MAX]. A divider then derives the new period in ps
//    (1e6 / f in MHz) while the skews are worked out.
//  * SKEW (one stage per cycle): a stage with fewer errors than the average
//    gets its 3-bit skew code decremented, one with more errors gets it
//    incremented (saturating at 0 and 7). The average is never divided
//    out: n_i < avg is tested as P*n_i < sum(n).
//  * BALANCE: the net skew is brought back to zero so that the total time
//    of the p stages stays p clock periods. Stages are visited in order,
//    one unit of correction per visit. In the first pass a positive net
//    is only taken from stages that were not incremented and a negative
//    net only given to stages that were not decremented, so no stage is
//    moved against its own error trend; later passes may use any stage.
//    At most BAL_PASSES passes are made.
//  * done pulses for one cycle when skew, freq_mhz and period_ps hold the
//    new configuration. The whole run takes well under 100 cycles for
//    P = 11.
//
// Steps 1-17 of the algorithm (frequency step on the min/max error
// counts, +/-1 skew step against the average) follow the design
// description. The representation of f in MHz, the step size, the limits,
// RHO, ETA and the way step 18 is carried out (zero net skew, restored
// one unit per stage visit) are this implementation's choices.
module darp_controller
  import darp_pkg::*;
#(
  parameter int unsigned P          = P_STAGES,
  parameter int unsigned CW         = CNT_W,
  parameter int unsigned F_INIT     = 3000,
  parameter int unsigned F_STEP     = 50,
  parameter int unsigned F_MIN      = 1000,
  parameter int unsigned F_MAX      = 5000,
  parameter int unsigned RHO        = 8,
  parameter int unsigned ETA        = 32,
  parameter int unsigned BAL_PASSES = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [CW-1:0]          n     [P],
  output logic                   busy,
  output logic                   done,
  output logic [SKEW_W-1:0]      skew  [P],
  output logic [FREQ_W-1:0]      freq_mhz,
  output logic [PER_W-1:0]       period_ps,
  output logic                   freq_up,
  output logic                   freq_down
);

  localparam int unsigned IW  = $clog2(P);
  localparam int unsigned SUMW = CW + $clog2(P) + 1;
  localparam int unsigned NETW = SKEW_W + $clog2(P) + 2;
  localparam logic [PER_W-1:0] PS_PER_US = PER_W'(1_000_000);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_FREQ, S_SKEW, S_BAL, S_WDIV, S_DONE} state_e;
  state_e state;

  logic [CW-1:0]            nq [P];
  logic [IW-1:0]            idx;
  logic [$clog2(BAL_PASSES+1)-1:0] pass;
  logic [SUMW-1:0]          sum;
  logic [CW-1:0]            nmax, nmin;
  logic signed [NETW-1:0]   net;
  logic signed [1:0]        dir [P];

  // Comparison of stage idx against the average.
  logic [SUMW-1:0] scaled;
  assign scaled = SUMW'(nq[idx]) * SUMW'(P);

  // Frequency step.
  logic [FREQ_W-1:0] f_nxt;
  logic              up_c, down_c;
  always_comb begin
    up_c   = (nmin == '0) && (nmax <= CW'(RHO));
    down_c = !up_c && (nmin >= CW'(ETA));
    f_nxt  = freq_mhz;
    if (up_c)
      f_nxt = (32'(freq_mhz) + F_STEP > F_MAX) ? FREQ_W'(F_MAX) : freq_mhz + FREQ_W'(F_STEP);
    else if (down_c)
      f_nxt = (32'(freq_mhz) < F_MIN + F_STEP) ? FREQ_W'(F_MIN) : freq_mhz - FREQ_W'(F_STEP);
  end

  // Restoring divider: period_ps = 1e6 / freq_mhz.
  logic              div_busy;
  logic [4:0]        div_cnt;
  logic [PER_W-1:0]  div_q;
  logic [FREQ_W-1:0] div_r;
  logic [FREQ_W:0]   div_try;
  assign div_try = {div_r, div_q[PER_W-1]};

  // Balancing decision for stage idx.
  logic bal_dec, bal_inc;
  always_comb begin
    bal_dec = (net > 0) && (skew[idx] != '0)       && (pass != '0 || dir[idx] != 2'sd1);
    bal_inc = (net < 0) && (skew[idx] != SKEW_MAX) && (pass != '0 || dir[idx] != -2'sd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      pass      <= '0;
      sum       <= '0;
      nmax      <= '0;
      nmin      <= '0;
      net       <= '0;
      freq_mhz  <= FREQ_W'(F_INIT);
      period_ps <= PER_W'(1_000_000 / F_INIT);
      div_busy  <= 1'b0;
      div_cnt   <= '0;
      div_q     <= '0;
      div_r     <= '0;
      done      <= 1'b0;
      freq_up   <= 1'b0;
      freq_down <= 1'b0;
      for (int i = 0; i < P; i++) begin
        skew[i] <= SKEW_ZERO;
        nq[i]   <= '0;
        dir[i]  <= '0;
      end
    end else begin
      done      <= 1'b0;
      freq_up   <= 1'b0;
      freq_down <= 1'b0;

      // divider runs alongside SKEW and BALANCE
      if (div_busy) begin
        if (div_try >= {1'b0, freq_mhz}) begin
          div_r <= FREQ_W'(div_try - {1'b0, freq_mhz});
          div_q <= {div_q[PER_W-2:0], 1'b1};
        end else begin
          div_r <= div_try[FREQ_W-1:0];
          div_q <= {div_q[PER_W-2:0], 1'b0};
        end
        div_cnt <= div_cnt - 1'b1;
        if (div_cnt == 5'd1) div_busy <= 1'b0;
      end

      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < P; i++) nq[i] <= n[i];
          idx   <= '0;
          sum   <= '0;
          nmax  <= '0;
          nmin  <= '1;
          net   <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          sum <= sum + SUMW'(nq[idx]);
          if (nq[idx] > nmax) nmax <= nq[idx];
          if (nq[idx] < nmin) nmin <= nq[idx];
          net <= net + NETW'(signed'({1'b0, skew[idx]})) - NETW'(signed'({1'b0, SKEW_ZERO}));
          if (idx == IW'(P - 1)) state <= S_FREQ;
          else                   idx   <= idx + 1'b1;
        end
        S_FREQ: begin
          freq_mhz  <= f_nxt;
          freq_up   <= up_c   && (f_nxt != freq_mhz);
          freq_down <= down_c && (f_nxt != freq_mhz);
          div_busy  <= 1'b1;
          div_cnt   <= 5'(PER_W);
          div_q     <= PS_PER_US;
          div_r     <= '0;
          idx       <= '0;
          state     <= S_SKEW;
        end
        S_SKEW: begin
          if (scaled < sum) begin
            dir[idx] <= -2'sd1;
            if (skew[idx] != '0) begin
              skew[idx] <= skew[idx] - 1'b1;
              net       <= net - NETW'(1);
            end
          end else if (scaled > sum) begin
            dir[idx] <= 2'sd1;
            if (skew[idx] != SKEW_MAX) begin
              skew[idx] <= skew[idx] + 1'b1;
              net       <= net + NETW'(1);
            end
          end else begin
            dir[idx] <= 2'sd0;
          end
          if (idx == IW'(P - 1)) begin
            idx   <= '0;
            pass  <= '0;
            state <= S_BAL;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_BAL: begin
          if (net == 0) begin
            state <= S_WDIV;
          end else begin
            if (bal_dec) begin
              skew[idx] <= skew[idx] - 1'b1;
              net       <= net - NETW'(1);
            end else if (bal_inc) begin
              skew[idx] <= skew[idx] + 1'b1;
              net       <= net + NETW'(1);
            end
            if (idx == IW'(P - 1)) begin
              idx  <= '0;
              pass <= pass + 1'b1;
              if (32'(pass) + 1 >= BAL_PASSES) state <= S_WDIV;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        S_WDIV: if (!div_busy) begin
          period_ps <= div_q;
          state     <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Skew codes never leave the 3-bit range by construction; a start while
  // busy is ignored, which the sequencer must not rely on.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("darp_controller: start while busy");

endmodule
