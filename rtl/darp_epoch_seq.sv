// darp_epoch_seq: sequences the DARP reconfiguration at every epoch
// boundary.
//
// After reset the current skew codes are first loaded into the clock
// vernier devices. Then, repeatedly:
//   RUN    the pipeline runs for EPOCH cycles while the per-stage error
//          counters count;
//   DRAIN  drain is raised so that fetch stops, until the pipeline reports
//          empty (clock skews may only change on an empty pipeline);
//   CTRL   the DARP controller is started and its done pulse awaited;
//   SHIFT  the new 3-bit code of every stage is shifted into its CVD, most
//          significant bit first: s_in changes while shift is low and is
//          taken on the rising edge of shift, three pulses in all, all
//          stages in parallel;
//   LOCK   freq_change is pulsed to the clock generator and the sequencer
//          waits until it reports freq_locked again;
//   then the error counters are cleared (cnt_clr) and RUN resumes.
// reconfig is high outside RUN; epoch_done pulses on leaving LOCK.
// The overhead of one reconfiguration with an 11-stage pipeline is a few
// tens of cycles plus the lock time of the clock generator.
//
// The epoch length, the flush before skew changes and resuming only after
// the skews are applied and the frequency has settled follow the design
// description. The handshakes, the bit order and the shift timing are this
// implementation's choices.
module darp_epoch_seq
  import darp_pkg::*;
#(
  parameter int unsigned P     = P_STAGES,
  parameter int unsigned EPOCH = EPOCH_CYCLES
) (
  input  logic              clk,
  input  logic              rst_n,
  // pipeline
  output logic              drain,
  input  logic              pipe_empty,
  // controller
  output logic              ctrl_start,
  input  logic              ctrl_done,
  input  logic [SKEW_W-1:0] skew [P],
  // clock vernier devices
  output logic              cvd_shift,
  output logic [P-1:0]      cvd_sin,
  // clock generator
  output logic              freq_change,
  input  logic              freq_locked,
  // error counters
  output logic              cnt_clr,
  // status
  output logic              reconfig,
  output logic              epoch_done
);

  typedef enum logic [2:0] {S_LOAD, S_RUN, S_DRAIN, S_CTRL, S_SHIFT, S_LOCK} state_e;
  state_e state;

  logic [$clog2(EPOCH+1)-1:0] cyc;
  logic [2:0]                 ph;      // shift phase 0..5
  logic                       lock_wait;
  logic                       first_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      cyc         <= '0;
      ph          <= '0;
      drain       <= 1'b1;
      ctrl_start  <= 1'b0;
      cvd_shift   <= 1'b0;
      cvd_sin     <= '0;
      freq_change <= 1'b0;
      cnt_clr     <= 1'b0;
      epoch_done  <= 1'b0;
      lock_wait   <= 1'b0;
      first_load  <= 1'b1;
    end else begin
      ctrl_start  <= 1'b0;
      freq_change <= 1'b0;
      cnt_clr     <= 1'b0;
      epoch_done  <= 1'b0;
      unique case (state)
        S_LOAD, S_SHIFT: begin
          if (!ph[0]) begin
            cvd_shift <= 1'b0;
            for (int i = 0; i < P; i++) cvd_sin[i] <= skew[i][2 - int'(ph[2:1])];
          end else begin
            cvd_shift <= 1'b1;
          end
          if (ph == 3'd5) begin
            ph <= '0;
            if (first_load) begin
              first_load <= 1'b0;
              cnt_clr    <= 1'b1;
              drain      <= 1'b0;
              cyc        <= '0;
              state      <= S_RUN;
            end else begin
              freq_change <= 1'b1;
              lock_wait   <= 1'b1;
              state       <= S_LOCK;
            end
          end else begin
            ph <= ph + 1'b1;
          end
        end
        S_RUN: begin
          cvd_shift <= 1'b0;
          if (cyc == ($clog2(EPOCH+1))'(EPOCH - 1)) begin
            drain <= 1'b1;
            state <= S_DRAIN;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_DRAIN: if (pipe_empty) begin
          ctrl_start <= 1'b1;
          state      <= S_CTRL;
        end
        S_CTRL: if (ctrl_done) begin
          ph    <= '0;
          state <= S_SHIFT;
        end
        S_LOCK: begin
          cvd_shift <= 1'b0;
          lock_wait <= 1'b0;   // one cycle for the generator to drop lock
          if (!lock_wait && freq_locked) begin
            cnt_clr    <= 1'b1;
            epoch_done <= 1'b1;
            drain      <= 1'b0;
            cyc        <= '0;
            state      <= S_RUN;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign reconfig = (state != S_RUN);

endmodule
