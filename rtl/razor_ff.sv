// razor_ff: double-sampling flip-flop placed on the output of a
// timing-critical path of a pipe stage.
//
// The main register samples d on the rising edge of clk and drives q, so
// the pipeline proceeds at full speed. A shadow register samples the same d
// on the rising edge of clk_shadow, a copy of clk delayed by less than a
// clock period. If the path settled late, after the clk edge but before the
// clk_shadow edge, the two samples differ and err is raised. err is only
// meaningful once the clk_shadow edge has passed and is used at the next
// clk edge.
//
// When the pipeline is stalled the stage keeps its inputs for a second
// cycle, so a late result is simply sampled again at the next edge. The
// stall input is sampled together with d, and a mismatch that belongs to a
// stalled edge is suppressed: a stall invalidates the flag, as the
// design requires. Recovery itself (instruction replay) is left to the
// pipeline control; the shadow value is available on q_shadow.
//
// Double sampling and stall masking follow the design description; the
// delayed shadow clock input and the reset to zero are this
// implementation's choices.
module razor_ff #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clk_shadow,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         stall,
  output logic [W-1:0] q,
  output logic [W-1:0] q_shadow,
  output logic         err
);

  logic stall_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      stall_q <= 1'b0;
    end else begin
      q       <= d;
      stall_q <= stall;
    end
  end

  always_ff @(posedge clk_shadow or negedge rst_n) begin
    if (!rst_n) q_shadow <= '0;
    else        q_shadow <= d;
  end

  assign err = (q != q_shadow) && !stall_q;

endmodule
