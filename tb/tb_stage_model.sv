// tb_stage_model: behavioural stand-in for the stage logic of the processor,
// used by the pipeline and top-level testbenches. Times are in ns with a
// 10 ns pipeline clock and the shadow clock 3 ns later.
//
// Each stage's result for an instruction is result(pc, i). Its sensitized
// delay is delay_ps(pc, i), a fixed hash of pc and stage, so that the same
// instruction always exercises the same paths. If the delay exceeds the
// stage's time budget (budget_ps[i]) the result is late: in the
// instruction's first cycle in the stage the output first shows a wrong
// value and the correct one appears 2 ns after the next clk edge, after the
// main sample and before the shadow sample. In a second cycle (a stall) the
// value is correct. Otherwise the correct value appears 4 ns after the edge.
module tb_stage_model #(
  parameter int P   = 11,
  parameter int PCW = 32,
  parameter int DW  = 32
) (
  input  logic           clk,
  input  logic           stage_valid [P],
  input  logic [PCW-1:0] stage_pc    [P],
  input  logic           stage_first [P],
  input  int             budget_ps   [P],
  output logic [DW-1:0]  stage_d     [P]
);

  function automatic logic [DW-1:0] result(logic [PCW-1:0] pc, int i);
    return DW'(pc * 32'h9E37_79B1) ^ DW'(i * 32'h0101_0101);
  endfunction

  function automatic int delay_ps(logic [PCW-1:0] pc, int i);
    logic [31:0] h;
    h = (32'(pc) ^ 32'(i * 977)) * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return 150 + int'(h % 200);
  endfunction

  function automatic bit is_slow(logic [PCW-1:0] pc, int i, int budget);
    return delay_ps(pc, i) > budget;
  endfunction

  logic          late [P];
  logic [DW-1:0] late_val [P];

  initial begin
    for (int i = 0; i < P; i++) begin
      stage_d[i] = '0;
      late[i]    = 1'b0;
    end
  end

  always @(posedge clk) begin
    #2;
    for (int i = 0; i < P; i++) if (late[i]) stage_d[i] = late_val[i];
    #2;
    for (int i = 0; i < P; i++) begin
      late[i] = 1'b0;
      if (stage_valid[i]) begin
        if (stage_first[i] && is_slow(stage_pc[i], i, budget_ps[i])) begin
          late[i]     = 1'b1;
          late_val[i] = result(stage_pc[i], i);
          stage_d[i]  = ~result(stage_pc[i], i);
        end else begin
          stage_d[i] = result(stage_pc[i], i);
        end
      end else begin
        stage_d[i] = '0;
      end
    end
  end

endmodule
