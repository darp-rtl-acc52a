// tb_razor_ff: self-checking test of the double-sampling flip-flop.
// clk has period 10, clk_shadow follows it by 3. Each cycle the data is
// either set early (4 after the previous edge) or late (2 after the
// sampling edge, i.e. between the main and the shadow sample). The
// expected q, q_shadow and err are computed here from that schedule.
module tb_razor_ff;
  localparam int W = 16;
  logic clk = 1'b0, clk_shadow = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q, q_shadow;
  logic stall = 1'b0, err;
  int checks = 0, failures = 0;

  razor_ff #(.W(W)) dut (.clk, .clk_shadow, .rst_n, .d, .stall, .q, .q_shadow, .err);

  always #5 clk = ~clk;
  always @(clk) clk_shadow <= #3 clk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One cycle: new value v, arriving late or not, with stall at the edge.
  task automatic cycle(logic [W-1:0] v, bit late, bit st);
    logic [W-1:0] old;
    old = d;
    stall = st;
    if (!late) d = v;
    @(posedge clk);
    if (late) begin
      #2 d = v;
      #2;
    end else begin
      #4;
    end
    check("q", q, late ? old : v);
    check("q_shadow", q_shadow, v);
    check("err", {15'b0, err}, {15'b0, late && !st && (old != v)});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #4;
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      cycle(v, ($urandom % 3) == 0, ($urandom % 4) == 0);
    end
    // deterministic corner cases
    cycle(16'h1234, 1'b0, 1'b0);
    cycle(16'hABCD, 1'b1, 1'b0);
    cycle(16'h0F0F, 1'b1, 1'b1);
    cycle(16'h0F0F, 1'b1, 1'b0);   // late but unchanged value: no error
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
