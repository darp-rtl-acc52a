// tb_error_counter: random increments and clears against a reference
// count, plus saturation of a narrow counter.
module tb_error_counter;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [16:0] count;
  logic clr4 = 1'b0, inc4 = 1'b0;
  logic [3:0] count4;
  int checks = 0, failures = 0;
  int ref_cnt = 0, ref4 = 0;

  error_counter #(.W(17)) dut  (.clk, .rst_n, .clr, .inc, .count);
  error_counter #(.W(4))  dut4 (.clk, .rst_n, .clr(clr4), .inc(inc4), .count(count4));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      clr = ($urandom % 500) == 0;
      inc = ($urandom % 3) != 0;
      clr4 = (i == 1500);
      inc4 = 1'b1;
      @(posedge clk);
      if (clr) ref_cnt = 0; else if (inc) ref_cnt++;
      if (clr4) ref4 = 0; else if (inc4 && ref4 < 15) ref4++;
      #1;
      checks++;
      if (int'(count) != ref_cnt) begin
        failures++;
        $display("FAIL count %0d expected %0d", count, ref_cnt);
      end
      checks++;
      if (int'(count4) != ref4) begin
        failures++;
        $display("FAIL saturating count %0d expected %0d", count4, ref4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
