// tb_cvd: loads every 3-bit code into the clock vernier model through the
// serial shift port (most significant bit first) and measures the delay
// from a rising edge of T_in to the following rising edge of T_skew. It must
// be BASE_DLY + code * DELTA, i.e. a relative skew of (code - 3) * DELTA.
module tb_cvd;
  localparam realtime DELTA = 0.010, BASE = 0.040;
  localparam int HALF = 2;
  logic shift = 1'b0, s_in = 1'b0, T_in = 1'b0, T_skew;
  logic [2:0] cfg;
  int checks = 0, failures = 0;

  cvd #(.DELTA(DELTA), .BASE_DLY(BASE)) dut (.shift, .s_in, .T_in, .T_skew, .cfg);

  always #HALF T_in = ~T_in;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int code = 0; code < 8; code++) begin
        int c;
        realtime t0, t1;
        c = (rep == 0) ? code : 7 - code;
        for (int b = 2; b >= 0; b--) begin
          #0.3 s_in = c[b];
          #0.3 shift = 1'b1;
          #0.3 shift = 1'b0;
        end
        chk("cfg", int'(cfg), c);
        @(posedge T_in);
        @(posedge T_in);
        t0 = $realtime;
        @(posedge T_skew);
        t1 = $realtime;
        // times in ps
        chk("delay", int'((t1 - t0) * 1000.0), int'((BASE + c * DELTA) * 1000.0));
        chk("relative skew", int'((t1 - t0 - (BASE + 3 * DELTA)) * 1000.0), (c - 3) * 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
