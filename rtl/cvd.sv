// cvd: clock vernier device (behavioural model; the delay line is an analog
// circuit and is modelled with simulation delays, only the configuration
// latches are ordinary logic).
//
// Three latches a, b and c form a serial shift register clocked by shift:
// each rising edge of shift moves s_in into a, a into b and b into c. After
// three shifts the configuration is cfg = {c, b, a}, so the controller sends
// the most significant bit first. The latches keep the configuration for
// the whole epoch.
//
// The clock T_in passes through an inverter, a line loaded by one switched
// capacitor per latch and a second inverter to T_skew. Each set latch adds
// load, so the delay grows with the code: T_skew follows T_in after
// BASE_DLY + cfg * DELTA time units. With code 3'b011 taken as zero skew the
// eight codes give the relative skews -3, -2, -1, 0, +1, +2, +3 and +4
// times DELTA.
//
// The shift-register structure, the 3-bit code and the zero-skew code come
// from the design description. The value of DELTA, the fixed base delay,
// the binary weighting of the three capacitor loads, the bit order and the
// transport-delay model are this model's own choices.
module cvd #(
  parameter realtime DELTA    = 0.010,
  parameter realtime BASE_DLY = 0.040
) (
  input  logic       shift,
  input  logic       s_in,
  input  logic       T_in,
  output logic       T_skew,
  output logic [2:0] cfg
);

  logic a, b, c;

  always_ff @(posedge shift) begin
    a <= s_in;
    b <= a;
    c <= b;
  end

  assign cfg = {c, b, a};

  initial T_skew = 1'b0;
  // Transport delay: every edge of T_in reappears on T_skew, even when the
  // delay is longer than a clock phase.
  realtime dly;
  always @(T_in) begin
    dly = BASE_DLY + DELTA * real'(cfg);
    T_skew <= #(dly) T_in;
  end

endmodule
