// darp_pkg: constants and types shared by the DARP pipeline blocks.
//
// The numbers that come from the design description are the pipeline depth
// (eleven stages, the out-of-order Core-1 configuration), the 3-bit clock
// vernier configuration whose code 3'b011 means zero skew, the 100K-cycle
// reconfiguration epoch and the 4K-entry timing error prediction table.
// The program counter width, the protected data width per stage and the
// frequency bookkeeping in MHz are choices of this implementation.
package darp_pkg;

  // Pipeline depth p (Fetch .. Retire).
  localparam int unsigned P_STAGES   = 11;
  // Clock vernier device configuration.
  localparam int unsigned SKEW_W     = 3;
  localparam logic [SKEW_W-1:0] SKEW_ZERO = 3'b011;
  localparam logic [SKEW_W-1:0] SKEW_MAX  = 3'b111;
  // Program counter width (implementation choice).
  localparam int unsigned PC_W       = 32;
  // Reconfiguration epoch in cycles and resulting error counter width.
  localparam int unsigned EPOCH_CYCLES = 100_000;
  localparam int unsigned CNT_W      = $clog2(EPOCH_CYCLES + 1);
  // Frequency register width (MHz) and period width (ps).
  localparam int unsigned FREQ_W     = 13;
  localparam int unsigned PER_W      = 20;

  // Stage numbering follows the stage order of the pipeline.
  typedef enum logic [3:0] {
    ST_FETCH    = 4'd0,
    ST_INSTBUF  = 4'd1,
    ST_DECODE   = 4'd2,
    ST_RENAME   = 4'd3,
    ST_DISPATCH = 4'd4,
    ST_ISSUE    = 4'd5,
    ST_REGREAD  = 4'd6,
    ST_EXECUTE  = 4'd7,
    ST_LSU      = 4'd8,
    ST_WRITEBACK= 4'd9,
    ST_RETIRE   = 4'd10
  } stage_e;

endpackage
