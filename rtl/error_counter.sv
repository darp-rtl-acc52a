// error_counter: timing error counter of one pipe stage.
//
// Counts the cycles in which the stage's error detection reported a timing
// error that early prediction did not cover. The count is read by the DARP
// controller at the end of an epoch and cleared with clr before the next
// epoch starts; clr has priority over inc. The counter saturates at its
// all-ones value instead of wrapping.
//
// One counter per stage feeding the controller follows the design
// description; the width (enough for one error in every cycle of an epoch),
// saturation and the synchronous clear are this implementation's choices.
module error_counter
  import darp_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clr)               count <= '0;
    else if (inc && !(&count))  count <= count + 1'b1;
  end

endmodule
