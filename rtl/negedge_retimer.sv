// negedge_retimer: negative-edge flip-flop placed on every signal that leaves
// a tile towards a neighbouring tile.
//
// Two flip-flops in adjacent tiles sit far apart on the global clock tree, so
// the launching flop may see its clock edge well before the capturing one and
// violate hold time, which no clock frequency can repair after fabrication.
// Capturing the crossing signal on the falling edge holds it stable for half a
// cycle after the launching edge. The path keeps its one-cycle timing: data
// launched at a rising edge is captured here at the following falling edge and
// by the receiving tile at the next rising edge. Reset (asynchronous, active
// low) clears the output.
//
// The falling-edge flop between tiles follows the chip's physical design;
// the reset and the width parameter are this design's additions.
module negedge_retimer #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
