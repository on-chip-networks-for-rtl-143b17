// prom_route: route computation of one router input (the RC stage).
//
// Given the current node, the head flit's destination and source, the input
// port the packet came in on and the virtual channel it occupies, it returns
// the output port of the next hop and the set of output virtual channels the
// packet may be given there.
//
// Routing functions:
//  * RT_DOR_XY / RT_DOR_YX: dimension-ordered routing.
//  * RT_PROM: Path-based, Randomized, Oblivious, Minimal routing. With x and y
//    the remaining hops, only the two productive directions are candidates; the
//    packet goes along X with probability wx / (wx + wy). The weights are
//      source node (came from the local port):  x + f : y + f
//      came in on an X port (east or west):      x + f : y
//      came in on a Y port (north or south):     x     : y + f
//    PROM_UNIFORM uses f = 0 (every minimal path equally likely), PROM_FIXED a
//    constant F, PROM_O1TURN f = infinity (1/2 at the source, then straight
//    until a corner), and PROM_V f = FMAX * |xs| * |ys| / NNODES, where xs, ys
//    span the source-destination rectangle. To keep PROM_V exact in integer
//    logic, all weights are scaled by NNODES instead of dividing f.
//    The draw uses 16 random bits r: X is taken when (r * (wx + wy)) >> 16 < wx.
//
// Virtual channel sets (PROM only, deadlock freedom by the turn model): the
// NVC channels are split into a low half (eastbound traffic) and a high half
// (westbound traffic). Horizontal output links may use any VC. Vertical output
// links use the low half when the packet turns there after travelling east
// (came in on the west port), the high half after travelling west, the half it
// already occupies when it came in on a north or south port, and, at the source,
// the half given by the destination's side (a random half when the destination
// is in the same column). DOR, and the ejection port, allow every VC.
// With NVC = 1 the mask is always the single channel.
//
// Purely combinational. The formulas and the VC rule follow the PROM
// description; the 16-bit draw and the scaling are this design's choices.
module prom_route
  import noc_pkg::*;
#(
  parameter routing_e   ROUTING   = RT_PROM,
  parameter prom_mode_e PROM_MODE = PROM_V,
  parameter int         F         = 1,
  parameter int         FMAX      = 1024,
  parameter int         NNODES    = 64,
  parameter int         NVC       = 8
) (
  input  coord_t          cur_x,
  input  coord_t          cur_y,
  input  coord_t          dst_x,
  input  coord_t          dst_y,
  input  coord_t          src_x,
  input  coord_t          src_y,
  input  port_e           in_port,
  input  logic [VC_W-1:0] in_vc,
  input  logic [15:0]     rnd,
  output port_e           out_port,
  output logic [NVC-1:0]  vc_mask
);
  localparam int WW = 32;

  typedef logic [WW-1:0] w_t;

  logic  east, west, north, south;
  w_t    xa, ya, xs, ys, fsc, wx, wy, tot;
  logic [WW+15:0] prod;
  logic  go_x;
  logic [NVC-1:0] low_half, high_half, all_vc;

  always_comb begin
    east  = dst_x > cur_x;
    west  = dst_x < cur_x;
    north = dst_y > cur_y;
    south = dst_y < cur_y;
    xa    = w_t'(coord_t'(east  ? dst_x - cur_x : cur_x - dst_x));
    ya    = w_t'(coord_t'(north ? dst_y - cur_y : cur_y - dst_y));
    xs    = w_t'(coord_t'((dst_x > src_x) ? dst_x - src_x : src_x - dst_x));
    ys    = w_t'(coord_t'((dst_y > src_y) ? dst_y - src_y : src_y - dst_y));

    // f, scaled by NNODES for PROM_V; unscaled otherwise.
    unique case (PROM_MODE)
      PROM_UNIFORM: fsc = '0;
      PROM_FIXED:   fsc = w_t'(F);
      PROM_V:       fsc = w_t'(FMAX) * xs * ys;
      default:      fsc = '0;
    endcase

    if (PROM_MODE == PROM_V) begin
      wx = xa * w_t'(NNODES);
      wy = ya * w_t'(NNODES);
    end else begin
      wx = xa;
      wy = ya;
    end
    if (in_port == P_LOCAL) begin
      wx = wx + fsc;
      wy = wy + fsc;
    end else if (in_port == P_EAST || in_port == P_WEST) begin
      wx = wx + fsc;
    end else begin
      wy = wy + fsc;
    end
    tot  = wx + wy;
    prod = (WW+16)'(rnd) * (WW+16)'(tot);
    go_x = w_t'(prod >> 16) < wx;

    if (PROM_MODE == PROM_O1TURN) begin
      if (in_port == P_LOCAL)
        go_x = rnd[0];
      else
        go_x = (in_port == P_EAST || in_port == P_WEST);
    end

    // Output port.
    if (!east && !west && !north && !south)
      out_port = P_LOCAL;
    else if (ROUTING == RT_DOR_XY)
      out_port = east ? P_EAST : west ? P_WEST : north ? P_NORTH : P_SOUTH;
    else if (ROUTING == RT_DOR_YX)
      out_port = north ? P_NORTH : south ? P_SOUTH : east ? P_EAST : P_WEST;
    else if (!north && !south)
      out_port = east ? P_EAST : P_WEST;
    else if (!east && !west)
      out_port = north ? P_NORTH : P_SOUTH;
    else if (go_x)
      out_port = east ? P_EAST : P_WEST;
    else
      out_port = north ? P_NORTH : P_SOUTH;

    // Virtual channel set.
    all_vc    = '1;
    low_half  = '0;
    high_half = '0;
    for (int v = 0; v < NVC; v++) begin
      if (v < NVC / 2) low_half[v] = 1'b1;
      else             high_half[v] = 1'b1;
    end
    vc_mask = all_vc;
    if (ROUTING == RT_PROM && NVC > 1 &&
        (out_port == P_NORTH || out_port == P_SOUTH)) begin
      unique case (in_port)
        P_WEST:  vc_mask = low_half;
        P_EAST:  vc_mask = high_half;
        P_NORTH, P_SOUTH:
          vc_mask = (int'(in_vc) < NVC / 2) ? low_half : high_half;
        default: begin // P_LOCAL: the source node
          if (dst_x > cur_x)      vc_mask = low_half;
          else if (dst_x < cur_x) vc_mask = high_half;
          else                    vc_mask = rnd[1] ? high_half : low_half;
        end
      endcase
    end
  end

endmodule
