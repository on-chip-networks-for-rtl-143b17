// em2_chip: the on-chip interconnect of the EM2 processor, an 11 x 10 array
// of identical tiles (110 cores) joined by six separate mesh networks.
//
// Tile n = y * TILES_X + x sits at column x and row y. Every tile is the same
// em2_tile; neighbouring tiles are joined, per network, by one flit link and
// one credit path in each direction, and links leaving the array are tied
// off. The cores and caches of the tiles are not part of this module: per
// tile, their context interface (ENC slots) and the local ports of the four
// non-migration networks are brought out as arrays indexed by tile. The two
// memory-controller tiles reach off-chip memory through the memory networks'
// local ports of their tiles, which are among these.
//
// The 11 x 10 array, the six separate networks and the uniform tile follow
// the chip's description; the orientation (11 columns), the coordinate
// scheme and the tied-off edges are this design's choices.
module em2_chip
  import noc_pkg::*;
#(
  parameter int TILES_X   = 11,
  parameter int TILES_Y   = 10,
  parameter int DEPTH     = 4,
  parameter int CTX_FLITS = 4,
  localparam int NT       = TILES_X * TILES_Y,
  localparam int NNET     = 6,
  localparam int NS       = 2,
  localparam int CTX_W    = CTX_FLITS * DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // core contexts of every tile
  output logic             slot_valid   [NT][NS],
  output coord_t           slot_nx      [NT][NS],
  output coord_t           slot_ny      [NT][NS],
  output logic [CTX_W-1:0] slot_ctx     [NT][NS],
  input  logic             core_progress[NT][NS],
  input  logic             core_mig_req [NT][NS],
  input  coord_t           core_mig_dx  [NT][NS],
  input  coord_t           core_mig_dy  [NT][NS],
  input  logic             core_wr      [NT][NS],
  input  logic [CTX_W-1:0] core_wr_ctx  [NT][NS],
  // remote-access and memory networks, local ports of every tile
  input  logic             net_inj_valid[NT][NNET-2],
  input  flit_t            net_inj_flit [NT][NNET-2],
  output logic             net_inj_cr   [NT][NNET-2],
  output logic             net_ej_valid [NT][NNET-2],
  output flit_t            net_ej_flit  [NT][NNET-2],
  input  logic             net_ej_cr    [NT][NNET-2],
  // ENC events of every tile
  output logic             evt_load_native[NT],
  output logic             evt_load_guest [NT],
  output logic             evt_evict      [NT],
  output logic             evt_migrate    [NT],
  output logic             evt_blocked    [NT]
);
  logic            li_valid    [NT][NNET][4];
  flit_t           li_flit     [NT][NNET][4];
  logic            lo_cr_valid [NT][NNET][4];
  logic [VC_W-1:0] lo_cr_vc    [NT][NNET][4];
  logic            lo_valid    [NT][NNET][4];
  flit_t           lo_flit     [NT][NNET][4];
  logic            li_cr_valid [NT][NNET][4];
  logic [VC_W-1:0] li_cr_vc    [NT][NNET][4];

  for (genvar y = 0; y < TILES_Y; y++) begin : g_y
    for (genvar x = 0; x < TILES_X; x++) begin : g_x
      localparam int N = y * TILES_X + x;

      em2_tile #(.DEPTH(DEPTH), .CTX_FLITS(CTX_FLITS), .NNET(NNET)) u_tile (
        .clk, .rst_n,
        .my_x(coord_t'(x)), .my_y(coord_t'(y)),
        .li_valid(li_valid[N]), .li_flit(li_flit[N]),
        .lo_cr_valid(lo_cr_valid[N]), .lo_cr_vc(lo_cr_vc[N]),
        .lo_valid(lo_valid[N]), .lo_flit(lo_flit[N]),
        .li_cr_valid(li_cr_valid[N]), .li_cr_vc(li_cr_vc[N]),
        .slot_valid(slot_valid[N]), .slot_nx(slot_nx[N]), .slot_ny(slot_ny[N]),
        .slot_ctx(slot_ctx[N]),
        .core_progress(core_progress[N]), .core_mig_req(core_mig_req[N]),
        .core_mig_dx(core_mig_dx[N]), .core_mig_dy(core_mig_dy[N]),
        .core_wr(core_wr[N]), .core_wr_ctx(core_wr_ctx[N]),
        .net_inj_valid(net_inj_valid[N]), .net_inj_flit(net_inj_flit[N]),
        .net_inj_cr(net_inj_cr[N]),
        .net_ej_valid(net_ej_valid[N]), .net_ej_flit(net_ej_flit[N]),
        .net_ej_cr(net_ej_cr[N]),
        .evt_load_native(evt_load_native[N]), .evt_load_guest(evt_load_guest[N]),
        .evt_evict(evt_evict[N]), .evt_migrate(evt_migrate[N]),
        .evt_blocked(evt_blocked[N])
      );

      for (genvar k = 0; k < NNET; k++) begin : g_net
        for (genvar d = 0; d < 4; d++) begin : g_dir
          // neighbour on side d (0 N, 1 E, 2 S, 3 W), or -1 off the array
          localparam int NB  = (d == 0) ? ((y + 1 < TILES_Y) ? N + TILES_X : -1) :
                               (d == 1) ? ((x + 1 < TILES_X) ? N + 1       : -1) :
                               (d == 2) ? ((y > 0)           ? N - TILES_X : -1) :
                                          ((x > 0)           ? N - 1       : -1);
          localparam int OPP = (d + 2) % 4;
          if (NB >= 0) begin : g_link
            assign li_valid[N][k][d]    = lo_valid[NB][k][OPP];
            assign li_flit[N][k][d]     = lo_flit[NB][k][OPP];
            assign li_cr_valid[N][k][d] = lo_cr_valid[NB][k][OPP];
            assign li_cr_vc[N][k][d]    = lo_cr_vc[NB][k][OPP];
          end else begin : g_edge
            assign li_valid[N][k][d]    = 1'b0;
            assign li_flit[N][k][d]     = '0;
            assign li_cr_valid[N][k][d] = 1'b0;
            assign li_cr_vc[N][k][d]    = '0;
          end
        end
      end
    end
  end

endmodule
