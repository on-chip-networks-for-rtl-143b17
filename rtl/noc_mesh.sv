// noc_mesh: MESH_W x MESH_H two-dimensional mesh of vc_router instances.
//
// Node n = y * MESH_W + x sits at column x (growing east) and row y (growing
// north). Neighbouring routers are joined by one flit link and one credit
// return path in each direction; links that would leave the mesh are tied off
// (minimal routing never uses them). The local port of each router is brought
// out as the node's injection (inj_*) and ejection (ej_*) interface:
//  * inj_valid/inj_flit enter the local input buffers; the flit's vc field
//    picks the buffer, and inj_cr_* return a credit per flit read out of it
//    (a source starts with DEPTH credits per VC).
//  * ej_valid/ej_flit deliver flits to the node; the node returns one credit
//    per consumed flit on ej_cr_*; the router starts with LOCAL_CREDITS.
// Defaults are the PROM evaluation network: 8x8 mesh, 8 VCs per port,
// 8 flits per VC, PROMV routing with fmax = 1024. The node numbering and
// the credit handshake at the local ports are this design's choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int         MESH_W        = 8,
  parameter int         MESH_H        = 8,
  parameter int         NVC           = 8,
  parameter int         DEPTH         = 8,
  parameter int         LOCAL_CREDITS = 8,
  parameter routing_e   ROUTING       = RT_PROM,
  parameter prom_mode_e PROM_MODE     = PROM_V,
  parameter int         F             = 1,
  parameter int         FMAX          = 1024,
  localparam int        NN            = MESH_W * MESH_H
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inj_valid  [NN],
  input  flit_t           inj_flit   [NN],
  output logic            inj_cr_valid[NN],
  output logic [VC_W-1:0] inj_cr_vc  [NN],
  output logic            ej_valid   [NN],
  output flit_t           ej_flit    [NN],
  input  logic            ej_cr_valid[NN],
  input  logic [VC_W-1:0] ej_cr_vc   [NN]
);
  logic            r_in_valid [NN][NPORT];
  flit_t           r_in_flit  [NN][NPORT];
  logic            r_cro_valid[NN][NPORT];
  logic [VC_W-1:0] r_cro_vc   [NN][NPORT];
  logic            r_out_valid[NN][NPORT];
  flit_t           r_out_flit [NN][NPORT];
  logic            r_cri_valid[NN][NPORT];
  logic [VC_W-1:0] r_cri_vc   [NN][NPORT];

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int N = y * MESH_W + x;

      vc_router #(
        .NVC(NVC), .DEPTH(DEPTH), .LOCAL_CREDITS(LOCAL_CREDITS),
        .ROUTING(ROUTING), .PROM_MODE(PROM_MODE), .F(F), .FMAX(FMAX), .NNODES(NN)
      ) u_router (
        .clk, .rst_n,
        .my_x        (coord_t'(x)),
        .my_y        (coord_t'(y)),
        .in_valid    (r_in_valid[N]),
        .in_flit     (r_in_flit[N]),
        .cr_out_valid(r_cro_valid[N]),
        .cr_out_vc   (r_cro_vc[N]),
        .out_valid   (r_out_valid[N]),
        .out_flit    (r_out_flit[N]),
        .cr_in_valid (r_cri_valid[N]),
        .cr_in_vc    (r_cri_vc[N])
      );

      // local port
      assign r_in_valid[N][0]  = inj_valid[N];
      assign r_in_flit[N][0]   = inj_flit[N];
      assign inj_cr_valid[N]   = r_cro_valid[N][0];
      assign inj_cr_vc[N]      = r_cro_vc[N][0];
      assign ej_valid[N]       = r_out_valid[N][0];
      assign ej_flit[N]        = r_out_flit[N][0];
      assign r_cri_valid[N][0] = ej_cr_valid[N];
      assign r_cri_vc[N][0]    = ej_cr_vc[N];

      // mesh ports: input P comes from the neighbour's opposite output
      for (genvar pt = 1; pt < NPORT; pt++) begin : g_pt
        // neighbour on this side, or -1 off the mesh
        localparam int NB  = (pt == 1) ? ((y + 1 < MESH_H) ? N + MESH_W : -1) :
                             (pt == 2) ? ((x + 1 < MESH_W) ? N + 1      : -1) :
                             (pt == 3) ? ((y > 0)          ? N - MESH_W : -1) :
                                         ((x > 0)          ? N - 1      : -1);
        localparam int OPP = (pt + 1) % 4 + 1;   // 1<->3, 2<->4
        if (NB >= 0) begin : g_link
          assign r_in_valid[N][pt]  = r_out_valid[NB][OPP];
          assign r_in_flit[N][pt]   = r_out_flit[NB][OPP];
          assign r_cri_valid[N][pt] = r_cro_valid[NB][OPP];
          assign r_cri_vc[N][pt]    = r_cro_vc[NB][OPP];
        end else begin : g_edge
          assign r_in_valid[N][pt]  = 1'b0;
          assign r_in_flit[N][pt]   = '0;
          assign r_cri_valid[N][pt] = 1'b0;
          assign r_cri_vc[N][pt]    = '0;
        end
      end
    end
  end

  a_no_edge_exit: assert property (@(posedge clk) disable iff (!rst_n)
    r_out_valid[0][P_WEST] == 1'b0 && r_out_valid[0][P_SOUTH] == 1'b0);

endmodule
