// em2_tile: network part of one tile of the EM2 execution-migration
// processor.
//
// A tile holds a core with two hardware contexts (one native, one guest),
// caches, a migration predictor and six on-chip network routers, one per
// physically separate network. This module contains the six routers and the
// ENC migration controller; the core, caches and predictor are outside and
// meet it through the ports below.
//
// Networks (index k): 0 migration, 1 eviction, 2 remote-access request,
// 3 remote-access reply, 4 memory request, 5 memory reply. Every network is a
// 2D mesh with one virtual channel, DEPTH-flit input buffers and
// dimension-ordered YX routing, one cycle per hop. Networks 0 and 1 end in
// enc_ctrl; the local ports of networks 2..5 are ports of the tile (net_*).
//
// Mesh links use index d = 0 north, 1 east, 2 south, 3 west. Everything that
// leaves the tile (lo_* flits and lo_cr_* credits) passes a negative-edge
// retiming flop against inter-tile hold violations; inputs (li_*) are taken
// as they arrive.
//
// Six separate networks, DOR-YX, the two-context core and the negative-edge
// flops follow the EM2 description. Which traffic goes on which network, the
// buffer depth and the context size are this design's choices.
module em2_tile
  import noc_pkg::*;
#(
  parameter int DEPTH     = 4,
  parameter int CTX_FLITS = 4,
  parameter int NNET      = 6,
  localparam int NS       = 2,
  localparam int CTX_W    = CTX_FLITS * DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           my_x,
  input  coord_t           my_y,
  // mesh links of all networks
  input  logic             li_valid    [NNET][4],
  input  flit_t            li_flit     [NNET][4],
  output logic             lo_cr_valid [NNET][4],
  output logic [VC_W-1:0]  lo_cr_vc    [NNET][4],
  output logic             lo_valid    [NNET][4],
  output flit_t            lo_flit     [NNET][4],
  input  logic             li_cr_valid [NNET][4],
  input  logic [VC_W-1:0]  li_cr_vc    [NNET][4],
  // core contexts (ENC)
  output logic             slot_valid   [NS],
  output coord_t           slot_nx      [NS],
  output coord_t           slot_ny      [NS],
  output logic [CTX_W-1:0] slot_ctx     [NS],
  input  logic             core_progress[NS],
  input  logic             core_mig_req [NS],
  input  coord_t           core_mig_dx  [NS],
  input  coord_t           core_mig_dy  [NS],
  input  logic             core_wr      [NS],
  input  logic [CTX_W-1:0] core_wr_ctx  [NS],
  // local ports of networks 2..NNET-1
  input  logic             net_inj_valid[NNET-2],
  input  flit_t            net_inj_flit [NNET-2],
  output logic             net_inj_cr   [NNET-2],
  output logic             net_ej_valid [NNET-2],
  output flit_t            net_ej_flit  [NNET-2],
  input  logic             net_ej_cr    [NNET-2],
  // ENC events
  output logic             evt_load_native,
  output logic             evt_load_guest,
  output logic             evt_evict,
  output logic             evt_migrate,
  output logic             evt_blocked
);
  logic            r_in_valid [NNET][NPORT];
  flit_t           r_in_flit  [NNET][NPORT];
  logic            r_cro_valid[NNET][NPORT];
  logic [VC_W-1:0] r_cro_vc   [NNET][NPORT];
  logic            r_out_valid[NNET][NPORT];
  flit_t           r_out_flit [NNET][NPORT];
  logic            r_cri_valid[NNET][NPORT];
  logic [VC_W-1:0] r_cri_vc   [NNET][NPORT];

  logic            enc_inj_valid[2];
  flit_t           enc_inj_flit [2];
  logic            enc_ej_cr    [2];

  for (genvar k = 0; k < NNET; k++) begin : g_net
    vc_router #(
      .NVC(1), .DEPTH(DEPTH), .LOCAL_CREDITS(k < 2 ? CTX_FLITS : DEPTH),
      .ROUTING(RT_DOR_YX), .PROM_MODE(PROM_UNIFORM), .NNODES(110)
    ) u_router (
      .clk, .rst_n, .my_x, .my_y,
      .in_valid    (r_in_valid[k]),
      .in_flit     (r_in_flit[k]),
      .cr_out_valid(r_cro_valid[k]),
      .cr_out_vc   (r_cro_vc[k]),
      .out_valid   (r_out_valid[k]),
      .out_flit    (r_out_flit[k]),
      .cr_in_valid (r_cri_valid[k]),
      .cr_in_vc    (r_cri_vc[k])
    );

    for (genvar d = 0; d < 4; d++) begin : g_dir
      assign r_in_valid[k][d+1]  = li_valid[k][d];
      assign r_in_flit[k][d+1]   = li_flit[k][d];
      assign r_cri_valid[k][d+1] = li_cr_valid[k][d];
      assign r_cri_vc[k][d+1]    = li_cr_vc[k][d];

      negedge_retimer #(.W(1 + $bits(flit_t) + 1 + VC_W)) u_retime (
        .clk, .rst_n,
        .d({r_out_valid[k][d+1], r_out_flit[k][d+1], r_cro_valid[k][d+1], r_cro_vc[k][d+1]}),
        .q({lo_valid[k][d], lo_flit[k][d], lo_cr_valid[k][d], lo_cr_vc[k][d]})
      );
    end

    if (k < 2) begin : g_enc_port
      assign r_in_valid[k][0]  = enc_inj_valid[k];
      assign r_in_flit[k][0]   = enc_inj_flit[k];
      assign r_cri_valid[k][0] = enc_ej_cr[k];
      assign r_cri_vc[k][0]    = '0;
    end else begin : g_core_port
      assign r_in_valid[k][0]  = net_inj_valid[k-2];
      assign r_in_flit[k][0]   = net_inj_flit[k-2];
      assign net_inj_cr[k-2]   = r_cro_valid[k][0];
      assign net_ej_valid[k-2] = r_out_valid[k][0];
      assign net_ej_flit[k-2]  = r_out_flit[k][0];
      assign r_cri_valid[k][0] = net_ej_cr[k-2];
      assign r_cri_vc[k][0]    = '0;
    end
  end

  enc_ctrl #(.CTX_FLITS(CTX_FLITS), .NGUEST(1), .DEPTH(DEPTH)) u_enc (
    .clk, .rst_n, .my_x, .my_y,
    .slot_valid, .slot_nx, .slot_ny, .slot_ctx,
    .core_progress, .core_mig_req, .core_mig_dx, .core_mig_dy, .core_wr, .core_wr_ctx,
    .mig_inj_valid(enc_inj_valid[0]),
    .mig_inj_flit (enc_inj_flit[0]),
    .mig_inj_cr   (r_cro_valid[0][0]),
    .mig_ej_valid (r_out_valid[0][0]),
    .mig_ej_flit  (r_out_flit[0][0]),
    .mig_ej_cr    (enc_ej_cr[0]),
    .ev_inj_valid (enc_inj_valid[1]),
    .ev_inj_flit  (enc_inj_flit[1]),
    .ev_inj_cr    (r_cro_valid[1][0]),
    .ev_ej_valid  (r_out_valid[1][0]),
    .ev_ej_flit   (r_out_flit[1][0]),
    .ev_ej_cr     (enc_ej_cr[1]),
    .evt_load_native, .evt_load_guest, .evt_evict, .evt_migrate, .evt_blocked
  );

endmodule
