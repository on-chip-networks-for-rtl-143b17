// onchip_top: the three on-chip network designs side by side.
//
//  * EM2 interconnect (em2_chip): 110 tiles in an 11 x 10 array, six
//    separate DOR-YX mesh networks, ENC thread migration between the tiles'
//    native and guest contexts. Its clock comes from em2_clock_sel, which
//    picks the single-ended, differential or PLL clock input.
//  * PROM network (noc_mesh): 8 x 8 mesh of 8-VC routers with 8-flit VC
//    buffers, routed by variable parametrized PROM (fmax = 1024) with the
//    east/west virtual-channel sets.
//  * BAN link bundle (ban_link): four bidirectional links between two
//    nodes, directed every cycle by the pressure-driven bandwidth arbiter.
// The PROM mesh and the BAN bundle run on `clk`. All three bring their
// node-side interfaces out unchanged; see the modules for their protocols.
// The BAN bundle also shows its link directions (`ban_dir`), the number of
// links pointing from A to B and the two pressures the arbiter compares.
// The cores, caches, migration predictor, PLL and pads of the EM2 chip are
// not included: their ports here are the context, migration and network
// interfaces those parts would use. Placing the three designs side by side
// with separate ports is this design's choice.
module onchip_top
  import noc_pkg::*;
#(
  localparam int EM2_NT   = 110,
  localparam int EM2_NS   = 2,
  localparam int EM2_CTXW = 4 * DATA_W,
  localparam int PROM_NN  = 64,
  localparam int BAN_NVC  = 4,
  localparam int BAN_NL   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---------------- EM2 ----------------
  input  logic             em2_clk_se,
  input  logic             em2_clk_diff,
  input  logic             em2_clk_pll,
  input  logic [1:0]       em2_clk_sel,
  output logic             em2_clk,
  input  logic             em2_rst_n,
  output logic             em2_slot_valid   [EM2_NT][EM2_NS],
  output coord_t           em2_slot_nx      [EM2_NT][EM2_NS],
  output coord_t           em2_slot_ny      [EM2_NT][EM2_NS],
  output logic [EM2_CTXW-1:0] em2_slot_ctx  [EM2_NT][EM2_NS],
  input  logic             em2_core_progress[EM2_NT][EM2_NS],
  input  logic             em2_core_mig_req [EM2_NT][EM2_NS],
  input  coord_t           em2_core_mig_dx  [EM2_NT][EM2_NS],
  input  coord_t           em2_core_mig_dy  [EM2_NT][EM2_NS],
  input  logic             em2_core_wr      [EM2_NT][EM2_NS],
  input  logic [EM2_CTXW-1:0] em2_core_wr_ctx [EM2_NT][EM2_NS],
  input  logic             em2_net_inj_valid[EM2_NT][4],
  input  flit_t            em2_net_inj_flit [EM2_NT][4],
  output logic             em2_net_inj_cr   [EM2_NT][4],
  output logic             em2_net_ej_valid [EM2_NT][4],
  output flit_t            em2_net_ej_flit  [EM2_NT][4],
  input  logic             em2_net_ej_cr    [EM2_NT][4],
  output logic             em2_evt_load_native[EM2_NT],
  output logic             em2_evt_load_guest [EM2_NT],
  output logic             em2_evt_evict      [EM2_NT],
  output logic             em2_evt_migrate    [EM2_NT],
  output logic             em2_evt_blocked    [EM2_NT],
  // ---------------- PROM mesh ----------------
  input  logic             prom_inj_valid  [PROM_NN],
  input  flit_t            prom_inj_flit   [PROM_NN],
  output logic             prom_inj_cr_valid[PROM_NN],
  output logic [VC_W-1:0]  prom_inj_cr_vc  [PROM_NN],
  output logic             prom_ej_valid   [PROM_NN],
  output flit_t            prom_ej_flit    [PROM_NN],
  input  logic             prom_ej_cr_valid[PROM_NN],
  input  logic [VC_W-1:0]  prom_ej_cr_vc   [PROM_NN],
  // ---------------- BAN link bundle ----------------
  input  logic             ban_a_head_valid[BAN_NVC],
  input  flit_t            ban_a_head_flit [BAN_NVC],
  output logic             ban_a_pop       [BAN_NVC],
  input  logic             ban_a_space     [BAN_NVC],
  output logic             ban_a_rx_valid  [BAN_NVC],
  output flit_t            ban_a_rx_flit   [BAN_NVC],
  input  logic             ban_b_head_valid[BAN_NVC],
  input  flit_t            ban_b_head_flit [BAN_NVC],
  output logic             ban_b_pop       [BAN_NVC],
  input  logic             ban_b_space     [BAN_NVC],
  output logic             ban_b_rx_valid  [BAN_NVC],
  output flit_t            ban_b_rx_flit   [BAN_NVC],
  output logic [BAN_NL-1:0] ban_dir,
  output logic [2:0]       ban_n_ab,
  output logic [2:0]       ban_press_a,
  output logic [2:0]       ban_press_b
);

  em2_clock_sel u_em2_clk (
    .rst_n   (em2_rst_n),
    .clk_se  (em2_clk_se),
    .clk_diff(em2_clk_diff),
    .clk_pll (em2_clk_pll),
    .sel     (em2_clk_sel),
    .clk_out (em2_clk)
  );

  em2_chip u_em2 (
    .clk(em2_clk), .rst_n(em2_rst_n),
    .slot_valid(em2_slot_valid), .slot_nx(em2_slot_nx), .slot_ny(em2_slot_ny),
    .slot_ctx(em2_slot_ctx),
    .core_progress(em2_core_progress), .core_mig_req(em2_core_mig_req),
    .core_mig_dx(em2_core_mig_dx), .core_mig_dy(em2_core_mig_dy),
    .core_wr(em2_core_wr), .core_wr_ctx(em2_core_wr_ctx),
    .net_inj_valid(em2_net_inj_valid), .net_inj_flit(em2_net_inj_flit),
    .net_inj_cr(em2_net_inj_cr),
    .net_ej_valid(em2_net_ej_valid), .net_ej_flit(em2_net_ej_flit),
    .net_ej_cr(em2_net_ej_cr),
    .evt_load_native(em2_evt_load_native), .evt_load_guest(em2_evt_load_guest),
    .evt_evict(em2_evt_evict), .evt_migrate(em2_evt_migrate),
    .evt_blocked(em2_evt_blocked)
  );

  noc_mesh u_prom (
    .clk, .rst_n,
    .inj_valid(prom_inj_valid), .inj_flit(prom_inj_flit),
    .inj_cr_valid(prom_inj_cr_valid), .inj_cr_vc(prom_inj_cr_vc),
    .ej_valid(prom_ej_valid), .ej_flit(prom_ej_flit),
    .ej_cr_valid(prom_ej_cr_valid), .ej_cr_vc(prom_ej_cr_vc)
  );


  ban_link u_ban (
    .clk, .rst_n,
    .a_head_valid(ban_a_head_valid), .a_head_flit(ban_a_head_flit), .a_pop(ban_a_pop),
    .a_space(ban_a_space), .a_rx_valid(ban_a_rx_valid), .a_rx_flit(ban_a_rx_flit),
    .b_head_valid(ban_b_head_valid), .b_head_flit(ban_b_head_flit), .b_pop(ban_b_pop),
    .b_space(ban_b_space), .b_rx_valid(ban_b_rx_valid), .b_rx_flit(ban_b_rx_flit),
    .dir(ban_dir), .n_ab(ban_n_ab), .press_a(ban_press_a), .press_b(ban_press_b)
  );

endmodule
