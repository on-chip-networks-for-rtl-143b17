// vc_router: five-port virtual-channel wormhole router for a 2D mesh
// (the conventional input-buffered design, used by every network here).
//
// Ports 0..4 are local, north, east, south, west. Each input has NVC virtual
// channel buffers of DEPTH flits. The router performs the four classic steps:
//  RC  route computation for the head flit at the front of a VC buffer
//      (prom_route: DOR-XY, DOR-YX or one of the PROM variants). The result is
//      latched the first cycle it is computed, so a PROM draw is made once per
//      packet per hop.
//  VA  per output port, a round-robin arbiter picks one head flit among those
//      routed there that still need a downstream VC and have a free one in
//      their allowed set; the lowest free VC of that set is granted. The VC
//      stays allocated to the packet until its tail leaves.
//  SA  separable allocation: per input port a round-robin arbiter picks one
//      VC that holds a downstream VC and at least one credit, then per output
//      port a round-robin arbiter picks one of those inputs.
//  ST  the winning flit goes through the crossbar to the output link, its vc
//      field rewritten to the allocated downstream VC.
// RC, VA, SA and ST all happen in the cycle the flit is at the front of its
// buffer, so a flit written into a buffer at one clock edge can be in the next
// router's buffer at the following edge: one cycle per hop, as in the
// evaluated networks.
//
// Flow control is credit based, one credit per flit per VC. A popped flit
// returns a credit upstream in the same cycle (cr_out_*); credits coming back
// from downstream (cr_in_*) are counted per output VC. Output credit counters
// start at DEPTH, except the local (ejection) port which starts at
// LOCAL_CREDITS so the attached sink can have a different buffer size.
// my_x/my_y are inputs rather than parameters so that all routers of a mesh
// share one module; they also seed the random source.
//
// The steps, the per-VC buffers and the VC-exclusive allocation follow the
// router description; the single-cycle organisation, the separable allocator,
// round-robin arbitration and lowest-free-VC choice are this design's own.
module vc_router
  import noc_pkg::*;
#(
  parameter int         NVC           = 8,
  parameter int         DEPTH         = 8,
  parameter int         LOCAL_CREDITS = 8,
  parameter routing_e   ROUTING       = RT_PROM,
  parameter prom_mode_e PROM_MODE     = PROM_V,
  parameter int         F             = 1,
  parameter int         FMAX          = 1024,
  parameter int         NNODES        = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  coord_t          my_x,
  input  coord_t          my_y,
  // flits arriving on each input port
  input  logic            in_valid    [NPORT],
  input  flit_t           in_flit     [NPORT],
  // credits returned to the upstream router of each input port
  output logic            cr_out_valid[NPORT],
  output logic [VC_W-1:0] cr_out_vc   [NPORT],
  // flits leaving on each output port
  output logic            out_valid   [NPORT],
  output flit_t           out_flit    [NPORT],
  // credits from the downstream router of each output port
  input  logic            cr_in_valid [NPORT],
  input  logic [VC_W-1:0] cr_in_vc    [NPORT]
);
  localparam int NIN = NPORT * NVC;
  localparam int VIW = $clog2(NVC > 1 ? NVC : 2);
  localparam int PIW = $clog2(NPORT);
  localparam int QIW = $clog2(NIN);
  localparam int CW  = $clog2((DEPTH > LOCAL_CREDITS ? DEPTH : LOCAL_CREDITS) + 1);

  // ---------------- input buffers ----------------
  flit_t          front    [NPORT][NVC];
  logic           empty    [NPORT][NVC];
  logic           full     [NPORT][NVC];
  logic           pop      [NPORT][NVC];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      flit_fifo #(.DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .push (in_valid[p] && int'(in_flit[p].vc) == v),
        .din  (in_flit[p]),
        .pop  (pop[p][v]),
        .front(front[p][v]),
        .empty(empty[p][v]),
        .full (full[p][v])
      );
    end
  end

  // ---------------- random source ----------------
  logic [31:0] rnd;
  prng u_prng (
    .clk, .rst_n,
    .seed({my_x, my_y, 8'h9e, my_y, my_x, 8'h37}),
    .rnd
  );

  // ---------------- per-VC state ----------------
  logic            rt_valid [NPORT][NVC];
  port_e           rt_port  [NPORT][NVC];
  logic [NVC-1:0]  rt_mask  [NPORT][NVC];
  logic            va_valid [NPORT][NVC];
  logic [VIW-1:0]  va_vc    [NPORT][NVC];
  logic [NVC-1:0]  ovc_busy [NPORT];
  logic [CW-1:0]   cred     [NPORT][NVC];

  // ---------------- RC ----------------
  port_e          rc_port  [NPORT][NVC];
  logic [NVC-1:0] rc_mask  [NPORT][NVC];
  port_e          eff_port [NPORT][NVC];
  logic [NVC-1:0] eff_mask [NPORT][NVC];

  for (genvar p = 0; p < NPORT; p++) begin : g_rc
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      localparam int ROT = (p * NVC + v) * 5 % 32;
      logic [31:0] rrot;
      assign rrot = (rnd >> ROT) | (rnd << (32 - ROT));
      prom_route #(
        .ROUTING(ROUTING), .PROM_MODE(PROM_MODE), .F(F), .FMAX(FMAX),
        .NNODES(NNODES), .NVC(NVC)
      ) u_rc (
        .cur_x  (my_x),
        .cur_y  (my_y),
        .dst_x  (front[p][v].dx),
        .dst_y  (front[p][v].dy),
        .src_x  (front[p][v].sx),
        .src_y  (front[p][v].sy),
        .in_port(port_e'(p)),
        .in_vc  (VC_W'(v)),
        .rnd    (rrot[15:0]),
        .out_port(rc_port[p][v]),
        .vc_mask (rc_mask[p][v])
      );
      assign eff_port[p][v] = rt_valid[p][v] ? rt_port[p][v] : rc_port[p][v];
      assign eff_mask[p][v] = rt_valid[p][v] ? rt_mask[p][v] : rc_mask[p][v];
    end
  end

  // ---------------- VA ----------------
  logic [NIN-1:0] va_req     [NPORT];
  logic [NIN-1:0] va_gnt     [NPORT];
  logic [QIW-1:0] va_gnt_idx [NPORT];
  logic           va_any     [NPORT];
  logic           va_ok      [NPORT];
  logic [VIW-1:0] va_new_vc  [NPORT];
  logic           alloc_now  [NPORT][NVC];
  logic [VIW-1:0] alloc_vc   [NPORT][NVC];

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      va_req[o] = '0;
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NVC; v++)
          va_req[o][p*NVC+v] = !empty[p][v] && front[p][v].head && !va_valid[p][v] &&
                               int'(eff_port[p][v]) == o &&
                               ((~ovc_busy[o] & eff_mask[p][v]) != '0);
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_va
    rr_arbiter #(.N(NIN)) u_va_arb (
      .clk, .rst_n,
      .req      (va_req[o]),
      .advance  (1'b1),
      .grant    (va_gnt[o]),
      .grant_idx(va_gnt_idx[o]),
      .any      (va_any[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) begin
        alloc_now[p][v] = 1'b0;
        alloc_vc[p][v]  = '0;
      end
    for (int o = 0; o < NPORT; o++) begin
      logic [NVC-1:0] freev;
      int wp, wv;
      wp = int'(va_gnt_idx[o]) / NVC;
      wv = int'(va_gnt_idx[o]) % NVC;
      freev        = ~ovc_busy[o] & eff_mask[wp][wv];
      va_ok[o]     = 1'b0;
      va_new_vc[o] = '0;
      for (int w = NVC - 1; w >= 0; w--)
        if (freev[w]) begin
          va_ok[o]     = va_any[o];
          va_new_vc[o] = VIW'(w);
        end
      if (va_ok[o]) begin
        alloc_now[wp][wv] = 1'b1;
        alloc_vc[wp][wv]  = va_new_vc[o];
      end
    end
  end

  // ---------------- SA ----------------
  logic           has_vc  [NPORT][NVC];
  logic [VIW-1:0] cur_ovc [NPORT][NVC];
  logic [NVC-1:0] sa1_req [NPORT];
  logic [NVC-1:0] sa1_gnt [NPORT];
  logic [VIW-1:0] sa1_idx [NPORT];
  logic           sa1_any [NPORT];
  logic [NPORT-1:0] sa2_req [NPORT];
  logic [NPORT-1:0] sa2_gnt [NPORT];
  logic [PIW-1:0]   sa2_idx [NPORT];
  logic             sa2_any [NPORT];
  logic [NPORT-1:0] in_won;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      sa1_req[p] = '0;
      for (int v = 0; v < NVC; v++) begin
        has_vc[p][v]  = va_valid[p][v] || alloc_now[p][v];
        cur_ovc[p][v] = va_valid[p][v] ? va_vc[p][v] : alloc_vc[p][v];
        sa1_req[p][v] = !empty[p][v] && has_vc[p][v] &&
                        cred[int'(eff_port[p][v])][int'(cur_ovc[p][v])] != '0;
      end
    end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_sa1
    rr_arbiter #(.N(NVC)) u_sa1 (
      .clk, .rst_n,
      .req      (sa1_req[p]),
      .advance  (in_won[p]),
      .grant    (sa1_gnt[p]),
      .grant_idx(sa1_idx[p]),
      .any      (sa1_any[p])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      sa2_req[o] = '0;
      for (int p = 0; p < NPORT; p++)
        sa2_req[o][p] = sa1_any[p] && int'(eff_port[p][int'(sa1_idx[p])]) == o;
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_sa2
    rr_arbiter #(.N(NPORT)) u_sa2 (
      .clk, .rst_n,
      .req      (sa2_req[o]),
      .advance  (1'b1),
      .grant    (sa2_gnt[o]),
      .grant_idx(sa2_idx[o]),
      .any      (sa2_any[o])
    );
  end

  // ---------------- ST ----------------
  always_comb begin
    in_won = '0;
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        pop[p][v] = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      int wp, wv;
      wp = int'(sa2_idx[o]);
      wv = int'(sa1_idx[wp]);
      out_valid[o] = sa2_any[o];
      out_flit[o]  = front[wp][wv];
      out_flit[o].vc = VC_W'(cur_ovc[wp][wv]);
      if (sa2_any[o]) begin
        pop[wp][wv] = 1'b1;
        in_won[wp]  = 1'b1;
      end
    end
    for (int p = 0; p < NPORT; p++) begin
      cr_out_valid[p] = in_won[p];
      cr_out_vc[p]    = VC_W'(sa1_idx[p]);
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        ovc_busy[p] <= '0;
        for (int v = 0; v < NVC; v++) begin
          rt_valid[p][v] <= 1'b0;
          rt_port[p][v]  <= P_LOCAL;
          rt_mask[p][v]  <= '0;
          va_valid[p][v] <= 1'b0;
          va_vc[p][v]    <= '0;
          cred[p][v]     <= (p == 0) ? CW'(LOCAL_CREDITS) : CW'(DEPTH);
        end
      end
    end else begin
      // RC latch and VA grant
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NVC; v++) begin
          if (!empty[p][v] && front[p][v].head && !rt_valid[p][v] && !va_valid[p][v]) begin
            rt_valid[p][v] <= 1'b1;
            rt_port[p][v]  <= rc_port[p][v];
            rt_mask[p][v]  <= rc_mask[p][v];
          end
          if (alloc_now[p][v]) begin
            va_valid[p][v] <= 1'b1;
            va_vc[p][v]    <= alloc_vc[p][v];
          end
        end
      for (int o = 0; o < NPORT; o++)
        if (va_ok[o]) ovc_busy[o][int'(va_new_vc[o])] <= 1'b1;
      // tail leaves: release route and downstream VC
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NVC; v++)
          if (pop[p][v] && front[p][v].tail) begin
            rt_valid[p][v] <= 1'b0;
            va_valid[p][v] <= 1'b0;
            ovc_busy[int'(eff_port[p][v])][int'(cur_ovc[p][v])] <= 1'b0;
          end
      // credits
      for (int o = 0; o < NPORT; o++)
        for (int w = 0; w < NVC; w++) begin
          logic dec, inc;
          dec = out_valid[o] && int'(out_flit[o].vc) == w;
          inc = cr_in_valid[o] && int'(cr_in_vc[o]) == w;
          cred[o][w] <= cred[o][w] - CW'(dec) + CW'(inc);
        end
    end
  end

  // A flit may only be sent with a credit in hand.
  for (genvar o = 0; o < NPORT; o++) begin : g_chk
    a_credit: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> cred[o][int'(out_flit[o].vc)] != '0);
  end

endmodule
