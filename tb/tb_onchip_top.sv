// tb_onchip_top: end-to-end test of the whole design at its full size
// (11 x 10 EM2 array, 8 x 8 PROM mesh, 4-link BAN bundle), no parameters
// changed.
//
// EM2: every tile runs a behavioural two-context core (tb_em2_core_model).
// The EM2 clock starts on the single-ended input and is switched to the PLL
// input part way through; the output clock period is measured before and
// after. Threads migrate to random tiles for MIG_CYCLES cycles, while the
// four other networks carry random two-flit packets; then everything drains
// and each of the 110 threads must sit in exactly one context (its native
// thread only in the native slot) with a load count matching the loads the
// controllers reported, and every network packet must have arrived.
//
// PROM: every node sends packets under the transpose and bit-complement
// permutations, then 40 packets go from (0,0) to (7,7); every flit is checked
// for destination, order and payload, and the (0,0) router must send some of
// those packets east first and some north first.
//
// BAN: first A->B traffic only, where all four links must end up pointing
// A->B, then traffic both ways, where each side must keep at least one link;
// every flit is checked.
//
// Mechanisms counted (a failure if any count is zero): migrations, guest and
// native loads, evictions, blocked arrivals, clock switch, PROM east-first
// and north-first choices, BAN direction changes.
module tb_onchip_top;
  import noc_pkg::*;
  import tb_traffic_pkg::*;

  localparam int EM2_NT = 110, EM2_NS = 2, EM2_CTXW = 4 * DATA_W, TX = 11, TY = 10;
  localparam int PROM_NN = 64, PW = 8, NVC = 8, DEPTH = 8, PKT_LEN = 4, PKTS = 2;
  localparam int BAN_NVC = 4, BAN_NL = 4;
  localparam int MIG_CYCLES = 1500;

  // ---------------- clocks and resets ----------------
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic em2_clk_se = 0, em2_clk_diff = 0, em2_clk_pll = 0;
  always #5 em2_clk_se = ~em2_clk_se;      // 10 ns
  always #6 em2_clk_diff = ~em2_clk_diff;  // 12 ns
  always #4 em2_clk_pll = ~em2_clk_pll;    // 8 ns
  logic [1:0] em2_clk_sel = 2'd0;
  logic em2_clk, em2_rst_n = 0;

  // ---------------- DUT ports ----------------
  logic em2_slot_valid[EM2_NT][EM2_NS]; coord_t em2_slot_nx[EM2_NT][EM2_NS], em2_slot_ny[EM2_NT][EM2_NS];
  logic [EM2_CTXW-1:0] em2_slot_ctx[EM2_NT][EM2_NS];
  logic em2_core_progress[EM2_NT][EM2_NS], em2_core_mig_req[EM2_NT][EM2_NS], em2_core_wr[EM2_NT][EM2_NS];
  coord_t em2_core_mig_dx[EM2_NT][EM2_NS], em2_core_mig_dy[EM2_NT][EM2_NS];
  logic [EM2_CTXW-1:0] em2_core_wr_ctx[EM2_NT][EM2_NS];
  logic em2_net_inj_valid[EM2_NT][4], em2_net_inj_cr[EM2_NT][4], em2_net_ej_valid[EM2_NT][4], em2_net_ej_cr[EM2_NT][4];
  flit_t em2_net_inj_flit[EM2_NT][4], em2_net_ej_flit[EM2_NT][4];
  logic em2_evt_load_native[EM2_NT], em2_evt_load_guest[EM2_NT], em2_evt_evict[EM2_NT],
        em2_evt_migrate[EM2_NT], em2_evt_blocked[EM2_NT];

  logic prom_inj_valid[PROM_NN], prom_inj_cr_valid[PROM_NN], prom_ej_valid[PROM_NN], prom_ej_cr_valid[PROM_NN];
  flit_t prom_inj_flit[PROM_NN], prom_ej_flit[PROM_NN];
  logic [VC_W-1:0] prom_inj_cr_vc[PROM_NN], prom_ej_cr_vc[PROM_NN];

  logic ban_a_head_valid[BAN_NVC], ban_b_head_valid[BAN_NVC], ban_a_pop[BAN_NVC], ban_b_pop[BAN_NVC];
  flit_t ban_a_head_flit[BAN_NVC], ban_b_head_flit[BAN_NVC], ban_a_rx_flit[BAN_NVC], ban_b_rx_flit[BAN_NVC];
  logic ban_a_space[BAN_NVC], ban_b_space[BAN_NVC], ban_a_rx_valid[BAN_NVC], ban_b_rx_valid[BAN_NVC];
  logic [BAN_NL-1:0] ban_dir;
  logic [2:0] ban_n_ab, ban_press_a, ban_press_b;

  onchip_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // =====================================================================
  // EM2
  // =====================================================================
  logic mig_en = 0;
  for (genvar t = 0; t < EM2_NT; t++) begin : g_core
    tb_em2_core_model #(.TX(TX), .TY(TY)) u_core (
      .clk(em2_clk), .rst_n(em2_rst_n), .mig_en, .my_id(t),
      .slot_valid(em2_slot_valid[t]), .slot_ctx(em2_slot_ctx[t]),
      .core_progress(em2_core_progress[t]), .core_mig_req(em2_core_mig_req[t]),
      .core_mig_dx(em2_core_mig_dx[t]), .core_mig_dy(em2_core_mig_dy[t]),
      .core_wr(em2_core_wr[t]), .core_wr_ctx(em2_core_wr_ctx[t]));
  end

  int n_mig = 0, n_lg = 0, n_ln = 0, n_ev = 0, n_bl = 0;
  always @(posedge em2_clk) if (em2_rst_n)
    for (int t = 0; t < EM2_NT; t++) begin
      n_mig += em2_evt_migrate[t]; n_lg += em2_evt_load_guest[t]; n_ln += em2_evt_load_native[t];
      n_ev += em2_evt_evict[t]; n_bl += em2_evt_blocked[t];
    end

  // clock period measurement
  int em2_edges = 0;
  always @(posedge em2_clk) em2_edges++;

  // random packets on EM2 networks 2..5
  logic traf_en = 0;
  int cred[EM2_NT][4], fidx[EM2_NT][4], cdst[EM2_NT][4], seq[EM2_NT][4], rx_idx[EM2_NT][4];
  int net_sent = 0, net_recv = 0;
  always @(posedge em2_clk) begin
    for (int t = 0; t < EM2_NT; t++)
      for (int k = 0; k < 4; k++) begin
        em2_net_inj_valid[t][k] <= 1'b0;
        em2_net_ej_cr[t][k]     <= 1'b0;
        if (!em2_rst_n) begin
          cred[t][k] = 4; fidx[t][k] = 0; seq[t][k] = 0; rx_idx[t][k] = 0; cdst[t][k] = 0;
        end else begin
          if (em2_net_inj_cr[t][k]) cred[t][k]++;
          if (cred[t][k] > 0 && (fidx[t][k] > 0 || (traf_en && $urandom_range(31) == 0))) begin
            flit_t f;
            if (fidx[t][k] == 0) begin
              cdst[t][k] = int'($urandom_range(EM2_NT - 2));
              if (cdst[t][k] >= t) cdst[t][k]++;
            end
            f = '0;
            f.head = fidx[t][k] == 0; f.tail = fidx[t][k] == 1;
            f.dx = coord_t'(cdst[t][k] % TX); f.dy = coord_t'(cdst[t][k] / TX);
            f.sx = coord_t'(t % TX); f.sy = coord_t'(t / TX);
            f.data = DATA_W'((k << 28) | (t << 20) | ((seq[t][k] & 32'hffff) << 4) | fidx[t][k]);
            em2_net_inj_valid[t][k] <= 1'b1;
            em2_net_inj_flit[t][k]  <= f;
            cred[t][k]--;
            if (fidx[t][k] == 1) begin fidx[t][k] = 0; seq[t][k]++; net_sent++; end
            else fidx[t][k]++;
          end
          if (em2_net_ej_valid[t][k]) begin
            flit_t f;
            f = em2_net_ej_flit[t][k];
            em2_net_ej_cr[t][k] <= 1'b1;
            checks++;
            if (int'(f.dx) != t % TX || int'(f.dy) != t / TX || int'(f.data >> 28) != k ||
                int'(f.data & 15) != rx_idx[t][k] || f.head != (rx_idx[t][k] == 0)) begin
              failures++;
              $display("FAIL EM2 network %0d tile %0d flit %h", k + 2, t, f.data);
            end
            if (f.tail) begin rx_idx[t][k] = 0; net_recv++; end
            else rx_idx[t][k]++;
          end
        end
      end
  end

  // =====================================================================
  // PROM mesh
  // =====================================================================
  int src_cred[PROM_NN][NVC], src_flit[PROM_NN], src_vc[PROM_NN], src_seq[PROM_NN], src_cur_dst[PROM_NN];
  int src_dst[PROM_NN][$];
  int sent_pkts = 0, recv_pkts = 0;
  int snk_flit[PROM_NN][NVC], snk_src[PROM_NN][NVC], snk_seq[PROM_NN][NVC];

  always @(posedge clk) begin
    for (int n = 0; n < PROM_NN; n++) begin
      prom_inj_valid[n]   <= 1'b0;
      prom_ej_cr_valid[n] <= 1'b0;
      if (rst_n) begin
        if (prom_inj_cr_valid[n]) src_cred[n][prom_inj_cr_vc[n]]++;
        if (src_flit[n] == 0 && src_dst[n].size() > 0) src_cur_dst[n] = src_dst[n][0];
        if ((src_flit[n] > 0 || src_dst[n].size() > 0) && src_cred[n][src_vc[n]] > 0) begin
          flit_t f;
          f.head = src_flit[n] == 0;
          f.tail = src_flit[n] == PKT_LEN - 1;
          f.vc   = VC_W'(src_vc[n]);
          f.dx   = coord_t'(src_cur_dst[n] % PW);
          f.dy   = coord_t'(src_cur_dst[n] / PW);
          f.sx   = coord_t'(n % PW);
          f.sy   = coord_t'(n / PW);
          f.data = DATA_W'((n << 20) | ((src_seq[n] & 32'hffff) << 4) | src_flit[n]);
          prom_inj_valid[n] <= 1'b1;
          prom_inj_flit[n]  <= f;
          src_cred[n][src_vc[n]]--;
          if (src_flit[n] == 0) void'(src_dst[n].pop_front());
          if (src_flit[n] == PKT_LEN - 1) begin
            src_flit[n] = 0; src_seq[n]++; src_vc[n] = (src_vc[n] + 1) % NVC; sent_pkts++;
          end else src_flit[n]++;
        end
        if (prom_ej_valid[n]) begin
          flit_t f;
          int v, s, q, fi;
          f  = prom_ej_flit[n];
          v  = int'(f.vc);
          s  = int'(f.data >> 20);
          q  = int'((f.data >> 4) & 32'hffff);
          fi = int'(f.data & 32'hf);
          prom_ej_cr_valid[n] <= 1'b1;
          prom_ej_cr_vc[n]    <= f.vc;
          if (f.head) begin snk_src[n][v] = s; snk_seq[n][v] = q; end
          checks++;
          if (int'(f.dx) != n % PW || int'(f.dy) != n / PW || s != snk_src[n][v] ||
              q != snk_seq[n][v] || fi != snk_flit[n][v] || f.tail != (fi == PKT_LEN - 1)) begin
            failures++;
            $display("FAIL PROM node %0d vc %0d flit %h", n, v, f.data);
          end
          if (f.tail) begin snk_flit[n][v] = 0; recv_pkts++; end
          else snk_flit[n][v]++;
        end
      end
    end
  end

  int east0 = 0, north0 = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (dut.u_prom.r_out_valid[0][P_EAST] && dut.u_prom.r_out_flit[0][P_EAST].head &&
          dut.u_prom.r_out_flit[0][P_EAST].dx == 7 && dut.u_prom.r_out_flit[0][P_EAST].dy == 7) east0++;
      if (dut.u_prom.r_out_valid[0][P_NORTH] && dut.u_prom.r_out_flit[0][P_NORTH].head &&
          dut.u_prom.r_out_flit[0][P_NORTH].dx == 7 && dut.u_prom.r_out_flit[0][P_NORTH].dy == 7) north0++;
    end

  function automatic bit prom_pending();
    for (int n = 0; n < PROM_NN; n++)
      if (src_dst[n].size() > 0 || src_flit[n] != 0) return 1;
    return recv_pkts != sent_pkts;
  endfunction

  // =====================================================================
  // BAN bundle: receivers always have room; data = {side, vc, seq}
  // =====================================================================
  int aq[BAN_NVC][$], bq[BAN_NVC][$];
  int a_next[BAN_NVC], b_next[BAN_NVC];
  int ban_recv = 0, dir_changes = 0, all_ab_cycles = 0, min_links_b = 99;
  logic two_way = 0, both_wait = 0;
  logic [BAN_NL-1:0] dir_prev;

  always_comb
    for (int v = 0; v < BAN_NVC; v++) begin
      ban_a_head_valid[v] = aq[v].size() > 0;
      ban_b_head_valid[v] = bq[v].size() > 0;
      ban_a_head_flit[v] = '0;
      ban_b_head_flit[v] = '0;
      ban_a_head_flit[v].vc = VC_W'(v);
      ban_b_head_flit[v].vc = VC_W'(v);
      ban_a_head_flit[v].data = aq[v].size() > 0 ? DATA_W'(32'h1000_0000 | (v << 16) | aq[v][0]) : '0;
      ban_b_head_flit[v].data = bq[v].size() > 0 ? DATA_W'(32'h2000_0000 | (v << 16) | bq[v][0]) : '0;
      ban_a_space[v] = 1'b1;
      ban_b_space[v] = 1'b1;
    end

  always @(posedge clk) if (rst_n) begin
    dir_prev <= ban_dir;
    if (ban_dir != dir_prev) dir_changes++;
    if (ban_dir == '1) all_ab_cycles++;
    // the arbiter reacts one cycle after it sees the pressures
    both_wait <= two_way && ban_press_a > 0 && ban_press_b > 0;
    if (both_wait && ban_press_b > 0 && ($countones(~ban_dir) < min_links_b))
      min_links_b = $countones(~ban_dir);
    for (int v = 0; v < BAN_NVC; v++) begin
      if (ban_a_pop[v]) void'(aq[v].pop_front());
      if (ban_b_pop[v]) void'(bq[v].pop_front());
      if (ban_b_rx_valid[v]) begin
        checks++; ban_recv++;
        if (ban_b_rx_flit[v].data != DATA_W'(32'h1000_0000 | (v << 16) | b_next[v])) begin
          failures++; $display("FAIL BAN B vc%0d got %h", v, ban_b_rx_flit[v].data);
        end
        b_next[v]++;
      end
      if (ban_a_rx_valid[v]) begin
        checks++; ban_recv++;
        if (ban_a_rx_flit[v].data != DATA_W'(32'h2000_0000 | (v << 16) | a_next[v])) begin
          failures++; $display("FAIL BAN A vc%0d got %h", v, ban_a_rx_flit[v].data);
        end
        a_next[v]++;
      end
    end
  end

  // =====================================================================
  // sequence
  // =====================================================================
  int loads, seen[EM2_NT];
  time t0;
  int e0, period_se, period_pll;

  initial begin
    for (int n = 0; n < PROM_NN; n++) begin
      prom_inj_valid[n] = 0; prom_inj_flit[n] = '0; prom_ej_cr_valid[n] = 0; prom_ej_cr_vc[n] = '0;
      src_flit[n] = 0; src_vc[n] = 0; src_seq[n] = 0; src_cur_dst[n] = 0;
      for (int v = 0; v < NVC; v++) begin
        src_cred[n][v] = DEPTH; snk_flit[n][v] = 0; snk_src[n][v] = 0; snk_seq[n][v] = 0;
      end
    end
    for (int t = 0; t < EM2_NT; t++)
      for (int k = 0; k < 4; k++) begin
        em2_net_inj_valid[t][k] = 0; em2_net_inj_flit[t][k] = '0; em2_net_ej_cr[t][k] = 0;
      end
    for (int v = 0; v < BAN_NVC; v++) begin a_next[v] = 0; b_next[v] = 0; end
    dir_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; em2_rst_n = 1;
    mig_en = 1; traf_en = 1;

    // clock: measure single-ended period, switch to PLL, measure again
    repeat (10) @(posedge clk);
    e0 = em2_edges; t0 = $time; #1000;
    period_se = 1000 / (em2_edges - e0);
    em2_clk_sel = 2'd2;
    #100;
    e0 = em2_edges; #1000;
    period_pll = 1000 / (em2_edges - e0);
    check(period_se == 10, $sformatf("EM2 clock period %0d ns on the single-ended input, expected 10", period_se));
    check(period_pll == 8, $sformatf("EM2 clock period %0d ns after switching to the PLL, expected 8", period_pll));

    // PROM permutations and BAN one-way traffic run alongside the EM2 workload
    for (int v = 0; v < BAN_NVC; v++) for (int k = 0; k < 60; k++) aq[v].push_back(k);
    foreach (seen[i]) seen[i] = 0;
    for (int p = 0; p < 2; p++) begin
      for (int n = 0; n < PROM_NN; n++)
        for (int k = 0; k < PKTS; k++) begin
          int d;
          d = pattern_dest(p == 0 ? TP_TRANSPOSE : TP_BITCOMP, n, 6, PROM_NN);
          if (d != n) src_dst[n].push_back(d);
        end
      for (int i = 0; i < 3000 && prom_pending(); i++) @(posedge clk);
      check(!prom_pending(), $sformatf("PROM pattern %0d: sent %0d received %0d", p, sent_pkts, recv_pkts));
    end
    for (int k = 0; k < 40; k++) src_dst[0].push_back(63);
    for (int i = 0; i < 3000 && prom_pending(); i++) @(posedge clk);
    check(!prom_pending(), "PROM (0,0) to (7,7) packets not all delivered");

    check(all_ab_cycles > 0, "BAN never pointed all links A->B under one-way traffic");
    for (int v = 0; v < BAN_NVC; v++) for (int k = 0; k < 60; k++) begin aq[v].push_back(60 + k); bq[v].push_back(k); end
    two_way = 1;
    for (int i = 0; i < 2000; i++) begin
      bit busy;
      busy = 0;
      for (int v = 0; v < BAN_NVC; v++) if (aq[v].size() > 0 || bq[v].size() > 0) busy = 1;
      if (!busy) break;
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    check(ban_recv == 4 * 180, $sformatf("BAN delivered %0d flits, expected 720", ban_recv));
    check(min_links_b >= 1, "BAN side B lost all links while it had flits waiting");

    // EM2: keep migrating until MIG_CYCLES have passed, then drain
    wait (em2_edges >= MIG_CYCLES);
    mig_en = 0; traf_en = 0;
    repeat (800) @(posedge em2_clk);
    #1;
    loads = 0;
    for (int t = 0; t < EM2_NT; t++)
      for (int s = 0; s < EM2_NS; s++)
        if (em2_slot_valid[t][s]) begin
          int th, nat;
          th  = int'(em2_slot_ctx[t][s][DATA_W-1:0]);
          nat = int'(em2_slot_ny[t][s]) * TX + int'(em2_slot_nx[t][s]);
          check(th == nat && th < EM2_NT, $sformatf("tile %0d slot %0d holds thread %0d, native %0d", t, s, th, nat));
          check((s == 0) == (nat == t), $sformatf("thread %0d in slot %0d of tile %0d", th, s, t));
          if (th < EM2_NT) seen[th]++;
          loads += int'(em2_slot_ctx[t][s][DATA_W +: DATA_W]);
        end
    for (int i = 0; i < EM2_NT; i++) check(seen[i] == 1, $sformatf("thread %0d found %0d times", i, seen[i]));
    check(loads == n_lg + n_ln + EM2_NT, $sformatf("context load counts %0d, controllers loaded %0d", loads, n_lg + n_ln + EM2_NT));
    check(net_recv == net_sent, $sformatf("EM2 network packets sent %0d received %0d", net_sent, net_recv));

    $display("EM2: migrations %0d guest loads %0d native loads %0d evictions %0d blocked %0d packets %0d",
             n_mig, n_lg, n_ln, n_ev, n_bl, net_recv);
    $display("PROM: packets %0d, (0,0)->(7,7) east first %0d north first %0d", recv_pkts, east0, north0);
    $display("BAN: flits %0d, direction changes %0d, cycles all A->B %0d", ban_recv, dir_changes, all_ab_cycles);
    check(n_mig > 0, "no migration");
    check(n_lg > 0, "no guest load");
    check(n_ln > 0, "no native load");
    check(n_ev > 0, "no eviction");
    check(n_bl > 0, "no blocked arrival");
    check(east0 > 0 && north0 > 0, "PROM did not use both first hops");
    check(dir_changes > 0, "BAN never changed a link direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
