// tb_em2_chip: end-to-end test of a 3 x 3 EM2 interconnect with a random
// migration workload and remote-access / memory traffic.
//
// Every tile runs tb_em2_core_model: threads repeatedly migrate to random
// tiles under ENC for MIG_CYCLES cycles, then stay put. Meanwhile every tile
// sends packets on networks 2..5 to random tiles. Checks:
//  * after the network drains, each of the 9 threads sits in exactly one
//    context, with its thread number intact, a native thread only in its own
//    native slot, and the load counts in the contexts adding up to the number
//    of loads the controllers reported (no context lost or duplicated);
//  * every network packet arrives at its destination, whole;
//  * migrations, guest loads, native loads, evictions and blocked arrivals
//    each happened at least once.
module tb_em2_chip;
  import noc_pkg::*;

  localparam int TX = 3, TY = 3, NT = TX * TY, NS = 2, CW = 4 * DATA_W;
  localparam int MIG_CYCLES = 3000;
  localparam int PKT_LEN = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_valid[NT][NS]; coord_t slot_nx[NT][NS], slot_ny[NT][NS]; logic [CW-1:0] slot_ctx[NT][NS];
  logic core_progress[NT][NS], core_mig_req[NT][NS], core_wr[NT][NS];
  coord_t core_mig_dx[NT][NS], core_mig_dy[NT][NS];
  logic [CW-1:0] core_wr_ctx[NT][NS];
  logic net_inj_valid[NT][4], net_inj_cr[NT][4], net_ej_valid[NT][4], net_ej_cr[NT][4];
  flit_t net_inj_flit[NT][4], net_ej_flit[NT][4];
  logic evt_load_native[NT], evt_load_guest[NT], evt_evict[NT], evt_migrate[NT], evt_blocked[NT];

  em2_chip #(.TILES_X(TX), .TILES_Y(TY)) dut (.*);

  logic mig_en = 0;
  for (genvar t = 0; t < NT; t++) begin : g_core
    tb_em2_core_model #(.TX(TX), .TY(TY)) u_core (
      .clk, .rst_n, .mig_en, .my_id(t),
      .slot_valid(slot_valid[t]), .slot_ctx(slot_ctx[t]),
      .core_progress(core_progress[t]), .core_mig_req(core_mig_req[t]),
      .core_mig_dx(core_mig_dx[t]), .core_mig_dy(core_mig_dy[t]),
      .core_wr(core_wr[t]), .core_wr_ctx(core_wr_ctx[t]));
  end

  int checks = 0, failures = 0;
  int n_mig = 0, n_lg = 0, n_ln = 0, n_ev = 0, n_bl = 0;
  always @(posedge clk) if (rst_n)
    for (int t = 0; t < NT; t++) begin
      n_mig += evt_migrate[t]; n_lg += evt_load_guest[t]; n_ln += evt_load_native[t];
      n_ev += evt_evict[t]; n_bl += evt_blocked[t];
    end

  // ---------- network traffic on networks 2..5 ----------
  logic traf_en = 0;
  int cred[NT][4], fidx[NT][4], cdst[NT][4], seq[NT][4];
  int sent = 0, recv = 0;
  int rx_idx[NT][4];
  always @(posedge clk) begin
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < 4; k++) begin
        net_inj_valid[t][k] <= 1'b0;
        net_ej_cr[t][k]     <= 1'b0;
        if (!rst_n) begin
          cred[t][k] = 4; fidx[t][k] = 0; seq[t][k] = 0; rx_idx[t][k] = 0; cdst[t][k] = 0;
        end else begin
          if (net_inj_cr[t][k]) cred[t][k]++;
          if (cred[t][k] > 0 && (fidx[t][k] > 0 || (traf_en && $urandom_range(7) == 0))) begin
            flit_t f;
            if (fidx[t][k] == 0) begin
              cdst[t][k] = int'($urandom_range(NT - 2));
              if (cdst[t][k] >= t) cdst[t][k]++;
            end
            f = '0;
            f.head = fidx[t][k] == 0; f.tail = fidx[t][k] == PKT_LEN - 1;
            f.dx = coord_t'(cdst[t][k] % TX); f.dy = coord_t'(cdst[t][k] / TX);
            f.sx = coord_t'(t % TX); f.sy = coord_t'(t / TX);
            f.data = DATA_W'((k << 28) | (t << 20) | (seq[t][k] << 4) | fidx[t][k]);
            net_inj_valid[t][k] <= 1'b1;
            net_inj_flit[t][k]  <= f;
            cred[t][k]--;
            if (fidx[t][k] == PKT_LEN - 1) begin fidx[t][k] = 0; seq[t][k]++; sent++; end
            else fidx[t][k]++;
          end
          if (net_ej_valid[t][k]) begin
            flit_t f;
            f = net_ej_flit[t][k];
            net_ej_cr[t][k] <= 1'b1;
            checks++;
            if (int'(f.dx) != t % TX || int'(f.dy) != t / TX || int'(f.data >> 28) != k ||
                int'(f.data & 15) != rx_idx[t][k] || f.head != (rx_idx[t][k] == 0)) begin
              failures++;
              $display("FAIL net %0d tile %0d flit %h", k, t, f.data);
            end
            if (f.tail) begin rx_idx[t][k] = 0; recv++; end
            else rx_idx[t][k]++;
          end
        end
      end
  end

  initial begin
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < 4; k++) begin net_inj_flit[t][k] = '0; net_inj_valid[t][k] = 0; net_ej_cr[t][k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    mig_en = 1; traf_en = 1;
    repeat (MIG_CYCLES) @(posedge clk);
    mig_en = 0; traf_en = 0;
    repeat (600) @(posedge clk);
    #1;
    // every thread in exactly one context
    begin
      int seen[NT];
      int loads;
      loads = 0;
      for (int i = 0; i < NT; i++) seen[i] = 0;
      for (int t = 0; t < NT; t++)
        for (int s = 0; s < NS; s++)
          if (slot_valid[t][s]) begin
            int th, nat;
            th  = int'(slot_ctx[t][s][DATA_W-1:0]);
            nat = int'(slot_ny[t][s]) * TX + int'(slot_nx[t][s]);
            checks++;
            if (th != nat || th >= NT) begin
              failures++; $display("FAIL tile %0d slot %0d holds thread %0d with native %0d", t, s, th, nat);
            end else seen[th]++;
            checks++;
            if ((s == 0) != (nat == t)) begin
              failures++; $display("FAIL thread %0d in slot %0d of tile %0d", th, s, t);
            end
            loads += int'(slot_ctx[t][s][DATA_W +: DATA_W]);
          end
      for (int i = 0; i < NT; i++) begin
        checks++;
        if (seen[i] != 1) begin failures++; $display("FAIL thread %0d found %0d times", i, seen[i]); end
      end
      checks++;
      if (loads != n_lg + n_ln + NT) begin
        failures++; $display("FAIL context load counts %0d, controllers loaded %0d", loads, n_lg + n_ln + NT);
      end
    end
    checks++;
    if (recv != sent) begin failures++; $display("FAIL network packets sent %0d received %0d", sent, recv); end
    checks++;
    if (n_mig == 0 || n_lg == 0 || n_ln == 0 || n_ev == 0 || n_bl == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("migrations %0d guest loads %0d native loads %0d evictions %0d blocked %0d packets %0d",
             n_mig, n_lg, n_ln, n_ev, n_bl, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
