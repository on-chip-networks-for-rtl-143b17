// tb_noc_mesh: self-checking test of a 4x4 PROMV mesh (4 VCs, 4-flit buffers).
//
// 1. Latency: a lone 4-flit packet from (0,0) to (3,3) must eject its head
//    6 + 1 cycles after injection (one cycle per hop).
// 2. Traffic: every node sends PKTS packets of PKT_LEN flits under each of
//    the four permutation patterns and uniform-random traffic. Every ejected
//    flit is checked: right node, flits of a packet contiguous on their VC,
//    in order, with the payload the source put in. All packets must arrive.
// 3. Path diversity: packets from (0,0) to (3,3) must leave (0,0) both east
//    and north (PROM draws among minimal paths; DOR would use one).
module tb_noc_mesh;
  import noc_pkg::*;
  import tb_traffic_pkg::*;

  localparam int W = 4, H = 4, NN = W * H, NVC = 4, DEPTH = 4, PKT_LEN = 4;
  localparam int PKTS = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            inj_valid[NN];
  flit_t           inj_flit[NN];
  logic            inj_cr_valid[NN];
  logic [VC_W-1:0] inj_cr_vc[NN];
  logic            ej_valid[NN];
  flit_t           ej_flit[NN];
  logic            ej_cr_valid[NN];
  logic [VC_W-1:0] ej_cr_vc[NN];

  noc_mesh #(.MESH_W(W), .MESH_H(H), .NVC(NVC), .DEPTH(DEPTH), .LOCAL_CREDITS(DEPTH),
             .ROUTING(RT_PROM), .PROM_MODE(PROM_V), .FMAX(1024)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- sources ----------------
  int   src_cred [NN][NVC];
  int   src_dst  [NN][$];     // queue of destinations still to send
  int   src_flit [NN];        // index of next flit of current packet
  int   src_vc   [NN];
  int   src_seq  [NN];
  int   src_cur_dst [NN];
  int   sent_pkts = 0, recv_pkts = 0;
  int   inj_cycle_first;

  function automatic logic [DATA_W-1:0] payload(int s, int seq, int f);
    return DATA_W'((s << 20) | ((seq & 32'hffff) << 4) | f);
  endfunction

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      int c;
      inj_valid[n] <= 1'b0;
      if (rst_n) begin
        if (inj_cr_valid[n]) src_cred[n][inj_cr_vc[n]]++;
        if (src_flit[n] == 0 && src_dst[n].size() > 0) begin
          src_cur_dst[n] = src_dst[n][0];
        end
        if ((src_flit[n] > 0 || src_dst[n].size() > 0) && src_cred[n][src_vc[n]] > 0) begin
          flit_t f;
          f.head = (src_flit[n] == 0);
          f.tail = (src_flit[n] == PKT_LEN - 1);
          f.vc   = VC_W'(src_vc[n]);
          f.dx   = coord_t'(src_cur_dst[n] % W);
          f.dy   = coord_t'(src_cur_dst[n] / W);
          f.sx   = coord_t'(n % W);
          f.sy   = coord_t'(n / W);
          f.data = payload(n, src_seq[n], src_flit[n]);
          inj_valid[n] <= 1'b1;
          inj_flit[n]  <= f;
          src_cred[n][src_vc[n]]--;
          if (src_flit[n] == 0) void'(src_dst[n].pop_front());
          if (src_flit[n] == PKT_LEN - 1) begin
            src_flit[n] = 0;
            src_seq[n]++;
            src_vc[n] = (src_vc[n] + 1) % NVC;
            sent_pkts++;
          end else begin
            src_flit[n]++;
          end
        end
      end
    end
  end

  // ---------------- sinks ----------------
  int   snk_flit [NN][NVC];
  int   snk_src  [NN][NVC];
  int   snk_seq  [NN][NVC];
  int   first_head_cycle = -1;

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      ej_cr_valid[n] <= 1'b0;
      if (rst_n && ej_valid[n]) begin
        flit_t f;
        int v, s, q, fi;
        f  = ej_flit[n];
        v  = int'(f.vc);
        s  = int'(f.data >> 20);
        q  = int'((f.data >> 4) & 32'hffff);
        fi = int'(f.data & 32'hf);
        ej_cr_valid[n] <= 1'b1;
        ej_cr_vc[n]    <= f.vc;
        checks++;
        if (int'(f.dx) != n % W || int'(f.dy) != n / W) begin
          failures++; $display("FAIL node %0d got flit for (%0d,%0d)", n, f.dx, f.dy);
        end
        if (f.head) begin
          if (snk_flit[n][v] != 0) begin failures++; $display("FAIL head inside packet n%0d v%0d", n, v); end
          snk_src[n][v] = s; snk_seq[n][v] = q; snk_flit[n][v] = 0;
          if (first_head_cycle < 0) first_head_cycle = cycle;
        end
        checks++;
        if (s != snk_src[n][v] || q != snk_seq[n][v] || fi != snk_flit[n][v] ||
            int'(f.sx) != s % W || int'(f.sy) != s / W || f.head != (fi == 0) ||
            f.tail != (fi == PKT_LEN - 1)) begin
          failures++;
          $display("FAIL n%0d v%0d flit src %0d seq %0d idx %0d, expected src %0d seq %0d idx %0d",
                   n, v, s, q, fi, snk_src[n][v], snk_seq[n][v], snk_flit[n][v]);
        end
        if (f.tail) begin snk_flit[n][v] = 0; recv_pkts++; end
        else snk_flit[n][v]++;
      end
    end
  end

  // ---------------- path diversity probe at node 0 ----------------
  int east0 = 0, north0 = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (dut.r_out_valid[0][P_EAST]  && dut.r_out_flit[0][P_EAST].head &&
          dut.r_out_flit[0][P_EAST].dx == 3 && dut.r_out_flit[0][P_EAST].dy == 3)  east0++;
      if (dut.r_out_valid[0][P_NORTH] && dut.r_out_flit[0][P_NORTH].head &&
          dut.r_out_flit[0][P_NORTH].dx == 3 && dut.r_out_flit[0][P_NORTH].dy == 3) north0++;
    end

  task automatic wait_drain(int limit);
    int t;
    t = 0;
    while ((recv_pkts < sent_pkts || src_pending()) && t < limit) begin
      @(posedge clk); t++;
    end
  endtask

  function automatic bit src_pending();
    for (int n = 0; n < NN; n++)
      if (src_dst[n].size() > 0 || src_flit[n] != 0) return 1;
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_cr_valid[n] = 0; ej_cr_vc[n] = '0;
      src_flit[n] = 0; src_vc[n] = 0; src_seq[n] = 0; src_cur_dst[n] = 0;
      for (int v = 0; v < NVC; v++) begin
        src_cred[n][v] = DEPTH; snk_flit[n][v] = 0; snk_src[n][v] = 0; snk_seq[n][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. lone packet latency
    inj_cycle_first = cycle;
    src_dst[0].push_back(15);
    wait_drain(200);
    checks++;
    // injected during cycle inj_cycle_first+1, one cycle per hop, 6 hops
    if (first_head_cycle - (inj_cycle_first + 1) != 7) begin
      failures++;
      $display("FAIL lone-packet latency %0d cycles, expected 7",
               first_head_cycle - (inj_cycle_first + 1));
    end

    // 2. patterns
    for (int p = 0; p < 5; p++) begin
      for (int n = 0; n < NN; n++)
        for (int k = 0; k < PKTS; k++) begin
          int d;
          d = pattern_dest(p, n, 4, NN);
          if (d != n) src_dst[n].push_back(d);
        end
      wait_drain(20000);
      checks++;
      if (recv_pkts != sent_pkts || src_pending()) begin
        failures++;
        $display("FAIL pattern %0d: sent %0d received %0d", p, sent_pkts, recv_pkts);
      end
    end

    // 3. diversity
    for (int k = 0; k < 40; k++) src_dst[0].push_back(15);
    wait_drain(20000);
    checks++;
    if (east0 == 0 || north0 == 0) begin
      failures++;
      $display("FAIL no path diversity: east %0d north %0d", east0, north0);
    end
    $display("packets %0d, (0,0)->(3,3) first hops east %0d north %0d", recv_pkts, east0, north0);
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
