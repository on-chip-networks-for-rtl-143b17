// tb_ban_link: two nodes joined by four bidirectional links, four VCs each.
// Each side has per-VC egress queues modelled here and per-VC receive
// buffers of 4 flits drained at a configurable rate.
//  * Every flit arrives once, in order per VC, at the other side, in the VC
//    named by its vc field.
//  * With traffic only from A to B, after adaptation all four links point
//    A->B and A sends four flits per cycle (bandwidth doubles versus the two
//    links a fixed split would give).
//  * With traffic both ways, each waiting side keeps at least one link.
module tb_ban_link;
  import noc_pkg::*;

  localparam int NVC = 4, NL = 4, BUF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  a_head_valid[NVC], b_head_valid[NVC], a_pop[NVC], b_pop[NVC];
  flit_t a_head_flit[NVC], b_head_flit[NVC], a_rx_flit[NVC], b_rx_flit[NVC];
  logic  a_space[NVC], b_space[NVC], a_rx_valid[NVC], b_rx_valid[NVC];
  logic [NL-1:0] dir;
  logic [2:0] n_ab, press_a, press_b;

  ban_link #(.NLINK(NL), .NVC(NVC)) dut (.*);

  int checks = 0, failures = 0;

  // egress queues: entries are sequence numbers; flit.data = {side, vc, seq}
  int aq[NVC][$], bq[NVC][$];
  int a_next[NVC], b_next[NVC];        // expected next seq at the receiver
  int a_occ[NVC], b_occ[NVC];          // receive buffer occupancy
  int drain_every = 1;
  int a_sent = 0, b_sent = 0, a_recv = 0, b_recv = 0;
  int cyc = 0;
  int min_links_b = 99;

  always_comb
    for (int v = 0; v < NVC; v++) begin
      a_head_valid[v] = aq[v].size() > 0;
      b_head_valid[v] = bq[v].size() > 0;
      a_head_flit[v]  = '0;
      b_head_flit[v]  = '0;
      a_head_flit[v].vc   = VC_W'(v);
      b_head_flit[v].vc   = VC_W'(v);
      a_head_flit[v].data = (aq[v].size() > 0) ? DATA_W'(32'h1000_0000 | (v << 16) | aq[v][0]) : '0;
      b_head_flit[v].data = (bq[v].size() > 0) ? DATA_W'(32'h2000_0000 | (v << 16) | bq[v][0]) : '0;
      a_space[v] = a_occ[v] < BUF;
      b_space[v] = b_occ[v] < BUF;
    end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int v = 0; v < NVC; v++) begin
      if (a_pop[v]) begin void'(aq[v].pop_front()); a_sent++; end
      if (b_pop[v]) begin void'(bq[v].pop_front()); b_sent++; end
      if (b_rx_valid[v]) begin
        checks++;
        if (b_rx_flit[v].data != DATA_W'(32'h1000_0000 | (v << 16) | b_next[v])) begin
          failures++; $display("FAIL B vc%0d got %h expected seq %0d", v, b_rx_flit[v].data, b_next[v]);
        end
        b_next[v]++; b_occ[v]++; a_recv++;
      end
      if (a_rx_valid[v]) begin
        checks++;
        if (a_rx_flit[v].data != DATA_W'(32'h2000_0000 | (v << 16) | a_next[v])) begin
          failures++; $display("FAIL A vc%0d got %h expected seq %0d", v, a_rx_flit[v].data, a_next[v]);
        end
        a_next[v]++; a_occ[v]++; b_recv++;
      end
      if (cyc % drain_every == 0) begin
        if (a_occ[v] > 0) a_occ[v]--;
        if (b_occ[v] > 0) b_occ[v]--;
      end
    end
  end

  int qa_seq[NVC], qb_seq[NVC];
  task automatic load(int na, int nb);
    for (int v = 0; v < NVC; v++) begin
      for (int k = 0; k < na; k++) aq[v].push_back(qa_seq[v]++);
      for (int k = 0; k < nb; k++) bq[v].push_back(qb_seq[v]++);
    end
  endtask

  initial begin
    for (int v = 0; v < NVC; v++) begin
      a_next[v] = 0; b_next[v] = 0; a_occ[v] = 0; b_occ[v] = 0; qa_seq[v] = 0; qb_seq[v] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // one-way traffic
    load(40, 0);
    repeat (3) @(posedge clk);
    begin
      int s0, t;
      #1;
      checks++;
      if (dir != 4'b1111) begin failures++; $display("FAIL one-way: dir %b", dir); end
      s0 = a_sent;
      repeat (10) @(posedge clk);
      #1;
      checks++;
      if (a_sent - s0 != 40) begin failures++; $display("FAIL one-way rate: %0d flits in 10 cycles, expected 40", a_sent - s0); end
      t = 0;
      while ((a_recv < a_sent || a_sent < 160) && t < 1000) begin @(posedge clk); t++; end
    end

    // two-way, asymmetric; slow drain so buffers fill and space matters
    drain_every = 2;
    load(60, 10);
    begin
      int t;
      t = 0;
      while (t < 400 && (a_sent < 400 || b_sent < 40)) begin
        @(posedge clk); #1; t++;
        if (press_a != 0 && press_b != 0) begin
          checks++;
          if (n_ab == 0 || n_ab == NL) begin failures++; $display("FAIL a waiting side lost all links"); end
        end
      end
      repeat (20) @(posedge clk);
    end
    checks++;
    if (a_sent != 400 || b_sent != 40 || a_recv != a_sent || b_recv != b_sent) begin
      failures++; $display("FAIL totals a %0d/%0d b %0d/%0d", a_sent, a_recv, b_sent, b_recv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
