// tb_enc_ctrl: drives one ENC controller (core at (2,2), one native and one
// guest context, 4-flit contexts) directly through its network ports.
//  A. a guest context arrives on the migration network: loaded into the
//     guest slot, contents intact, 4 ejection credits returned.
//  B. a second guest arrives while the guest slot holds a thread that has
//     done nothing: it is blocked (no eviction, no livelock). When the guest
//     reports progress it is evicted on the eviction network to its native
//     core, whole and in order; the waiting context is then loaded.
//  C. the native thread migrates: its context leaves on the migration
//     network addressed to its destination; a second migration is held back
//     until the whole transmit buffer is free, and flits stop while the
//     router has no credits.
//  D. the native thread comes home on the eviction network into slot 0.
module tb_enc_ctrl;
  import noc_pkg::*;

  localparam int CF = 4, NS = 2, CW = CF * DATA_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  coord_t my_x = 2, my_y = 2;
  logic slot_valid[NS]; coord_t slot_nx[NS], slot_ny[NS]; logic [CW-1:0] slot_ctx[NS];
  logic core_progress[NS], core_mig_req[NS], core_wr[NS];
  coord_t core_mig_dx[NS], core_mig_dy[NS];
  logic [CW-1:0] core_wr_ctx[NS];
  logic mig_inj_valid, mig_inj_cr, mig_ej_valid, mig_ej_cr;
  logic ev_inj_valid, ev_inj_cr, ev_ej_valid, ev_ej_cr;
  flit_t mig_inj_flit, mig_ej_flit, ev_inj_flit, ev_ej_flit;
  logic evt_load_native, evt_load_guest, evt_evict, evt_migrate, evt_blocked;

  enc_ctrl #(.CTX_FLITS(CF), .NGUEST(1), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // monitors
  flit_t mig_out[$], ev_out[$];
  int n_load_g = 0, n_load_n = 0, n_evict = 0, n_mig = 0, n_block = 0, n_migcr = 0;
  int inj_cr_hold = 0;   // when set, the tb does not return injection credits
  int mig_cr_owed = 0;
  always @(posedge clk) if (rst_n) begin
    if (mig_inj_valid) begin mig_out.push_back(mig_inj_flit); mig_cr_owed++; end
    if (ev_inj_valid)  ev_out.push_back(ev_inj_flit);
    n_load_g += evt_load_guest; n_load_n += evt_load_native; n_evict += evt_evict;
    n_mig += evt_migrate; n_block += evt_blocked; n_migcr += mig_ej_cr;
  end
  // the router returns injection credits one cycle after each flit unless held
  always @(posedge clk) begin
    mig_inj_cr <= 1'b0;
    ev_inj_cr  <= ev_inj_valid;
    if (!inj_cr_hold && mig_cr_owed > 0) begin mig_inj_cr <= 1'b1; mig_cr_owed--; end
  end

  function automatic logic [CW-1:0] ctx_of(int t);
    logic [CW-1:0] c;
    for (int f = 0; f < CF; f++) c[f*DATA_W +: DATA_W] = DATA_W'(32'hC000_0000 | (t << 8) | f);
    return c;
  endfunction

  task automatic send_ctx(bit ev, int t, int nx, int ny);
    for (int f = 0; f < CF; f++) begin
      flit_t fl;
      fl = '0;
      fl.head = (f == 0); fl.tail = (f == CF - 1);
      fl.dx = my_x; fl.dy = my_y; fl.sx = coord_t'(nx); fl.sy = coord_t'(ny);
      fl.data = ctx_of(t)[f*DATA_W +: DATA_W];
      if (ev) begin ev_ej_valid <= 1; ev_ej_flit <= fl; end
      else    begin mig_ej_valid <= 1; mig_ej_flit <= fl; end
      @(posedge clk);
    end
    ev_ej_valid <= 0; mig_ej_valid <= 0;
  endtask

  task automatic check_ctx(flit_t q[$], int t, int dx, int dy, int nx, int ny, string what);
    check(q.size() == CF, $sformatf("%s: %0d flits", what, q.size()));
    for (int f = 0; f < q.size() && f < CF; f++)
      check(q[f].head == (f == 0) && q[f].tail == (f == CF - 1) && q[f].dx == dx && q[f].dy == dy &&
            q[f].sx == nx && q[f].sy == ny && q[f].data == ctx_of(t)[f*DATA_W +: DATA_W],
            $sformatf("%s flit %0d", what, f));
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      core_progress[s] = 0; core_mig_req[s] = 0; core_wr[s] = 0;
      core_mig_dx[s] = 0; core_mig_dy[s] = 0; core_wr_ctx[s] = '0;
    end
    mig_ej_valid = 0; ev_ej_valid = 0; mig_ej_flit = '0; ev_ej_flit = '0;
    mig_inj_cr = 0; ev_inj_cr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(slot_valid[0] && !slot_valid[1] && slot_nx[0] == 2 && slot_ny[0] == 2, "reset: native thread home");
    // the core fills the native context
    core_wr[0] = 1; core_wr_ctx[0] = ctx_of(22);
    @(posedge clk); #1; core_wr[0] = 0;

    // A
    send_ctx(0, 1, 0, 0);
    repeat (8) @(posedge clk); #1;
    check(n_load_g == 1 && slot_valid[1] && slot_nx[1] == 0 && slot_ny[1] == 0 && slot_ctx[1] == ctx_of(1),
          "A: guest loaded");
    check(n_migcr == CF, $sformatf("A: %0d ejection credits returned", n_migcr));

    // B
    send_ctx(0, 2, 1, 0);
    repeat (10) @(posedge clk); #1;
    check(n_evict == 0 && n_block > 0 && slot_ctx[1] == ctx_of(1), "B: arrival blocked while guest has made no progress");
    core_progress[1] = 1; @(posedge clk); #1; core_progress[1] = 0;
    repeat (10) @(posedge clk); #1;
    check(n_evict == 1, "B: one eviction");
    check_ctx(ev_out, 1, 0, 0, 0, 0, "B: evicted context to native core");
    check(n_load_g == 2 && slot_valid[1] && slot_nx[1] == 1 && slot_ctx[1] == ctx_of(2), "B: waiting context loaded");

    // C
    inj_cr_hold = 1;
    core_mig_req[0] = 1; core_mig_dx[0] = 3; core_mig_dy[0] = 1;
    @(posedge clk); #1;
    core_mig_req[0] = 0;
    core_mig_req[1] = 1; core_mig_dx[1] = 0; core_mig_dy[1] = 3;
    repeat (2) @(posedge clk); #1;
    check(n_mig == 1 && !slot_valid[0], "C: native thread left");
    check(slot_valid[1], "C: second migration waits for the transmit buffer");
    repeat (8) @(posedge clk); #1;
    check(mig_out.size() == CF, "C: first context fully injected with initial credits");
    // transmit buffer was freed, credits are held: second context copied, flits stopped
    check(n_mig == 2 && !slot_valid[1] && mig_out.size() == CF, "C: no flit sent without credits");
    core_mig_req[1] = 0;
    inj_cr_hold = 0;
    repeat (20) @(posedge clk); #1;
    begin
      flit_t a[$], b[$];
      for (int i = 0; i < CF; i++) a.push_back(mig_out[i]);
      for (int i = CF; i < mig_out.size(); i++) b.push_back(mig_out[i]);
      check_ctx(a, 22, 3, 1, 2, 2, "C: native context");
      check_ctx(b, 2, 0, 3, 1, 0, "C: guest context");
    end

    // D
    send_ctx(1, 22, 2, 2);
    repeat (6) @(posedge clk); #1;
    check(n_load_n == 1 && slot_valid[0] && slot_ctx[0] == ctx_of(22), "D: native thread home again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
