// enc_ctrl: Exclusive Native Context (ENC) thread-migration controller of one
// core, the deadlock-free fine-grained migration protocol.
//
// Context slots: slot 0 is the native context, reserved for the one thread
// whose native core this is (at reset it holds that thread); slots
// 1..NGUEST are guest contexts for any other thread. A thread context is
// CTX_FLITS flits; every flit carries the thread's native-core coordinates in
// its source fields, and the head flit its destination.
//
// Two networks carry contexts: the migration network (threads moving of their
// own accord) and the eviction network (threads pushed out of a guest slot,
// always sent to their native core). Keeping the two on separate channels is
// what breaks the dependency cycle between migrating and evicted traffic.
// Each network has a receive buffer that assembles one whole context and a
// transmit buffer that holds one whole context; a context is injected only
// when its entire transmit buffer is free, so an arriving context is never
// stuck behind a half-sent one.
//
// Every cycle, in order (the ENC algorithm):
//  1. A native context complete in a receive buffer is moved into slot 0;
//     then step 3.
//  2a. Otherwise a non-native context complete in the migration receive
//     buffer is moved into a free guest slot; then step 3.
//  2b. If all guest slots are full, one guest that has executed an
//     instruction since it arrived, or wants to migrate, is evicted: it is
//     copied to the eviction transmit buffer addressed to its native core and
//     its slot is freed. Nothing else happens this cycle. A guest that has
//     done neither is not evicted (no livelock), so the arrival waits.
//  3. One thread that wants to migrate (round robin over the slots) is copied
//     to the migration transmit buffer addressed to its destination and its
//     slot is freed.
// Contexts arriving on the eviction network are always native here.
//
// Network side: the *_inj_* ports feed the local input of the router of each
// network (one VC, credits start at DEPTH); the *_ej_* ports take the router's
// local output. The receive buffer holds CTX_FLITS flits, so the routers'
// ejection credit count must be CTX_FLITS; the credits for a loaded context are
// returned one per cycle after the load.
// Core side: slot state and contents are outputs; the core reports progress
// (an instruction retired with none in flight), migration requests with
// their destination, and writes a slot's contents back as it executes.
//
// The algorithm, the native/guest split and the whole-context injection rule
// follow the ENC description; the buffer organisation, round-robin choice,
// lowest-index victim and the core-side signals are this design's choices.
module enc_ctrl
  import noc_pkg::*;
#(
  parameter int CTX_FLITS = 4,
  parameter int NGUEST    = 1,
  parameter int DEPTH     = 4,
  localparam int NS       = NGUEST + 1,
  localparam int CTX_W    = CTX_FLITS * DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           my_x,
  input  coord_t           my_y,
  // core side
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
  // migration network
  output logic             mig_inj_valid,
  output flit_t            mig_inj_flit,
  input  logic             mig_inj_cr,
  input  logic             mig_ej_valid,
  input  flit_t            mig_ej_flit,
  output logic             mig_ej_cr,
  // eviction network
  output logic             ev_inj_valid,
  output flit_t            ev_inj_flit,
  input  logic             ev_inj_cr,
  input  logic             ev_ej_valid,
  input  flit_t            ev_ej_flit,
  output logic             ev_ej_cr,
  // protocol events, one-cycle pulses
  output logic             evt_load_native,
  output logic             evt_load_guest,
  output logic             evt_evict,
  output logic             evt_migrate,
  output logic             evt_blocked
);
  localparam int FW  = $clog2(CTX_FLITS + 1);
  localparam int SW  = $clog2(NS > 1 ? NS : 2);
  localparam int CRW = $clog2(DEPTH + 1);

  // ---------------- slots ----------------
  logic             progressed [NS];

  // ---------------- receive buffers (0: migration, 1: eviction) ----------------
  logic [FW-1:0]    rx_cnt  [2];
  logic [CTX_W-1:0] rx_data [2];
  coord_t           rx_nx   [2], rx_ny [2];
  logic [FW-1:0]    rx_pend [2];
  logic             rx_full [2];
  logic             rx_load [2];

  // ---------------- transmit buffers ----------------
  logic [FW-1:0]    tx_left [2];
  logic [FW-1:0]    tx_idx  [2];
  logic [CTX_W-1:0] tx_data [2];
  coord_t           tx_dx [2], tx_dy [2], tx_nx [2], tx_ny [2];
  logic [CRW-1:0]   tx_cred [2];
  logic             tx_send [2];
  flit_t            tx_flit [2];

  logic             ej_valid [2];
  flit_t            ej_flit  [2];
  logic             inj_cr   [2];

  assign ej_valid[0] = mig_ej_valid;
  assign ej_flit[0]  = mig_ej_flit;
  assign ej_valid[1] = ev_ej_valid;
  assign ej_flit[1]  = ev_ej_flit;
  assign inj_cr[0]   = mig_inj_cr;
  assign inj_cr[1]   = ev_inj_cr;

  always_comb
    for (int n = 0; n < 2; n++) begin
      rx_full[n]  = (int'(rx_cnt[n]) == CTX_FLITS);
      tx_send[n]  = (tx_left[n] != '0) && (tx_cred[n] != '0);
      tx_flit[n].head = (tx_idx[n] == '0);
      tx_flit[n].tail = (int'(tx_idx[n]) == CTX_FLITS - 1);
      tx_flit[n].vc   = '0;
      tx_flit[n].dx   = tx_dx[n];
      tx_flit[n].dy   = tx_dy[n];
      tx_flit[n].sx   = tx_nx[n];
      tx_flit[n].sy   = tx_ny[n];
      tx_flit[n].data = tx_data[n][int'(tx_idx[n]) * DATA_W +: DATA_W];
    end

  assign mig_inj_valid = tx_send[0];
  assign mig_inj_flit  = tx_flit[0];
  assign ev_inj_valid  = tx_send[1];
  assign ev_inj_flit   = tx_flit[1];
  assign mig_ej_cr     = rx_pend[0] != '0;
  assign ev_ej_cr      = rx_pend[1] != '0;

  // ---------------- decision ----------------
  logic          ev_native, mig_native, load_native, nonnative;
  logic          load_guest, do_evict, do_mig;
  int            native_src, free_g, victim;
  logic [NS-1:0] mig_cand;
  logic [NS-1:0] mig_gnt;
  logic [SW-1:0] mig_sel;
  logic          mig_any;

  always_comb begin
    ev_native   = rx_full[1];
    mig_native  = rx_full[0] && rx_nx[0] == my_x && rx_ny[0] == my_y;
    load_native = (ev_native || mig_native) && !slot_valid[0];
    native_src  = ev_native ? 1 : 0;
    nonnative   = rx_full[0] && !mig_native;

    free_g = -1;
    victim = -1;
    for (int s = NS - 1; s >= 1; s--) begin
      if (!slot_valid[s]) free_g = s;
      if (slot_valid[s] && (progressed[s] || core_mig_req[s])) victim = s;
    end
    load_guest = !load_native && nonnative && free_g >= 0;
    do_evict   = !load_native && nonnative && free_g < 0 && victim >= 0 &&
                 tx_left[1] == '0;

    for (int s = 0; s < NS; s++)
      mig_cand[s] = slot_valid[s] && core_mig_req[s] &&
                    !(core_mig_dx[s] == my_x && core_mig_dy[s] == my_y);
    do_mig = !do_evict && mig_any && tx_left[0] == '0;

    rx_load[0] = (load_native && native_src == 0) || load_guest;
    rx_load[1] = load_native && native_src == 1;
  end

  rr_arbiter #(.N(NS)) u_mig_arb (
    .clk, .rst_n,
    .req      (mig_cand),
    .advance  (do_mig),
    .grant    (mig_gnt),
    .grant_idx(mig_sel),
    .any      (mig_any)
  );

  assign evt_load_native = load_native;
  assign evt_load_guest  = load_guest;
  assign evt_evict       = do_evict;
  assign evt_migrate     = do_mig;
  assign evt_blocked     = nonnative && !load_native && !load_guest && !do_evict;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        slot_valid[s] <= (s == 0);
        slot_nx[s]    <= (s == 0) ? my_x : '0;
        slot_ny[s]    <= (s == 0) ? my_y : '0;
        slot_ctx[s]   <= '0;
        progressed[s] <= 1'b0;
      end
      for (int n = 0; n < 2; n++) begin
        rx_cnt[n]  <= '0;
        rx_data[n] <= '0;
        rx_nx[n]   <= '0;
        rx_ny[n]   <= '0;
        rx_pend[n] <= '0;
        tx_left[n] <= '0;
        tx_idx[n]  <= '0;
        tx_data[n] <= '0;
        tx_dx[n]   <= '0;
        tx_dy[n]   <= '0;
        tx_nx[n]   <= '0;
        tx_ny[n]   <= '0;
        tx_cred[n] <= CRW'(DEPTH);
      end
    end else begin
      // core updates
      for (int s = 0; s < NS; s++) begin
        if (slot_valid[s] && core_wr[s])       slot_ctx[s]   <= core_wr_ctx[s];
        if (slot_valid[s] && core_progress[s]) progressed[s] <= 1'b1;
      end

      // receive: assemble contexts, return credits after a load
      for (int n = 0; n < 2; n++) begin
        if (ej_valid[n] && !rx_full[n]) begin
          rx_data[n][int'(rx_cnt[n]) * DATA_W +: DATA_W] <= ej_flit[n].data;
          rx_cnt[n] <= rx_cnt[n] + 1'b1;
          if (ej_flit[n].head) begin
            rx_nx[n] <= ej_flit[n].sx;
            rx_ny[n] <= ej_flit[n].sy;
          end
        end
        if (rx_load[n]) begin
          rx_cnt[n]  <= '0;
          rx_pend[n] <= rx_pend[n] + FW'(CTX_FLITS) - FW'(rx_pend[n] != '0);
        end else if (rx_pend[n] != '0) begin
          rx_pend[n] <= rx_pend[n] - 1'b1;
        end
      end

      // step 1 / 2a: load
      if (load_native) begin
        slot_valid[0] <= 1'b1;
        slot_nx[0]    <= rx_nx[native_src];
        slot_ny[0]    <= rx_ny[native_src];
        slot_ctx[0]   <= rx_data[native_src];
        progressed[0] <= 1'b0;
      end
      if (load_guest) begin
        slot_valid[free_g] <= 1'b1;
        slot_nx[free_g]    <= rx_nx[0];
        slot_ny[free_g]    <= rx_ny[0];
        slot_ctx[free_g]   <= rx_data[0];
        progressed[free_g] <= 1'b0;
      end

      // step 2b: evict to the native core on the eviction network
      if (do_evict) begin
        slot_valid[victim] <= 1'b0;
        tx_left[1] <= FW'(CTX_FLITS);
        tx_idx[1]  <= '0;
        tx_data[1] <= slot_ctx[victim];
        tx_dx[1]   <= slot_nx[victim];
        tx_dy[1]   <= slot_ny[victim];
        tx_nx[1]   <= slot_nx[victim];
        tx_ny[1]   <= slot_ny[victim];
      end

      // step 3: migrate on the migration network
      if (do_mig) begin
        slot_valid[mig_sel] <= 1'b0;
        tx_left[0] <= FW'(CTX_FLITS);
        tx_idx[0]  <= '0;
        tx_data[0] <= slot_ctx[mig_sel];
        tx_dx[0]   <= core_mig_dx[mig_sel];
        tx_dy[0]   <= core_mig_dy[mig_sel];
        tx_nx[0]   <= slot_nx[mig_sel];
        tx_ny[0]   <= slot_ny[mig_sel];
      end

      // transmit one flit per cycle per network, credit permitting
      for (int n = 0; n < 2; n++) begin
        if (tx_send[n]) begin
          tx_left[n] <= tx_left[n] - 1'b1;
          tx_idx[n]  <= tx_idx[n] + 1'b1;
        end
        tx_cred[n] <= tx_cred[n] - CRW'(tx_send[n]) + CRW'(inj_cr[n]);
      end
    end
  end

  // Eviction traffic always ends at the native core, whose slot 0 is free.
  a_ev_native: assert property (@(posedge clk) disable iff (!rst_n)
    rx_full[1] |-> rx_nx[1] == my_x && rx_ny[1] == my_y && !slot_valid[0]);
  a_tx_whole: assert property (@(posedge clk) disable iff (!rst_n)
    do_mig |-> tx_left[0] == '0);

endmodule
