// ban_arbiter: bandwidth allocator of a bandwidth-adaptive network (BAN)
// link bundle between two neighbouring nodes A and B.
//
// The NLINK bidirectional links of the bundle can each be driven by either
// node. Each node reports a pressure: the number of flits at the heads of its
// virtual-channel queues that are ready to cross the bundle and whose
// destination buffer has room. Every PERIOD cycles the arbiter sets how many
// links point A->B (n_ab) so that n_ab : NLINK - n_ab approximates
// press_a : press_b, using threshold comparisons only:
//     n_ab = number of k in 1..NLINK with (2k - 1) * (pa + pb) <= 2 * NLINK * pa
// (that is, NLINK * pa / (pa + pb) rounded to nearest). To avoid the deadlock
// a vanished direction could cause, a direction with waiting flits always
// keeps at least one link: with both pressures non-zero n_ab is clamped to
// 1..NLINK-1. With one pressure zero all links go to the other side; with
// both zero the configuration is kept. Links 0..n_ab-1 point A->B (dir = 1),
// the others B->A. After reset the bundle is split evenly.
// The decision is registered: a new configuration applies from the cycle
// after the pressures were sampled, with no dead cycle.
//
// The pressure definition, the proportional split and the at-least-one-link
// rule follow the BAN description (its example: four links, eight flits one
// way and one the other, gives three and one); the rounding and the reset
// split are this design's choices.
module ban_arbiter #(
  parameter int NLINK  = 4,
  parameter int PMAX   = 4,    // largest pressure a node can report
  parameter int PERIOD = 1,    // arbitration every PERIOD cycles
  localparam int PW    = $clog2(PMAX + 1),
  localparam int LW    = $clog2(NLINK + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PW-1:0]    press_a,
  input  logic [PW-1:0]    press_b,
  output logic [LW-1:0]    n_ab,
  output logic [NLINK-1:0] dir
);
  localparam int CNTW = $clog2(PERIOD > 1 ? PERIOD : 2);

  logic [LW-1:0]   n_next;
  logic [CNTW-1:0] tick;

  always_comb begin
    int pa, pb, k;
    pa = int'(press_a);
    pb = int'(press_b);
    k  = 0;
    if (pa == 0 && pb == 0) begin
      n_next = n_ab;
    end else if (pb == 0) begin
      n_next = LW'(NLINK);
    end else if (pa == 0) begin
      n_next = '0;
    end else begin
      for (int t = 1; t <= NLINK; t++)
        if ((2 * t - 1) * (pa + pb) <= 2 * NLINK * pa) k = t;
      if (k < 1)         k = 1;
      if (k > NLINK - 1) k = NLINK - 1;
      n_next = LW'(k);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ab <= LW'(NLINK / 2);
      tick <= '0;
    end else begin
      if (int'(tick) == PERIOD - 1) begin
        tick <= '0;
        n_ab <= n_next;
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end

  always_comb
    for (int l = 0; l < NLINK; l++)
      dir[l] = l < int'(n_ab);

endmodule
