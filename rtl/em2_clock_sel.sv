// em2_clock_sel: clock source selection of the EM2 clock module.
//
// The chip can run from one of three clocks: an external single-ended clock,
// an external differential clock (after its input receiver) or the on-chip
// PLL output. `sel` picks one: 0 single-ended, 1 differential, 2 and 3 PLL.
// The select value reaches the output multiplexer only at a falling edge of
// the current output clock (`sel` is registered on that edge), so a switch
// never cuts a high phase of the old clock short. It does not wait for the
// new clock to be low, so the first high phase after a switch may be shorter
// than normal; a fully glitch-free switch would also synchronise `sel` into
// each source's domain. The selected source must be running for a new
// selection to take effect.
//
// The three sources come from the EM2 clock module description; the select
// encoding and the glitch guard are this design's own.
module em2_clock_sel (
  input  logic       rst_n,
  input  logic       clk_se,
  input  logic       clk_diff,
  input  logic       clk_pll,
  input  logic [1:0] sel,
  output logic       clk_out
);
  logic [1:0] sel_q;

  always_ff @(negedge clk_out or negedge rst_n)
    if (!rst_n) sel_q <= 2'd0;
    else        sel_q <= sel;

  always_comb
    unique case (sel_q)
      2'd0:    clk_out = clk_se;
      2'd1:    clk_out = clk_diff;
      default: clk_out = clk_pll;
    endcase

endmodule
