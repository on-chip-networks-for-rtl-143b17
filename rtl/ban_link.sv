// ban_link: a bundle of NLINK bidirectional links joining two nodes A and B,
// with the egress multiplexers, ingress demultiplexers and bandwidth arbiter
// of a bandwidth-adaptive network (the single bidirectional link of the original idea generalised to several).
//
// Each side offers the flits at the heads of its NVC virtual-channel queues
// (x_head_valid / x_head_flit; the flit's vc field names the VC buffer at the
// other side) and reports which of its own ingress VC buffers can take a flit
// (x_space). A head flit is eligible when the other side's buffer for it has
// space; the count of eligible heads is the side's pressure for ban_arbiter.
// Each cycle, link l is driven by A when dir[l] = 1 and by B otherwise (the
// tri-state drivers of the physical bundle are modelled as a multiplexer on the
// link, and the receiver of a driven link is the other side only). Each side
// assigns its eligible heads, in round-robin order, to the links it currently
// owns, at most one flit per VC and per destination VC; those flits are
// popped (x_pop) and appear on the other side's ingress outputs
// (x_rx_valid / x_rx_flit, one per destination VC) in the same cycle, to be
// written into its buffers at the next clock edge.
//
// Link count, VC count and the "one flit per VC per cycle" rule follow the BAN
// description; the round-robin assignment of flits to links is this design's
// choice. Defaults: four bidirectional links, four VCs, direction arbitration
// every cycle.
module ban_link
  import noc_pkg::*;
#(
  parameter int NLINK  = 4,
  parameter int NVC    = 4,
  parameter int PERIOD = 1,
  localparam int PW    = $clog2(NVC + 1),
  localparam int LW    = $clog2(NLINK + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // side A
  input  logic             a_head_valid [NVC],
  input  flit_t            a_head_flit  [NVC],
  output logic             a_pop        [NVC],
  input  logic             a_space      [NVC],
  output logic             a_rx_valid   [NVC],
  output flit_t            a_rx_flit    [NVC],
  // side B
  input  logic             b_head_valid [NVC],
  input  flit_t            b_head_flit  [NVC],
  output logic             b_pop        [NVC],
  input  logic             b_space      [NVC],
  output logic             b_rx_valid   [NVC],
  output flit_t            b_rx_flit    [NVC],
  // link state
  output logic [NLINK-1:0] dir,
  output logic [LW-1:0]    n_ab,
  output logic [PW-1:0]    press_a,
  output logic [PW-1:0]    press_b
);
  localparam int VIW = $clog2(NVC > 1 ? NVC : 2);

  logic             elig_a [NVC];
  logic             elig_b [NVC];
  logic             drv_a_v [NLINK], drv_b_v [NLINK];
  flit_t            drv_a_f [NLINK], drv_b_f [NLINK];
  logic             link_v  [NLINK];
  flit_t            link_f  [NLINK];
  logic [VIW-1:0]   ptr;

  // pressures
  always_comb begin
    press_a = '0;
    press_b = '0;
    for (int v = 0; v < NVC; v++) begin
      elig_a[v] = a_head_valid[v] && b_space[int'(a_head_flit[v].vc) % NVC];
      elig_b[v] = b_head_valid[v] && a_space[int'(b_head_flit[v].vc) % NVC];
      press_a   = press_a + PW'(elig_a[v]);
      press_b   = press_b + PW'(elig_b[v]);
    end
  end

  ban_arbiter #(.NLINK(NLINK), .PMAX(NVC), .PERIOD(PERIOD)) u_arb (
    .clk, .rst_n, .press_a, .press_b, .n_ab, .dir
  );

  // egress multiplexers: fill owned links with eligible heads
  always_comb begin
    logic [NVC-1:0] used_a, used_b, dst_a, dst_b;
    used_a = '0; used_b = '0; dst_a = '0; dst_b = '0;
    for (int v = 0; v < NVC; v++) begin
      a_pop[v] = 1'b0;
      b_pop[v] = 1'b0;
    end
    for (int l = 0; l < NLINK; l++) begin
      drv_a_v[l] = 1'b0; drv_a_f[l] = '0;
      drv_b_v[l] = 1'b0; drv_b_f[l] = '0;
      for (int k = 0; k < NVC; k++) begin
        int v, d;
        v = (int'(ptr) + k) % NVC;
        if (dir[l]) begin
          d = int'(a_head_flit[v].vc) % NVC;
          if (!drv_a_v[l] && elig_a[v] && !used_a[v] && !dst_a[d]) begin
            drv_a_v[l] = 1'b1; drv_a_f[l] = a_head_flit[v];
            used_a[v]  = 1'b1; dst_a[d]   = 1'b1; a_pop[v] = 1'b1;
          end
        end else begin
          d = int'(b_head_flit[v].vc) % NVC;
          if (!drv_b_v[l] && elig_b[v] && !used_b[v] && !dst_b[d]) begin
            drv_b_v[l] = 1'b1; drv_b_f[l] = b_head_flit[v];
            used_b[v]  = 1'b1; dst_b[d]   = 1'b1; b_pop[v] = 1'b1;
          end
        end
      end
    end
  end

  // the shared wires of each bidirectional link
  always_comb
    for (int l = 0; l < NLINK; l++) begin
      link_v[l] = dir[l] ? drv_a_v[l] : drv_b_v[l];
      link_f[l] = dir[l] ? drv_a_f[l] : drv_b_f[l];
    end

  // ingress demultiplexers: a link is read only by the side not driving it
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      a_rx_valid[v] = 1'b0; a_rx_flit[v] = '0;
      b_rx_valid[v] = 1'b0; b_rx_flit[v] = '0;
    end
    for (int l = 0; l < NLINK; l++)
      if (link_v[l]) begin
        if (dir[l]) begin
          b_rx_valid[int'(link_f[l].vc) % NVC] = 1'b1;
          b_rx_flit[int'(link_f[l].vc) % NVC]  = link_f[l];
        end else begin
          a_rx_valid[int'(link_f[l].vc) % NVC] = 1'b1;
          a_rx_flit[int'(link_f[l].vc) % NVC]  = link_f[l];
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else        ptr <= (int'(ptr) == NVC - 1) ? '0 : ptr + 1'b1;

endmodule
