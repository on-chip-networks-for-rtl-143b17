// rr_arbiter: round-robin arbiter used by the virtual-channel and switch
// allocators and by the ENC controller.
//
// Combinational grant: the first requester at or after the rotating pointer
// wins. The pointer moves to one past the winner on a clock edge where
// `advance` is high, so a requester that keeps losing is served within N
// grants. Reset puts the pointer at requester 0. One-hot `grant`, plus the
// winner's index and `any` for convenience. Round robin is this design's
// choice of arbitration policy.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req,
  input  logic                        advance,
  output logic [N-1:0]                grant,
  output logic [$clog2(N>1?N:2)-1:0]  grant_idx,
  output logic                        any
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any            = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && any)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

endmodule
