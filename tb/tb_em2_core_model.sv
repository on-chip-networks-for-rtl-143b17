// tb_em2_core_model: behavioural stand-in for the two-context core of an EM2
// tile, used to exercise thread migration in the chip-level tests.
//
// Context word 0 holds the thread number, word 1 how many times the thread
// has been loaded into a context (the native thread present at reset names
// itself on its first cycle and counts that as a load). When a thread arrives in a slot the model
// increments word 1 (a context write), reports progress after a random
// 1..8 cycles and then, while `mig_en` is high, asks with probability 1/2 to
// migrate to a random other tile, holding the request until the thread has
// left; otherwise it runs another 1..8 cycles and decides again. Without
// `mig_en`, threads stay where they are.
module tb_em2_core_model
  import noc_pkg::*;
#(
  parameter int TX = 3,
  parameter int TY = 3,
  parameter int CW = 4 * DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mig_en,
  input  int            my_id,
  input  logic          slot_valid   [2],
  input  logic [CW-1:0] slot_ctx     [2],
  output logic          core_progress[2],
  output logic          core_mig_req [2],
  output coord_t        core_mig_dx  [2],
  output coord_t        core_mig_dy  [2],
  output logic          core_wr      [2],
  output logic [CW-1:0] core_wr_ctx  [2]
);
  logic prev_valid [2];
  int   wait_cnt   [2];
  logic decided    [2];

  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      core_progress[s] <= 1'b0;
      core_wr[s]       <= 1'b0;
      if (!rst_n) begin
        prev_valid[s]   <= 1'b0;
        core_mig_req[s] <= 1'b0;
        core_mig_dx[s]  <= '0;
        core_mig_dy[s]  <= '0;
        core_wr_ctx[s]  <= '0;
        wait_cnt[s]     <= 0;
        decided[s]      <= 1'b0;
      end else begin
        prev_valid[s] <= slot_valid[s];
        if (slot_valid[s] && !prev_valid[s]) begin
          logic [CW-1:0] c;
          c = slot_ctx[s];
          if (c[DATA_W +: DATA_W] == '0) c[DATA_W-1:0] = DATA_W'(my_id);
          c[DATA_W +: DATA_W] = c[DATA_W +: DATA_W] + 1'b1;
          core_wr[s]     <= 1'b1;
          core_wr_ctx[s] <= c;
          wait_cnt[s]    <= int'($urandom_range(8, 1));
          decided[s]     <= 1'b0;
          core_mig_req[s] <= 1'b0;
        end else if (slot_valid[s]) begin
          if (wait_cnt[s] > 1) wait_cnt[s] <= wait_cnt[s] - 1;
          else if (!decided[s]) begin
            core_progress[s] <= 1'b1;
            wait_cnt[s]      <= int'($urandom_range(8, 1));
            if (mig_en && $urandom_range(1) == 1) begin
              int d;
              d = int'($urandom_range(TX * TY - 2));
              if (d >= my_id) d++;
              decided[s]      <= 1'b1;
              core_mig_req[s] <= 1'b1;
              core_mig_dx[s]  <= coord_t'(d % TX);
              core_mig_dy[s]  <= coord_t'(d / TX);
            end
          end
        end else begin
          core_mig_req[s] <= 1'b0;
        end
      end
    end
  end
endmodule
