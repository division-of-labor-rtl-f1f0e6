// pf_distance: T2's prefetch distance in loop iterations,
//   d = (AMAT + m) / T_iter,
// where AMAT is the average memory access time, m a margin constant and T_iter
// the average cycles per loop iteration. A restoring divider produces one quotient
// bit per cycle (W cycles per division) and restarts with fresh operands when it
// finishes, so a change of AMAT or T_iter reaches d within W+3 cycles when the divider is idle (2W+4 in the worst case). The
// quotient is clamped to 1..D_MAX; while no loop is identified (or T_iter is 0) d
// is D_DEFAULT. The formula follows the design; the margin, clamp and default
// values and the divider structure are this design's choices.
module pf_distance
  import tpc_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned MARGIN    = 20,
  parameter int unsigned D_MAX     = 16,
  parameter int unsigned D_DEFAULT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      amat,
  input  logic [W-1:0]      t_iter,
  input  logic              loop_valid,
  output logic [DIST_W-1:0] d_out
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W:0]    num_q;     // dividend being shifted out
  logic [W-1:0]  den_q;
  logic [W:0]    rem_q;
  logic [W:0]    quo_q;
  logic [CW-1:0] cnt_q;
  logic          busy_q;
  logic [DIST_W-1:0] dist_q;

  logic [W+1:0] rem_sh;
  logic [W+1:0] num_new;
  logic         qbit;
  logic [W:0]   quo_fin;   // quotient including this cycle's bit
  always_comb begin
    rem_sh  = {rem_q, num_q[W]};
    num_new = {1'b0, amat} + (W+2)'(MARGIN);
    qbit    = rem_sh >= {2'b0, den_q};
    quo_fin = {quo_q[W-1:0], qbit};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      num_q <= '0; den_q <= '0; rem_q <= '0; quo_q <= '0; cnt_q <= '0;
      busy_q <= 1'b0; dist_q <= DIST_W'(D_DEFAULT);
    end else if (!busy_q) begin
      if (loop_valid && t_iter != '0) begin
        num_q  <= num_new[W:0];
        den_q  <= t_iter;
        rem_q  <= '0;
        quo_q  <= '0;
        cnt_q  <= CW'(W + 1);
        busy_q <= 1'b1;
      end else begin
        dist_q <= DIST_W'(D_DEFAULT);
      end
    end else begin
      num_q <= {num_q[W-1:0], 1'b0};
      rem_q <= qbit ? (W+1)'(rem_sh - {2'b0, den_q}) : rem_sh[W:0];
      quo_q <= quo_fin;
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == CW'(1)) begin
        busy_q <= 1'b0;
        if (quo_fin == '0)                dist_q <= DIST_W'(1);
        else if (quo_fin >= (W+1)'(D_MAX)) dist_q <= DIST_W'(D_MAX);
        else                              dist_q <= DIST_W'(quo_fin);
      end
    end
  end

  assign d_out = dist_q;
endmodule
