// loop_detector: the loop hardware of T2. It finds the innermost loop as the
// backward branch that occurs back to back with no other backward branch in
// between, and measures the average number of cycles per iteration (T_iter).
//
// A taken branch with target <= PC is a backward branch. The loop-branch register
// (LR) holds the PC and target of the current candidate. A backward branch found
// in the Non-Loop PC Table (NLPCT) is ignored. Otherwise:
//  * it matches LR: one iteration of the loop ended (iter_pulse). The LR becomes
//    locked (loop_valid). If another backward branch occurred since the previous
//    instance, that branch is written to the NLPCT, so it no longer disturbs the
//    loop marker.
//  * LR is not locked: the branch replaces the LR content.
//  * LR is locked: the branch is remembered as an interloper; if it occurs twice
//    with no other backward branch in between it is an inner loop and takes over
//    the LR.
// T_iter is an exponential average (weight 1/4) of the cycle counts between
// consecutive loop-branch instances; it is reset when a new loop takes the LR.
// The LR/NLPCT structure follows the design; the rule for recognising non-loop
// branches, the averaging and the NLPCT round-robin replacement are this design's
// choices. All outputs are registered: iter_pulse and t_iter change one cycle
// after the loop-branch instance.
module loop_detector
  import tpc_pkg::*;
#(
  parameter int unsigned NLPCT_ENTRIES = 20,
  parameter int unsigned TITER_W       = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               br_valid,
  input  addr_t              br_pc,
  input  addr_t              br_target,
  output logic               iter_pulse,
  output logic               loop_valid,
  output addr_t              loop_pc,
  output logic [TITER_W-1:0] t_iter
);
  localparam int unsigned NW = $clog2(NLPCT_ENTRIES);

  addr_t            lr_pc_q, lr_tgt_q;
  logic             lr_valid_q, lr_lock_q;
  addr_t            int_pc_q, int_tgt_q;   // interloper since the last instance
  logic             int_valid_q;
  logic             int_b2b_q;             // interloper was the last backward branch
  addr_t            nl_pc_q [NLPCT_ENTRIES];
  logic             nl_v_q  [NLPCT_ENTRIES];
  logic [NW-1:0]    nl_ptr_q;
  logic [TITER_W-1:0] cyc_q;               // cycles since last instance
  logic [TITER_W+1:0] avg_q;               // t_iter * 4
  logic             have_avg_q;
  logic             pulse_q;

  logic backward, in_nlpct, match_lr;
  always_comb begin
    backward = br_valid && (br_target <= br_pc);
    in_nlpct = 1'b0;
    for (int i = 0; i < NLPCT_ENTRIES; i++)
      if (nl_v_q[i] && nl_pc_q[i] == br_pc) in_nlpct = 1'b1;
    match_lr = lr_valid_q && lr_pc_q == br_pc && lr_tgt_q == br_target;
  end

  logic [TITER_W+2:0] avg_nxt;
  always_comb avg_nxt = {1'b0, avg_q} - {3'b0, avg_q[TITER_W+1:2]} + {3'b0, cyc_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lr_pc_q <= '0; lr_tgt_q <= '0; lr_valid_q <= 1'b0; lr_lock_q <= 1'b0;
      int_pc_q <= '0; int_tgt_q <= '0; int_valid_q <= 1'b0; int_b2b_q <= 1'b0;
      for (int i = 0; i < NLPCT_ENTRIES; i++) begin nl_pc_q[i] <= '0; nl_v_q[i] <= 1'b0; end
      nl_ptr_q <= '0; cyc_q <= '0; avg_q <= '0; have_avg_q <= 1'b0; pulse_q <= 1'b0;
    end else begin
      pulse_q <= 1'b0;
      if (cyc_q != '1) cyc_q <= cyc_q + 1'b1;
      if (backward && !in_nlpct) begin
        if (match_lr) begin
          pulse_q    <= 1'b1;
          lr_lock_q  <= 1'b1;
          cyc_q      <= TITER_W'(1);
          if (lr_lock_q) begin
            avg_q      <= have_avg_q ? avg_nxt[TITER_W+1:0] : {cyc_q, 2'b00};
            have_avg_q <= 1'b1;
          end
          if (int_valid_q) begin
            nl_pc_q[nl_ptr_q] <= int_pc_q;
            nl_v_q[nl_ptr_q]  <= 1'b1;
            nl_ptr_q <= (nl_ptr_q == NW'(NLPCT_ENTRIES-1)) ? '0 : nl_ptr_q + 1'b1;
          end
          int_valid_q <= 1'b0;
          int_b2b_q   <= 1'b0;
        end else if (!lr_lock_q) begin
          lr_pc_q <= br_pc; lr_tgt_q <= br_target; lr_valid_q <= 1'b1;
          cyc_q <= TITER_W'(1);
        end else if (int_valid_q && int_b2b_q && int_pc_q == br_pc && int_tgt_q == br_target) begin
          // an inner loop: it takes over the loop-branch register
          lr_pc_q <= br_pc; lr_tgt_q <= br_target;
          lr_lock_q <= 1'b1; pulse_q <= 1'b1;
          have_avg_q <= 1'b0; avg_q <= '0; cyc_q <= TITER_W'(1);
          int_valid_q <= 1'b0; int_b2b_q <= 1'b0;
        end else begin
          int_pc_q <= br_pc; int_tgt_q <= br_target;
          int_valid_q <= 1'b1; int_b2b_q <= 1'b1;
        end
      end
    end
  end

  assign iter_pulse = pulse_q;
  assign loop_valid = lr_lock_q && have_avg_q;
  assign loop_pc    = lr_pc_q;
  assign t_iter     = avg_q[TITER_W+1:2];
endmodule
