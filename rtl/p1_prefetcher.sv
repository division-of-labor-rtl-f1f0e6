// p1_prefetcher: the P1 component, for two pointer patterns that can be
// prefetched in time with small state machines.
//
// Detection. A candidate load i (PtrPC, one entry) is taken from T2 when T2
// labels a load strided or non-strided. The taint unit follows one iteration at
// the decoder from i to its next instance and reports the tainted loads j and
// whether i's address depends on its own previous value.
//  * Array of pointers (i strided): up to CAND_ENTRIES candidates j are checked
//    at execution. Each instance of i records i's loaded value; each instance of
//    j computes addr(j) - value(i). CONFIRM_CNT equal offsets in a row mark i in
//    T2's SIT as a strided-pointer load with that offset (mark_*), which doubles
//    its prefetch distance, and set j's P1 bit.
//  * Pointer chain (i's address depends on i): the same check with j = i
//    (addr of instance n+1 minus value of instance n). On confirmation i's P1 bit
//    is set and the single chain FSM takes i.
// A check that has not confirmed within CHECK_ITERS instances of i is abandoned.
//
// Prefetching.
//  * Strided pointer: every returned T2 prefetch of i's future elements arrives
//    as value + offset (ptr_fwd_*); P1 prefetches that address.
//  * Pointer chain: the next address is only known when the previous prefetch
//    returns. Catch-up: from the value of the current instance, issue
//    value + offset, wait for its data, and repeat until d steps are in flight
//    ahead. Steady state: the last returned value is kept; each new instance of i
//    issues one more step. Correction: one issued address is kept and compared
//    with the addresses of the following instances of i; if none matches within
//    CHAIN_TIMEOUT instances the FSM is cleared, i's P1 bit is reset and i is
//    tested again.
// P1 prefetches go to L1 (coordinator). handled is combinational: the executing
// instruction has its P1 bit set. Requests follow valid/ready from a one-entry
// output register. The reading of "the value of instruction i is delivered to
// P1" as values returned by T2's prefetches, the chain address rule
// A(n+1) = M[A(n)] + offset, the candidate source and the time-outs are this
// design's choices. pf_req.src is always SRC_P1 and only the lowest tag bit is
// used (target or chain); those constant bits stay in the shared request type.
module p1_prefetcher
  import tpc_pkg::*;
#(
  parameter int unsigned CAND_ENTRIES  = 8,
  parameter int unsigned CONFIRM_CNT   = 4,
  parameter int unsigned CHECK_ITERS   = 32,
  parameter int unsigned CHAIN_TIMEOUT = 64,
  parameter int unsigned TAINT_MAX     = 1024,
  parameter int unsigned STATE_ENTRIES = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  // candidate from T2
  input  logic              cand_valid,
  input  addr_t             cand_pc,
  input  addr_t             cand_mpc,
  input  logic              cand_strided,
  // decoded instruction
  input  logic              dec_valid,
  input  addr_t             dec_pc,
  input  logic              dec_is_load,
  input  logic              dec_src1_v,
  input  lreg_t             dec_src1,
  input  logic              dec_src2_v,
  input  lreg_t             dec_src2,
  input  logic              dec_dst_v,
  input  lreg_t             dec_dst,
  // executed memory instruction
  input  logic              ev_valid,
  input  addr_t             ev_pc,
  input  addr_t             ev_addr,
  input  addr_t             ev_value,
  input  logic              ev_is_load,
  output logic              handled,
  // I-cache line fill
  input  logic              fill_en,
  input  addr_t             fill_addr,
  input  logic [DIST_W-1:0] pf_dist,
  // strided-pointer mark to T2
  output logic              mark_valid,
  output addr_t             mark_mpc,
  output addr_t             mark_delta,
  // value + offset of a returned strided-pointer prefetch
  input  logic              ptr_fwd_valid,
  input  addr_t             ptr_fwd_addr,
  // returned prefetches
  input  logic              resp_valid,
  input  pf_src_e           resp_src,
  input  logic [TAG_W-1:0]  resp_tag,
  input  addr_t             resp_data,
  // prefetch requests
  output logic              pf_valid,
  output pf_req_t           pf_req,
  input  logic              pf_ready,
  // status
  output logic              chain_active,
  output logic              chain_reset
);
  localparam int unsigned KW = $clog2(CAND_ENTRIES);
  localparam int unsigned NW = $clog2(CONFIRM_CNT + 1);
  localparam int unsigned IW = $clog2(CHECK_ITERS + 1);
  localparam int unsigned TW = $clog2(CHAIN_TIMEOUT + 1);

  // ---------------- detection ----------------
  typedef enum logic [1:0] {D_IDLE, D_TAINT, D_CHECK} dstate_e;
  typedef struct packed {
    logic          valid;
    logic          has_delta;
    addr_t         pc;
    addr_t         delta;
    logic [NW-1:0] cnt;
  } cand_t;

  dstate_e       d_q;
  addr_t         ptr_pc_q, ptr_mpc_q;
  logic          ptr_strided_q;
  logic          chain_mode_q;
  cand_t         ct_q [CAND_ENTRIES];
  addr_t         val_i_q;
  logic          val_v_q;
  logic [IW-1:0] iter_q;

  logic  t_start, t_busy, t_cand, t_done, t_chain, t_fail;
  addr_t t_cand_pc;
  logic  retest_q;
  addr_t retest_pc_q;

  assign t_start = (d_q == D_IDLE) && !t_busy && (retest_q || cand_valid);

  p1_taint_unit #(.MAX_INSNS(TAINT_MAX)) u_taint (
    .clk, .rst_n, .start(t_start), .ptr_pc(retest_q ? retest_pc_q : cand_pc),
    .dec_valid, .dec_pc, .dec_is_load, .dec_src1_v, .dec_src1, .dec_src2_v, .dec_src2,
    .dec_dst_v, .dec_dst,
    .busy(t_busy), .cand_valid(t_cand), .cand_pc(t_cand_pc), .done(t_done), .chain(t_chain), .fail(t_fail)
  );

  // candidate table lookups
  logic          ev_is_i;
  logic          ct_hit;
  logic [KW-1:0] ct_idx;
  logic          tc_present, tc_free;
  logic [KW-1:0] tc_slot;
  logic          any_cand;
  addr_t         off_new;
  always_comb begin
    ev_is_i = ev_valid && ev_is_load && ev_pc == ptr_pc_q;
    ct_hit = 1'b0; ct_idx = '0;
    tc_present = 1'b0; tc_free = 1'b0; tc_slot = '0; any_cand = 1'b0;
    for (int k = 0; k < CAND_ENTRIES; k++) begin
      if (ct_q[k].valid && ct_q[k].pc == ev_pc) begin ct_hit = 1'b1; ct_idx = KW'(k); end
      if (ct_q[k].valid && ct_q[k].pc == t_cand_pc) tc_present = 1'b1;
      if (ct_q[k].valid) any_cand = 1'b1;
    end
    for (int k = CAND_ENTRIES - 1; k >= 0; k--)
      if (!ct_q[k].valid) begin tc_free = 1'b1; tc_slot = KW'(k); end
    off_new = ev_addr - val_i_q;
  end

  // the entry being checked this cycle: j (array mode) or i itself (chain mode)
  logic          chk_en;
  logic [KW-1:0] chk_idx;
  cand_t         ce;
  logic [NW-1:0] cnt_nxt;
  logic          confirm;
  always_comb begin
    chk_en  = 1'b0;
    chk_idx = ct_idx;
    if (d_q == D_CHECK && val_v_q && ev_valid) begin
      if (chain_mode_q && ev_is_i)                       begin chk_en = 1'b1; chk_idx = '0; end
      else if (!chain_mode_q && ct_hit && !ev_is_i)      chk_en = 1'b1;
    end
    ce = ct_q[chk_idx];
    if (ce.has_delta && ce.delta == off_new)
      cnt_nxt = (ce.cnt == NW'(CONFIRM_CNT)) ? ce.cnt : ce.cnt + 1'b1;
    else
      cnt_nxt = NW'(1);
    confirm = chk_en && cnt_nxt == NW'(CONFIRM_CNT);
  end

  // ---------------- P1 state bits ----------------
  logic  pb_rd;
  logic  pb_wr, pb_data;
  addr_t pb_pc;
  logic  ch_clear;         // chain FSM gives up on its instruction
  addr_t ch_pc_q;

  always_comb begin
    pb_wr = 1'b0; pb_data = 1'b0; pb_pc = ev_pc;
    if (ch_clear) begin
      pb_wr = 1'b1; pb_data = 1'b0; pb_pc = ch_pc_q;
    end else if (confirm) begin
      pb_wr = 1'b1; pb_data = 1'b1; pb_pc = chain_mode_q ? ptr_pc_q : ct_q[chk_idx].pc;
    end
  end

  inst_state_bits #(.W(1), .ENTRIES(STATE_ENTRIES)) u_bits (
    .clk, .rst_n, .rd_pc(ev_pc), .rd_data(pb_rd),
    .wr_en(pb_wr), .wr_pc(pb_pc), .wr_data(pb_data), .fill_en, .fill_addr
  );
  assign handled = ev_valid && pb_rd;

  // ---------------- chain FSM ----------------
  typedef enum logic [1:0] {C_ARMED, C_ISSUE, C_WAIT, C_STEADY} cstate_e;
  cstate_e           c_q;
  logic              ch_valid_q;
  addr_t             ch_delta_q, ch_next_q, ch_stored_q, ch_check_q;
  logic              ch_check_v_q;
  logic [DIST_W-1:0] ch_depth_q;
  logic [TW-1:0]     ch_miss_q;
  logic              ch_load;
  logic              ch_ev, ch_resp;

  assign ch_load  = confirm && chain_mode_q && !ch_valid_q;
  assign ch_ev    = ch_valid_q && ev_valid && ev_pc == ch_pc_q;
  assign ch_resp  = resp_valid && resp_src == SRC_P1 && resp_tag == P1_TAG_CHAIN;
  assign ch_clear = ch_ev && c_q != C_ARMED && !(ch_check_v_q && ev_addr == ch_check_q) &&
                    ch_miss_q == TW'(CHAIN_TIMEOUT - 1);

  // ---------------- output register ----------------
  logic    out_v_q;
  pf_req_t out_q;
  logic    ptr_pend_q;
  addr_t   ptr_pend_addr_q;
  logic    out_free, take_chain, take_ptr;
  always_comb begin
    out_free   = !out_v_q || pf_ready;
    take_chain = out_free && ch_valid_q && c_q == C_ISSUE;
    take_ptr   = out_free && !take_chain && ptr_pend_q;
  end
  assign pf_valid = out_v_q;
  assign pf_req   = out_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q <= D_IDLE; ptr_pc_q <= '0; ptr_mpc_q <= '0; ptr_strided_q <= 1'b0; chain_mode_q <= 1'b0;
      for (int k = 0; k < CAND_ENTRIES; k++) ct_q[k] <= '0;
      val_i_q <= '0; val_v_q <= 1'b0; iter_q <= '0;
      retest_q <= 1'b0; retest_pc_q <= '0;
      mark_valid <= 1'b0; mark_mpc <= '0; mark_delta <= '0;
      c_q <= C_ARMED; ch_valid_q <= 1'b0; ch_pc_q <= '0; ch_delta_q <= '0; ch_next_q <= '0;
      ch_stored_q <= '0; ch_check_q <= '0; ch_check_v_q <= 1'b0; ch_depth_q <= '0; ch_miss_q <= '0;
      out_v_q <= 1'b0; out_q <= '0; ptr_pend_q <= 1'b0; ptr_pend_addr_q <= '0;
      chain_reset <= 1'b0;
    end else begin
      mark_valid  <= 1'b0;
      chain_reset <= 1'b0;
      // ---- detection ----
      unique case (d_q)
        D_IDLE: if (t_start) begin
          d_q           <= D_TAINT;
          ptr_pc_q      <= retest_q ? retest_pc_q : cand_pc;
          ptr_mpc_q     <= retest_q ? '0 : cand_mpc;
          ptr_strided_q <= retest_q ? 1'b0 : cand_strided;
          retest_q      <= 1'b0;
          for (int k = 0; k < CAND_ENTRIES; k++) ct_q[k] <= '0;
        end
        D_TAINT: begin
          if (t_cand && !tc_present && tc_free)
            ct_q[tc_slot] <= '{valid: 1'b1, has_delta: 1'b0, pc: t_cand_pc, delta: '0, cnt: '0};
          if (t_fail) d_q <= D_IDLE;
          else if (t_done) begin
            val_v_q <= 1'b0;
            iter_q  <= '0;
            if (t_chain) begin
              chain_mode_q <= 1'b1;
              for (int k = 1; k < CAND_ENTRIES; k++) ct_q[k] <= '0;
              ct_q[0] <= '{valid: 1'b1, has_delta: 1'b0, pc: ptr_pc_q, delta: '0, cnt: '0};
              d_q <= D_CHECK;
            end else if (ptr_strided_q && any_cand) begin
              chain_mode_q <= 1'b0;
              d_q <= D_CHECK;
            end else begin
              d_q <= D_IDLE;
            end
          end
        end
        D_CHECK: begin
          if (chk_en) begin
            ct_q[chk_idx].has_delta <= 1'b1;
            ct_q[chk_idx].delta     <= off_new;
            ct_q[chk_idx].cnt       <= cnt_nxt;
          end
          if (ev_is_i) begin
            val_i_q <= ev_value;
            val_v_q <= 1'b1;
            iter_q  <= iter_q + 1'b1;
          end
          if (confirm) begin
            d_q <= D_IDLE;
            if (!chain_mode_q) begin
              mark_valid <= 1'b1;
              mark_mpc   <= ptr_mpc_q;
              mark_delta <= off_new;
            end
          end else if (ev_is_i && iter_q == IW'(CHECK_ITERS - 1)) begin
            d_q <= D_IDLE;
          end
        end
        default: d_q <= D_IDLE;
      endcase

      // ---- chain FSM ----
      if (ch_load) begin
        ch_valid_q   <= 1'b1;
        ch_pc_q      <= ptr_pc_q;
        ch_delta_q   <= off_new;
        c_q          <= C_ARMED;
        ch_check_v_q <= 1'b0;
        ch_miss_q    <= '0;
        ch_depth_q   <= '0;
      end else if (ch_valid_q) begin
        if (ch_clear) begin
          ch_valid_q  <= 1'b0;
          chain_reset <= 1'b1;
          retest_q    <= 1'b1;
          retest_pc_q <= ch_pc_q;
        end else begin
          if (ch_ev && c_q != C_ARMED) begin
            if (ch_check_v_q && ev_addr == ch_check_q) begin
              ch_miss_q    <= '0;
              ch_check_v_q <= 1'b0;   // the next issued address becomes the check
            end else begin
              ch_miss_q <= ch_miss_q + 1'b1;
            end
          end
          unique case (c_q)
            C_ARMED: if (ch_ev) begin
              ch_next_q  <= ev_value + ch_delta_q;
              ch_depth_q <= '0;
              c_q        <= C_ISSUE;
            end
            C_ISSUE: if (take_chain) begin
              c_q <= C_WAIT;
              if (!ch_check_v_q || (ch_ev && ev_addr == ch_check_q)) begin
                ch_check_q   <= ch_next_q;
                ch_check_v_q <= 1'b1;
              end
            end
            C_WAIT: if (ch_resp) begin
              if (ch_depth_q + 1'b1 < pf_dist) begin
                ch_depth_q <= ch_depth_q + 1'b1;
                ch_next_q  <= resp_data + ch_delta_q;
                c_q        <= C_ISSUE;
              end else begin
                ch_depth_q  <= pf_dist;
                ch_stored_q <= resp_data;
                c_q         <= C_STEADY;
              end
            end
            C_STEADY: if (ch_ev) begin
              ch_next_q  <= ch_stored_q + ch_delta_q;
              ch_depth_q <= (ch_depth_q == '0) ? '0 : ch_depth_q - 1'b1;
              c_q        <= C_ISSUE;
            end
            default: c_q <= C_ARMED;
          endcase
        end
      end

      // ---- strided-pointer targets and output register ----
      if (ptr_fwd_valid) begin
        ptr_pend_q      <= 1'b1;
        ptr_pend_addr_q <= ptr_fwd_addr;
      end else if (take_ptr) begin
        ptr_pend_q <= 1'b0;
      end
      if (take_chain) begin
        out_v_q <= 1'b1;
        out_q   <= '{addr: ch_next_q, src: SRC_P1, tag: P1_TAG_CHAIN};
      end else if (take_ptr) begin
        out_v_q <= 1'b1;
        out_q   <= '{addr: ptr_pend_addr_q, src: SRC_P1, tag: P1_TAG_TARGET};
      end else if (pf_ready) begin
        out_v_q <= 1'b0;
      end
    end
  end

  assign chain_active = ch_valid_q && c_q == C_STEADY;

  // valid/ready: a presented request is held unchanged until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && pf_req == $past(pf_req))
    else $error("%m: request changed while stalled");
endmodule
