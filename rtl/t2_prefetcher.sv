// t2_prefetcher: the T2 component, a prefetcher for canonical strided streams,
// i.e. streams produced by one static memory instruction inside an inner loop.
//
// Every memory instruction has a 2-bit state beside the I-cache (inst_state_bits):
//   0 unknown     - ignored until it causes a primary L1 miss, then -> 1
//   1 observation - every instance updates the SIT; 16 equal deltas in a row -> 2,
//                   4 changing deltas in a row -> 3; prefetching already starts
//                   after 4 equal deltas
//   2 strided     - every instance with the stored delta prefetches
//   3 non-strided - ignored
// The SIT is indexed by mPC = PC xor top of the return address stack, which
// separates streams reached through different call sites. A strided instruction
// whose SIT entry was evicted goes back to state 1 (this design's choice).
//
// Prefetching keeps the stream d iterations ahead, d = (AMAT + m)/T_iter from
// pf_distance (2d for a load marked by P1 as a strided pointer). On an instance
// the SIT's lead (deltas already prefetched ahead) is compared with d and the
// missing addresses addr + k*delta are handed to the prefetch engine as one run;
// a run refused by a busy engine is dropped and caught up on a later instance.
// T2's prefetches go to L1 (destination set by the coordinator).
//
// When a load becomes strided or non-strided, it is offered to P1 as a candidate
// (cand_*). Prefetches of a strided-pointer load carry source SRC_T2PTR and the
// SIT index as tag; when such a prefetch returns, its data word plus the stored
// pointer offset is passed to P1 (ptr_fwd_*), which prefetches the pointed-to
// line. handled is combinational: T2 owns the executing instruction (state 2).
// cand_* and ptr_fwd_* are registered one-cycle pulses. The upper bit of pf_req.src
// is always 0 here (T2 only issues SRC_T2 and SRC_T2PTR); the shared request type
// keeps it.
module t2_prefetcher
  import tpc_pkg::*;
#(
  parameter int unsigned SIT_ENTRIES   = 32,
  parameter int unsigned STATE_ENTRIES = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  // executed memory instruction
  input  logic              ev_valid,
  input  addr_t             ev_pc,
  input  addr_t             ev_ras_top,
  input  addr_t             ev_addr,
  input  logic              ev_is_load,
  input  logic              ev_l1_miss,
  output logic              handled,
  // I-cache line fill
  input  logic              fill_en,
  input  addr_t             fill_addr,
  // prefetch distance
  input  logic [DIST_W-1:0] pf_dist,
  // strided-pointer mark from P1
  input  logic              mark_valid,
  input  addr_t             mark_mpc,
  input  addr_t             mark_delta,
  // candidate for P1
  output logic              cand_valid,
  output addr_t             cand_pc,
  output addr_t             cand_mpc,
  output logic              cand_strided,
  // returned prefetches
  input  logic              resp_valid,
  input  pf_src_e           resp_src,
  input  logic [TAG_W-1:0]  resp_tag,
  input  addr_t             resp_data,
  output logic              ptr_fwd_valid,
  output addr_t             ptr_fwd_addr,
  // prefetch requests
  output logic              pf_valid,
  output pf_req_t           pf_req,
  input  logic              pf_ready
);
  localparam int unsigned IW = $clog2(SIT_ENTRIES);

  istate_e     st;
  logic [1:0]  st_raw;
  logic        st_wr;
  istate_e     st_nxt;
  addr_t       mpc;

  inst_state_bits #(.W(2), .ENTRIES(STATE_ENTRIES)) u_state (
    .clk, .rst_n,
    .rd_pc(ev_pc), .rd_data(st_raw),
    .wr_en(st_wr), .wr_pc(ev_pc), .wr_data(st_nxt),
    .fill_en, .fill_addr
  );
  assign st  = istate_e'(st_raw);
  assign mpc = ev_pc ^ ev_ras_top;

  // SIT
  logic              sit_acc, sit_hit, same_delta, to_strided, to_nonstrided, early_ok, is_ptr;
  logic [IW-1:0]     hit_idx;
  addr_t             delta_new, ptr_delta;
  logic [DIST_W-1:0] lead_dec, d_eff;
  logic              want_pf, pf_take, eng_idle;

  always_comb begin
    sit_acc = ev_valid && (st == IS_OBSERVE || st == IS_STRIDED || (st == IS_UNKNOWN && ev_l1_miss));
    d_eff   = is_ptr ? ((pf_dist >= DIST_W'(1 << (DIST_W - 1))) ? '1 : {pf_dist[DIST_W-2:0], 1'b0}) : pf_dist;
    want_pf = ev_valid && sit_hit &&
              ((st == IS_OBSERVE && early_ok) || (st == IS_STRIDED && same_delta)) &&
              (lead_dec < d_eff);
    pf_take = want_pf && eng_idle;
  end

  t2_sit #(.ENTRIES(SIT_ENTRIES)) u_sit (
    .clk, .rst_n,
    .acc_valid(sit_acc), .acc_alloc(1'b1), .acc_mpc(mpc), .acc_addr(ev_addr),
    .hit(sit_hit), .hit_idx, .delta_new, .same_delta, .to_strided, .to_nonstrided,
    .early_ok, .is_ptr, .lead_dec, .pf_take, .pf_lead(d_eff),
    .mark_valid, .mark_mpc, .mark_delta,
    .ptr_idx(resp_tag[IW-1:0]), .ptr_delta
  );

  // state transitions
  always_comb begin
    st_wr  = 1'b0;
    st_nxt = st;
    if (ev_valid) begin
      unique case (st)
        IS_UNKNOWN:    if (ev_l1_miss) begin st_wr = 1'b1; st_nxt = IS_OBSERVE; end
        IS_OBSERVE:    if (sit_hit && to_strided)         begin st_wr = 1'b1; st_nxt = IS_STRIDED; end
                       else if (sit_hit && to_nonstrided) begin st_wr = 1'b1; st_nxt = IS_NONSTRIDED; end
        IS_STRIDED:    if (!sit_hit) begin st_wr = 1'b1; st_nxt = IS_OBSERVE; end
        IS_NONSTRIDED: ;
      endcase
    end
  end

  assign handled = ev_valid && st == IS_STRIDED;

  t2_pf_engine u_eng (
    .clk, .rst_n,
    .req_valid(pf_take), .req_base(ev_addr), .req_delta(delta_new),
    .req_from(lead_dec + 1'b1), .req_to(d_eff),
    .req_src(is_ptr ? SRC_T2PTR : SRC_T2), .req_tag(TAG_W'(hit_idx)),
    .idle(eng_idle), .pf_valid, .pf_req, .pf_ready
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cand_valid <= 1'b0; cand_pc <= '0; cand_mpc <= '0; cand_strided <= 1'b0;
      ptr_fwd_valid <= 1'b0; ptr_fwd_addr <= '0;
    end else begin
      cand_valid    <= st_wr && ev_is_load && (st_nxt == IS_STRIDED || st_nxt == IS_NONSTRIDED);
      cand_pc       <= ev_pc;
      cand_mpc      <= mpc;
      cand_strided  <= st_nxt == IS_STRIDED;
      ptr_fwd_valid <= resp_valid && resp_src == SRC_T2PTR;
      ptr_fwd_addr  <= resp_data + ptr_delta;
    end
  end
endmodule
