// tpc_top: TPC, a composite prefetcher built by division of labour. Three
// specialised components each cover one access pattern with high accuracy, and a
// storage-free coordinator decides who handles each memory instruction:
//   T2 - canonical strided streams of one instruction in an inner loop, with
//        the loop hardware (loop_detector) and AMAT tracking giving the
//        prefetch distance d = (AMAT + m) / T_iter;
//   P1 - pointer patterns: arrays of pointers (a load whose address is a
//        strided load's value plus an offset) and pointer chains;
//   C1 - instructions that touch dense regions, which get whole 16-line regions.
// An executed memory instruction goes to T2; if T2 does not own it, to P1; if
// neither does, to C1. T2 and P1 prefetch into L1, C1 into L2. All requests pass
// through pf_queue, which drops C1 prefetches first when it is full.
//
// Interface (one event of each kind per cycle at most):
//   br_*      taken branch (backward when target <= pc), for the loop hardware
//   dec_*     decoded instruction with up to two source and one destination
//             logical register (6-bit ids), for P1's taint unit
//   mem_*     executed memory instruction: pc, top of the return address stack,
//             address, loaded value, load flag, primary-L1-miss flag
//   lat_*     latency of a completed demand miss, for AMAT
//   ic_fill_* I-cache line fill, which clears the instruction state bits
//   pf_*      prefetch request (address, destination 0 = L1 / 1 = L2, source,
//             tag) with valid/ready
//   resp_*    a completed prefetch: its source and tag and the 64-bit word at
//             the prefetched address (used to follow pointers)
// This interface is this design's choice. Status outputs report the component
// mechanisms for observation. Steering and destination decisions are
// combinational; components add one to a few cycles before a request reaches
// the queue, and the queue adds one cycle.
module tpc_top
  import tpc_pkg::*;
#(
  parameter int unsigned SIT_ENTRIES   = 32,
  parameter int unsigned NLPCT_ENTRIES = 20,
  parameter int unsigned STATE_ENTRIES = 8192,
  parameter int unsigned P1_CANDS      = 8,
  parameter int unsigned RM_ENTRIES    = 16,
  parameter int unsigned IM_ENTRIES    = 16,
  parameter int unsigned QUEUE_DEPTH   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              br_valid,
  input  addr_t             br_pc,
  input  addr_t             br_target,
  input  logic              dec_valid,
  input  addr_t             dec_pc,
  input  logic              dec_is_load,
  input  logic              dec_src1_v,
  input  lreg_t             dec_src1,
  input  logic              dec_src2_v,
  input  lreg_t             dec_src2,
  input  logic              dec_dst_v,
  input  lreg_t             dec_dst,
  input  logic              mem_valid,
  input  addr_t             mem_pc,
  input  addr_t             mem_ras_top,
  input  addr_t             mem_addr,
  input  addr_t             mem_value,
  input  logic              mem_is_load,
  input  logic              mem_l1_miss,
  input  logic              lat_valid,
  input  logic [15:0]       lat,
  input  logic              ic_fill_valid,
  input  addr_t             ic_fill_addr,
  output logic              pf_valid,
  output pf_out_t           pf_out,
  input  logic              pf_ready,
  input  logic              resp_valid,
  input  pf_src_e           resp_src,
  input  logic [TAG_W-1:0]  resp_tag,
  input  addr_t             resp_data,
  // status
  output logic              st_iter_pulse,
  output logic              st_loop_valid,
  output logic [DIST_W-1:0] st_dist,
  output logic              st_t2_handled,
  output logic              st_p1_handled,
  output logic              st_c1_handled,
  output logic              st_ptr_mark,
  output logic              st_chain_active,
  output logic              st_chain_reset,
  output logic              st_region_pf,
  output logic              st_c1_decided,
  output logic              st_drop,
  output logic              st_drop_c1
);
  // ---- loop hardware, AMAT, distance ----
  logic        loop_valid;
  addr_t       loop_pc;
  logic [15:0] t_iter, amat;
  logic [DIST_W-1:0] pf_dist;

  loop_detector #(.NLPCT_ENTRIES(NLPCT_ENTRIES)) u_loop (
    .clk, .rst_n, .br_valid, .br_pc, .br_target,
    .iter_pulse(st_iter_pulse), .loop_valid, .loop_pc, .t_iter
  );
  amat_tracker u_amat (.clk, .rst_n, .lat_valid, .lat, .amat);
  pf_distance  u_dist (.clk, .rst_n, .amat, .t_iter, .loop_valid, .d_out(pf_dist));

  // ---- components ----
  logic    t2_handled, p1_handled, c1_handled, p1_ev_valid, c1_ev_valid;
  logic    cand_valid, cand_strided, mark_valid, ptr_fwd_valid;
  addr_t   cand_pc, cand_mpc, mark_mpc, mark_delta, ptr_fwd_addr;
  logic    t2_pf_valid, p1_pf_valid, c1_pf_valid, t2_pf_ready, p1_pf_ready, c1_pf_ready;
  pf_req_t t2_pf_req, p1_pf_req, c1_pf_req;
  logic    c1_dense_unused;

  t2_prefetcher #(.SIT_ENTRIES(SIT_ENTRIES), .STATE_ENTRIES(STATE_ENTRIES)) u_t2 (
    .clk, .rst_n,
    .ev_valid(mem_valid), .ev_pc(mem_pc), .ev_ras_top(mem_ras_top), .ev_addr(mem_addr),
    .ev_is_load(mem_is_load), .ev_l1_miss(mem_l1_miss), .handled(t2_handled),
    .fill_en(ic_fill_valid), .fill_addr(ic_fill_addr), .pf_dist,
    .mark_valid, .mark_mpc, .mark_delta,
    .cand_valid, .cand_pc, .cand_mpc, .cand_strided,
    .resp_valid, .resp_src, .resp_tag, .resp_data, .ptr_fwd_valid, .ptr_fwd_addr,
    .pf_valid(t2_pf_valid), .pf_req(t2_pf_req), .pf_ready(t2_pf_ready)
  );

  p1_prefetcher #(.CAND_ENTRIES(P1_CANDS), .STATE_ENTRIES(STATE_ENTRIES)) u_p1 (
    .clk, .rst_n,
    .cand_valid, .cand_pc, .cand_mpc, .cand_strided,
    .dec_valid, .dec_pc, .dec_is_load, .dec_src1_v, .dec_src1, .dec_src2_v, .dec_src2,
    .dec_dst_v, .dec_dst,
    .ev_valid(mem_valid), .ev_pc(mem_pc), .ev_addr(mem_addr), .ev_value(mem_value),
    .ev_is_load(mem_is_load), .handled(p1_handled),
    .fill_en(ic_fill_valid), .fill_addr(ic_fill_addr), .pf_dist,
    .mark_valid, .mark_mpc, .mark_delta, .ptr_fwd_valid, .ptr_fwd_addr,
    .resp_valid, .resp_src, .resp_tag, .resp_data,
    .pf_valid(p1_pf_valid), .pf_req(p1_pf_req), .pf_ready(p1_pf_ready),
    .chain_active(st_chain_active), .chain_reset(st_chain_reset)
  );

  c1_prefetcher #(.RM_ENTRIES(RM_ENTRIES), .IM_ENTRIES(IM_ENTRIES), .STATE_ENTRIES(STATE_ENTRIES)) u_c1 (
    .clk, .rst_n,
    .acc_valid(mem_valid), .ev_valid(c1_ev_valid), .ev_pc(mem_pc), .ev_addr(mem_addr), .ev_l1_miss(mem_l1_miss),
    .handled(c1_handled), .fill_en(ic_fill_valid), .fill_addr(ic_fill_addr),
    .pf_valid(c1_pf_valid), .pf_req(c1_pf_req), .pf_ready(c1_pf_ready),
    .region_pf_start(st_region_pf), .decided(st_c1_decided), .decided_dense(c1_dense_unused)
  );

  // ---- coordinator and queue ----
  logic    co_valid, q_in_valid;
  pf_out_t co_req;

  tpc_coordinator u_coord (
    .ev_valid(mem_valid), .t2_handled, .p1_handled, .p1_ev_valid, .c1_ev_valid,
    .t2_pf_valid, .t2_pf_req, .t2_pf_ready,
    .p1_pf_valid, .p1_pf_req, .p1_pf_ready,
    .c1_pf_valid, .c1_pf_req, .c1_pf_ready,
    .out_valid(co_valid), .out_req(co_req), .out_ready(1'b1)
  );
  assign q_in_valid = co_valid;

  logic [$clog2(QUEUE_DEPTH+1)-1:0] q_count;
  pf_queue #(.DEPTH(QUEUE_DEPTH)) u_q (
    .clk, .rst_n, .in_valid(q_in_valid), .in_req(co_req),
    .out_valid(pf_valid), .out_req(pf_out), .out_ready(pf_ready),
    .drop(st_drop), .drop_c1(st_drop_c1), .count(q_count)
  );

  assign st_loop_valid   = loop_valid;
  assign st_dist         = pf_dist;
  assign st_t2_handled   = t2_handled;
  assign st_p1_handled   = p1_ev_valid && p1_handled;
  assign st_c1_handled   = c1_handled;
  assign st_ptr_mark     = mark_valid;
endmodule
