// c1_prefetcher: the C1 component ("carpet bombing"), which fetches whole regions
// (16 lines) for instructions whose accesses show high spatial locality.
//
// The Instruction Monitor (IM) has IM_ENTRIES entries, each a PC with two
// counters, TotalRegions and DenseRegions. An instruction that reaches C1 with a
// primary L1 miss, is not yet marked and is not monitored takes a free IM entry;
// entries are never evicted, only vacated after a decision. The Region Monitor
// (c1_region_monitor) sees every executed memory access (acc_valid), as the
// design asks for every cache access, and records which lines of each region were
// touched and which monitored instructions (among the accesses steered to C1,
// ev_valid) touched it. When a region leaves the RM, every
// instruction that touched it counts one more region, and one more dense region
// if more than six of its lines were touched. After DECIDE_REGIONS regions the
// instruction is marked dense if more than 3/4 of them were dense; its entry is
// vacated either way (one decision per cycle). The mark is one bit per
// instruction slot beside the I-cache, cleared on a line fill.
// A marked instruction that executes starts a region prefetch: the other 15 lines
// of its region are requested, one per cycle, for the L2 (coordinator). The last
// region prefetched is remembered and not requested again back to back.
// Sizes and thresholds follow the design; the choice of IM candidates and the
// repeat filter are this design's. Requests follow valid/ready. handled is
// combinational: the executing instruction is marked. pf_req is line aligned and
// always carries source SRC_C1 and tag 0; those constant bits stay in the shared
// request type.
module c1_prefetcher
  import tpc_pkg::*;
#(
  parameter int unsigned RM_ENTRIES     = 16,
  parameter int unsigned IM_ENTRIES     = 16,
  parameter int unsigned DECIDE_REGIONS = 4,
  parameter int unsigned DENSE_MIN      = 7,
  parameter int unsigned STATE_ENTRIES  = 8192
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    acc_valid,   // any executed memory access, for the region monitor
  input  logic    ev_valid,    // an access steered to C1
  input  addr_t   ev_pc,
  input  addr_t   ev_addr,
  input  logic    ev_l1_miss,
  output logic    handled,
  input  logic    fill_en,
  input  addr_t   fill_addr,
  output logic    pf_valid,
  output pf_req_t pf_req,
  input  logic    pf_ready,
  // status pulses
  output logic    region_pf_start,
  output logic    decided,
  output logic    decided_dense
);
  localparam int unsigned KW = $clog2(IM_ENTRIES);
  localparam int unsigned CW = $clog2(DECIDE_REGIONS + 1);
  localparam int unsigned RW = ADDR_W - REGION_OFF;

  typedef struct packed {
    logic          valid;
    addr_t         pc;
    logic [CW-1:0] total;
    logic [CW-1:0] dense;
  } im_entry_t;

  im_entry_t im_q [IM_ENTRIES];

  // ---- dense marks ----
  logic  mark_rd, mark_wr;
  addr_t mark_pc;
  inst_state_bits #(.W(1), .ENTRIES(STATE_ENTRIES)) u_bits (
    .clk, .rst_n, .rd_pc(ev_pc), .rd_data(mark_rd),
    .wr_en(mark_wr), .wr_pc(mark_pc), .wr_data(1'b1), .fill_en, .fill_addr
  );
  assign handled = ev_valid && mark_rd;

  // ---- IM lookup / allocation ----
  logic          im_hit, im_free;
  logic [KW-1:0] im_id, im_slot;
  logic          alloc;
  always_comb begin
    im_hit = 1'b0; im_id = '0; im_free = 1'b0; im_slot = '0;
    for (int k = 0; k < IM_ENTRIES; k++)
      if (im_q[k].valid && im_q[k].pc == ev_pc) begin im_hit = 1'b1; im_id = KW'(k); end
    for (int k = IM_ENTRIES - 1; k >= 0; k--)
      if (!im_q[k].valid) begin im_free = 1'b1; im_slot = KW'(k); end
    alloc = ev_valid && ev_l1_miss && !im_hit && !mark_rd && im_free;
  end

  // ---- decision: lowest entry that has seen DECIDE_REGIONS regions ----
  logic          dec_any;
  logic [KW-1:0] dec_id;
  logic          dec_dense;
  always_comb begin
    dec_any = 1'b0; dec_id = '0;
    for (int k = IM_ENTRIES - 1; k >= 0; k--)
      if (im_q[k].valid && im_q[k].total >= CW'(DECIDE_REGIONS)) begin dec_any = 1'b1; dec_id = KW'(k); end
    // dense / total > 3/4
    dec_dense = ({2'b0, im_q[dec_id].dense} << 2) > (({2'b0, im_q[dec_id].total} << 1) + {2'b0, im_q[dec_id].total});
    mark_wr   = dec_any && dec_dense;
    mark_pc   = im_q[dec_id].pc;
  end

  // ---- region monitor ----
  logic                  rm_ev, rm_dense;
  logic [IM_ENTRIES-1:0] rm_pcvec;
  logic [RW-1:0]         rm_region;
  c1_region_monitor #(.ENTRIES(RM_ENTRIES), .IM_ENTRIES(IM_ENTRIES), .DENSE_MIN(DENSE_MIN)) u_rm (
    .clk, .rst_n, .acc_valid, .acc_addr(ev_addr),
    .acc_im_valid(ev_valid && im_hit), .acc_im_id(im_id),
    .im_clear(dec_any), .im_clear_id(dec_id),
    .ev_valid(rm_ev), .ev_dense(rm_dense), .ev_pcvec(rm_pcvec), .ev_region(rm_region)
  );

  // ---- region prefetch generator ----
  logic          gen_busy_q;
  logic [RW-1:0] gen_region_q, last_region_q;
  logic          last_v_q;
  logic [3:0]    gen_line_q, gen_skip_q;
  logic          trig;
  always_comb begin
    trig     = ev_valid && mark_rd && !gen_busy_q &&
               !(last_v_q && last_region_q == ev_addr[ADDR_W-1:REGION_OFF]);
    pf_valid = gen_busy_q && gen_line_q != gen_skip_q;
    pf_req   = '{addr: {gen_region_q, gen_line_q, {LINE_OFF{1'b0}}}, src: SRC_C1, tag: '0};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < IM_ENTRIES; k++) im_q[k] <= '0;
      gen_busy_q <= 1'b0; gen_region_q <= '0; last_region_q <= '0; last_v_q <= 1'b0;
      gen_line_q <= '0; gen_skip_q <= '0;
      region_pf_start <= 1'b0; decided <= 1'b0; decided_dense <= 1'b0;
    end else begin
      region_pf_start <= 1'b0;
      decided         <= dec_any;
      decided_dense   <= dec_any && dec_dense;
      // region evictions update the counters of the instructions that touched them
      if (rm_ev)
        for (int k = 0; k < IM_ENTRIES; k++)
          if (im_q[k].valid && rm_pcvec[k] && im_q[k].total < CW'(DECIDE_REGIONS)) begin
            im_q[k].total <= im_q[k].total + 1'b1;
            if (rm_dense) im_q[k].dense <= im_q[k].dense + 1'b1;
          end
      if (dec_any) im_q[dec_id].valid <= 1'b0;
      if (alloc) im_q[im_slot] <= '{valid: 1'b1, pc: ev_pc, total: '0, dense: '0};
      // generator
      if (trig) begin
        gen_busy_q      <= 1'b1;
        gen_region_q    <= ev_addr[ADDR_W-1:REGION_OFF];
        gen_skip_q      <= ev_addr[LINE_OFF +: 4];
        gen_line_q      <= (ev_addr[LINE_OFF +: 4] == 4'd0) ? 4'd1 : 4'd0;
        last_region_q   <= ev_addr[ADDR_W-1:REGION_OFF];
        last_v_q        <= 1'b1;
        region_pf_start <= 1'b1;
      end else if (gen_busy_q && (pf_ready || !pf_valid)) begin
        if (gen_line_q == 4'd15 || (gen_line_q == 4'd14 && gen_skip_q == 4'd15)) gen_busy_q <= 1'b0;
        gen_line_q <= (gen_line_q + 4'd1 == gen_skip_q) ? gen_line_q + 4'd2 : gen_line_q + 4'd1;
      end
    end
  end

  // valid/ready: a presented request is held unchanged until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && pf_req == $past(pf_req))
    else $error("%m: request changed while stalled");
endmodule
