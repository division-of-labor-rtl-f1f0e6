// t2_sit: the stride identifier table (SIT) of T2. Each of the ENTRIES entries is
// tagged with a modified PC (mPC = PC xor top of the return address stack) and
// holds the last address of that instruction, the delta between its last two
// addresses, the number of consecutive instances with that same delta, the number
// of consecutive instances with a changing delta, and the lead: how many deltas
// beyond the current address have already been prefetched. The expanded fields
// written by P1 mark a strided-pointer load and keep the offset from its loaded
// value to the address of the dependent load.
//
// An access (acc_valid) is looked up combinationally; its results (hit, the new
// delta, whether it repeats the stored one, the strided/non-strided/early-prefetch
// decisions and the decremented lead) are valid in the same cycle and the entry is
// updated at the clock edge. On a miss with acc_alloc an invalid entry, else the
// round-robin victim, is filled with the address. STRIDED_CNT equal deltas in a
// row label an instruction strided, NONSTRIDED_CNT changing deltas in a row
// label it non-strided, and EARLY_CNT equal deltas allow prefetching while still
// under observation; these counts follow the design. If pf_take is set with the
// access, the lead is set to pf_lead, otherwise it drops by one per instance.
// Replacement policy and the lead field are this design's choices.
module t2_sit
  import tpc_pkg::*;
#(
  parameter int unsigned ENTRIES        = 32,
  parameter int unsigned STRIDED_CNT    = 16,
  parameter int unsigned NONSTRIDED_CNT = 4,
  parameter int unsigned EARLY_CNT      = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // access
  input  logic                        acc_valid,
  input  logic                        acc_alloc,
  input  addr_t                       acc_mpc,
  input  addr_t                       acc_addr,
  output logic                        hit,
  output logic [$clog2(ENTRIES)-1:0]  hit_idx,
  output addr_t                       delta_new,
  output logic                        same_delta,
  output logic                        to_strided,
  output logic                        to_nonstrided,
  output logic                        early_ok,
  output logic                        is_ptr,
  output logic [DIST_W-1:0]           lead_dec,
  input  logic                        pf_take,
  input  logic [DIST_W-1:0]           pf_lead,
  // strided-pointer mark from P1
  input  logic                        mark_valid,
  input  addr_t                       mark_mpc,
  input  addr_t                       mark_delta,
  // read of the pointer offset for a returned prefetch
  input  logic [$clog2(ENTRIES)-1:0]  ptr_idx,
  output addr_t                       ptr_delta
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned SW = $clog2(STRIDED_CNT + 1);
  localparam int unsigned CW = $clog2(NONSTRIDED_CNT + 1);

  typedef struct packed {
    logic              valid;
    logic              has_delta;
    addr_t             mpc;
    addr_t             last_addr;
    addr_t             delta;
    logic [SW-1:0]     same_cnt;
    logic [CW-1:0]     chg_cnt;
    logic [DIST_W-1:0] lead;
    logic              is_ptr;
    addr_t             ptr_delta;
  } sit_entry_t;

  sit_entry_t       tab_q [ENTRIES];
  logic [IW-1:0]    rr_q;

  // lookup
  sit_entry_t       e;
  logic [SW-1:0]    same_nxt;
  logic [CW-1:0]    chg_nxt;
  always_comb begin
    hit = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (tab_q[i].valid && tab_q[i].mpc == acc_mpc) begin
        hit = 1'b1;
        hit_idx = IW'(i);
      end
    e          = tab_q[hit_idx];
    delta_new  = acc_addr - e.last_addr;
    same_delta = hit && e.has_delta && delta_new == e.delta;
    if (!e.has_delta) begin
      same_nxt = SW'(1);
      chg_nxt  = '0;
    end else if (delta_new == e.delta) begin
      same_nxt = (e.same_cnt == SW'(STRIDED_CNT)) ? e.same_cnt : e.same_cnt + 1'b1;
      chg_nxt  = '0;
    end else begin
      same_nxt = SW'(1);
      chg_nxt  = (e.chg_cnt == CW'(NONSTRIDED_CNT)) ? e.chg_cnt : e.chg_cnt + 1'b1;
    end
    to_strided    = hit && same_nxt == SW'(STRIDED_CNT);
    to_nonstrided = hit && chg_nxt == CW'(NONSTRIDED_CNT);
    early_ok      = same_delta && same_nxt >= SW'(EARLY_CNT);
    is_ptr        = hit && e.is_ptr;
    lead_dec      = (!same_delta || e.lead == '0) ? '0 : e.lead - 1'b1;
  end

  // allocation victim: first invalid entry, else round robin
  logic [IW-1:0] victim;
  logic          have_free;
  always_comb begin
    have_free = 1'b0;
    victim    = rr_q;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!tab_q[i].valid) begin
        have_free = 1'b1;
        victim    = IW'(i);
      end
  end

  logic          mark_hit;
  logic [IW-1:0] mark_idx;
  always_comb begin
    mark_hit = 1'b0;
    mark_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (tab_q[i].valid && tab_q[i].mpc == mark_mpc) begin
        mark_hit = 1'b1;
        mark_idx = IW'(i);
      end
  end

  assign ptr_delta = tab_q[ptr_idx].ptr_delta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab_q[i] <= '0;
      rr_q <= '0;
    end else begin
      if (mark_valid && mark_hit) begin
        tab_q[mark_idx].is_ptr    <= 1'b1;
        tab_q[mark_idx].ptr_delta <= mark_delta;
      end
      if (acc_valid && hit) begin
        tab_q[hit_idx].last_addr <= acc_addr;
        tab_q[hit_idx].delta     <= delta_new;
        tab_q[hit_idx].has_delta <= 1'b1;
        tab_q[hit_idx].same_cnt  <= same_nxt;
        tab_q[hit_idx].chg_cnt   <= chg_nxt;
        tab_q[hit_idx].lead      <= pf_take ? pf_lead : lead_dec;
      end else if (acc_valid && acc_alloc) begin
        tab_q[victim] <= '{valid: 1'b1, has_delta: 1'b0, mpc: acc_mpc, last_addr: acc_addr,
                           delta: '0, same_cnt: '0, chg_cnt: '0, lead: '0,
                           is_ptr: 1'b0, ptr_delta: '0};
        if (!have_free) rr_q <= (rr_q == IW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
      end
    end
  end
endmodule
