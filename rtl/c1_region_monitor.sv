// c1_region_monitor: the Region Monitor (RM) of the C1 component. A region is a
// super line of 16 consecutive 64-byte lines. Each of the ENTRIES entries holds a
// region tag, a 16-bit vector of the lines touched and an IM_ENTRIES-bit vector of
// the Instruction Monitor entries whose instruction touched the region.
// Every access (acc_valid) sets its line bit, and, if the accessing instruction
// is being monitored (acc_im_valid), bit acc_im_id of the instruction vector. An
// access to a region not present takes an invalid entry, else the round-robin
// victim; evicting a valid region reports it one cycle later on ev_valid with
// ev_dense (more than six lines touched) and ev_pcvec (the instructions that
// touched it). im_clear removes one IM entry's bit from every region when that IM
// entry is vacated. The structure and the density rule follow the design; the
// round-robin victim choice is this design's.
module c1_region_monitor
  import tpc_pkg::*;
#(
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned IM_ENTRIES = 16,
  parameter int unsigned DENSE_MIN  = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          acc_valid,
  input  addr_t                         acc_addr,
  input  logic                          acc_im_valid,
  input  logic [$clog2(IM_ENTRIES)-1:0] acc_im_id,
  input  logic                          im_clear,
  input  logic [$clog2(IM_ENTRIES)-1:0] im_clear_id,
  output logic                          ev_valid,
  output logic                          ev_dense,
  output logic [IM_ENTRIES-1:0]         ev_pcvec,
  output logic [ADDR_W-REGION_OFF-1:0]  ev_region
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned RW = ADDR_W - REGION_OFF;

  typedef struct packed {
    logic                     valid;
    logic [RW-1:0]            tag;
    logic [REGION_LINES-1:0]  lines;
    logic [IM_ENTRIES-1:0]    pcs;
  } rm_entry_t;

  rm_entry_t     rm_q [ENTRIES];
  logic [EW-1:0] rr_q;

  logic [RW-1:0] reg_tag;
  logic [3:0]    line_idx;
  logic          hit, have_free;
  logic [EW-1:0] hit_idx, victim;
  logic [$clog2(REGION_LINES+1)-1:0] pop;
  always_comb begin
    reg_tag  = acc_addr[ADDR_W-1:REGION_OFF];
    line_idx = acc_addr[LINE_OFF +: 4];
    hit = 1'b0; hit_idx = '0;
    have_free = 1'b0; victim = rr_q;
    for (int i = 0; i < ENTRIES; i++)
      if (rm_q[i].valid && rm_q[i].tag == reg_tag) begin hit = 1'b1; hit_idx = EW'(i); end
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!rm_q[i].valid) begin have_free = 1'b1; victim = EW'(i); end
    pop = '0;
    for (int b = 0; b < REGION_LINES; b++) pop = pop + rm_q[victim].lines[b];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) rm_q[i] <= '0;
      rr_q <= '0;
      ev_valid <= 1'b0; ev_dense <= 1'b0; ev_pcvec <= '0; ev_region <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (im_clear)
        for (int i = 0; i < ENTRIES; i++) rm_q[i].pcs[im_clear_id] <= 1'b0;
      if (acc_valid) begin
        if (hit) begin
          rm_q[hit_idx].lines[line_idx] <= 1'b1;
          if (acc_im_valid) rm_q[hit_idx].pcs[acc_im_id] <= 1'b1;
        end else begin
          if (rm_q[victim].valid) begin
            ev_valid  <= 1'b1;
            ev_dense  <= pop >= ($clog2(REGION_LINES+1))'(DENSE_MIN);
            ev_pcvec  <= rm_q[victim].pcs & ~((im_clear ? IM_ENTRIES'(1) : '0) << im_clear_id);
            ev_region <= rm_q[victim].tag;
          end
          rm_q[victim].valid <= 1'b1;
          rm_q[victim].tag   <= reg_tag;
          rm_q[victim].lines <= REGION_LINES'(1) << line_idx;
          rm_q[victim].pcs   <= acc_im_valid ? (IM_ENTRIES'(1) << acc_im_id) : '0;
          if (!have_free) rr_q <= (rr_q == EW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
        end
      end
    end
  end
endmodule
