// inst_state_bits: per-instruction state bits held beside the instruction cache.
// One W-bit field per 4-byte instruction slot, ENTRIES slots, indexed by PC bits
// above the instruction offset. T2 keeps its 2-bit state (unknown, observation,
// strided, non-strided) here; P1 and C1 keep one mark bit each. An I-cache line
// fill returns the 16 slots of that 64-byte line to zero, as a freshly filled line
// starts with every memory instruction in state 0. Read is combinational; a write
// and a fill take effect at the next clock edge, the fill winning over a write to
// the same line. The bits are stored as one word per I-cache line with a valid
// bit per line, so reset and a fill only clear that valid bit; a line that is not
// valid reads as zero, and the first write to it zeroes its other slots. 8192 slots follow from the 2 KB (2 bits per slot) and 1 KB
// (1 bit per slot) budgets of the design; the indexing is this design's choice.
module inst_state_bits
  import tpc_pkg::*;
#(
  parameter int unsigned W       = 2,
  parameter int unsigned ENTRIES = 8192
) (
  input  logic          clk,
  input  logic          rst_n,
  input  addr_t         rd_pc,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  addr_t         wr_pc,
  input  logic [W-1:0]  wr_data,
  input  logic          fill_en,
  input  addr_t         fill_addr
);
  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  localparam int unsigned PER_LN = 1 << (LINE_OFF - INSN_OFF);   // slots per I-cache line
  localparam int unsigned LW     = $clog2(PER_LN);
  localparam int unsigned LINES  = ENTRIES / PER_LN;
  localparam int unsigned LNW    = IDX_W - LW;

  // one word per I-cache line; a line whose valid bit is clear reads as all zero
  logic [PER_LN*W-1:0] line_q [LINES];
  logic [LINES-1:0]    lvalid_q;

  logic [LNW-1:0] rd_ln, wr_ln, fill_ln;
  logic [LW-1:0]  rd_sl, wr_sl;
  assign rd_ln   = rd_pc[LINE_OFF +: LNW];
  assign rd_sl   = rd_pc[INSN_OFF +: LW];
  assign wr_ln   = wr_pc[LINE_OFF +: LNW];
  assign wr_sl   = wr_pc[INSN_OFF +: LW];
  assign fill_ln = fill_addr[LINE_OFF +: LNW];

  logic [PER_LN*W-1:0] rd_word, wr_old, wr_new;
  always_comb begin
    rd_word = lvalid_q[rd_ln] ? line_q[rd_ln] : '0;
    rd_data = rd_word[rd_sl*W +: W];
    wr_old  = lvalid_q[wr_ln] ? line_q[wr_ln] : '0;
    wr_new  = wr_old;
    wr_new[wr_sl*W +: W] = wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lvalid_q <= '0;
    end else if (fill_en) begin
      // a fill wins over a write to the same line; a write elsewhere is kept
      lvalid_q[fill_ln] <= 1'b0;
      if (wr_en && wr_ln != fill_ln) begin
        line_q[wr_ln]   <= wr_new;
        lvalid_q[wr_ln] <= 1'b1;
      end
    end else if (wr_en) begin
      line_q[wr_ln]   <= wr_new;
      lvalid_q[wr_ln] <= 1'b1;
    end
  end
endmodule
