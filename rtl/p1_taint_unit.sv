// p1_taint_unit: taint propagation over the logical registers at the decoder,
// used by P1 to find loads whose address depends on a load i.
// After start, the unit waits for i (ptr_pc) to be decoded and then sets only the
// bit of i's destination register. For every later decoded instruction the bit of
// its destination becomes the OR of its sources' bits (set if any source is
// tainted, cleared otherwise). A tainted load is reported as a candidate j
// (cand_valid/cand_pc). The pass ends when i is decoded again: done is pulsed and
// chain tells whether i's own address register (first source) is tainted, i.e. i's
// address depends on its value from the previous iteration (a pointer chain). A
// pass that does not reach i again within MAX_INSNS decoded instructions ends
// with fail. The propagation rule follows the design; the time-out and the use of
// the first source as address register are this design's choices. All outputs
// are registered pulses, one cycle after the decoded instruction.
module p1_taint_unit
  import tpc_pkg::*;
#(
  parameter int unsigned MAX_INSNS = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  addr_t  ptr_pc,
  input  logic   dec_valid,
  input  addr_t  dec_pc,
  input  logic   dec_is_load,
  input  logic   dec_src1_v,
  input  lreg_t  dec_src1,
  input  logic   dec_src2_v,
  input  lreg_t  dec_src2,
  input  logic   dec_dst_v,
  input  lreg_t  dec_dst,
  output logic   busy,
  output logic   cand_valid,
  output addr_t  cand_pc,
  output logic   done,
  output logic   chain,
  output logic   fail
);
  typedef enum logic [1:0] {T_IDLE, T_ARM, T_RUN} tstate_e;
  localparam int unsigned CW = $clog2(MAX_INSNS + 1);

  tstate_e              st_q;
  logic [NUM_LREGS-1:0] taint_q;
  addr_t                pc_q;
  logic [CW-1:0]        cnt_q;

  logic is_i, src_t;
  always_comb begin
    is_i  = dec_valid && dec_pc == pc_q;
    src_t = (dec_src1_v && taint_q[dec_src1]) || (dec_src2_v && taint_q[dec_src2]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= T_IDLE; taint_q <= '0; pc_q <= '0; cnt_q <= '0;
      cand_valid <= 1'b0; cand_pc <= '0; done <= 1'b0; chain <= 1'b0; fail <= 1'b0;
    end else begin
      cand_valid <= 1'b0;
      done       <= 1'b0;
      fail       <= 1'b0;
      unique case (st_q)
        T_IDLE: if (start) begin
          st_q  <= T_ARM;
          pc_q  <= ptr_pc;
          cnt_q <= '0;
        end
        T_ARM, T_RUN: begin
          if (dec_valid) cnt_q <= cnt_q + 1'b1;
          if (is_i && st_q == T_ARM) begin
            taint_q <= '0;
            if (dec_dst_v) taint_q[dec_dst] <= 1'b1;
            st_q  <= T_RUN;
            cnt_q <= '0;
          end else if (is_i) begin
            done  <= 1'b1;
            chain <= dec_src1_v && taint_q[dec_src1];
            st_q  <= T_IDLE;
          end else if (dec_valid && cnt_q == CW'(MAX_INSNS)) begin
            fail <= 1'b1;
            st_q <= T_IDLE;
          end else if (dec_valid && st_q == T_RUN) begin
            if (dec_dst_v) taint_q[dec_dst] <= src_t;
            if (dec_is_load && src_t) begin
              cand_valid <= 1'b1;
              cand_pc    <= dec_pc;
            end
          end
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  assign busy = st_q != T_IDLE;
endmodule
