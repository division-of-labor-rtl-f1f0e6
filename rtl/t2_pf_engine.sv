// t2_pf_engine: issues the prefetches of one run for T2: addresses base + k*delta
// for k = from..to, one per cycle while the consumer is ready. This is the
// catch-up behaviour of the stride component (one prefetch every cycle until the
// prefetch distance is reached); in the steady state a run is a single address.
// An address in the same 64-byte line as the last one issued is skipped, so small
// strides do not fetch a line twice. A run is only taken while the engine is idle
// (idle = 1); the caller treats a refused run as throttling, i.e. T2 already has
// enough prefetches in flight. Output follows valid/ready: pf_valid stays high
// with a stable request until pf_ready. The line filter is this design's choice.
module t2_pf_engine
  import tpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  addr_t             req_base,
  input  addr_t             req_delta,
  input  logic [DIST_W-1:0] req_from,
  input  logic [DIST_W-1:0] req_to,
  input  pf_src_e           req_src,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              idle,
  output logic              pf_valid,
  output pf_req_t           pf_req,
  input  logic              pf_ready
);
  logic              busy_q;
  addr_t             cur_q, delta_q;
  logic [DIST_W-1:0] k_q, to_q;
  pf_src_e           src_q;
  logic [TAG_W-1:0]  tag_q;
  logic              last_v_q;
  logic [ADDR_W-LINE_OFF-1:0] last_line_q;

  logic same_line, step;
  always_comb begin
    same_line = last_v_q && cur_q[ADDR_W-1:LINE_OFF] == last_line_q;
    pf_valid  = busy_q && !same_line;
    pf_req    = '{addr: cur_q, src: src_q, tag: tag_q};
    step      = busy_q && (same_line || pf_ready);
    idle      = !busy_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0; cur_q <= '0; delta_q <= '0; k_q <= '0; to_q <= '0;
      src_q <= SRC_T2; tag_q <= '0; last_v_q <= 1'b0; last_line_q <= '0;
    end else if (!busy_q) begin
      if (req_valid && req_from <= req_to && req_from != '0) begin
        busy_q  <= 1'b1;
        cur_q   <= req_base + req_delta * {{(ADDR_W-DIST_W){1'b0}}, req_from};
        delta_q <= req_delta;
        k_q     <= req_from;
        to_q    <= req_to;
        src_q   <= req_src;
        tag_q   <= req_tag;
      end
    end else if (step) begin
      if (!same_line) begin
        last_v_q    <= 1'b1;
        last_line_q <= cur_q[ADDR_W-1:LINE_OFF];
      end
      cur_q <= cur_q + delta_q;
      k_q   <= k_q + 1'b1;
      if (k_q == to_q) busy_q <= 1'b0;
    end
  end

  // valid/ready: a presented request is held unchanged until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && pf_req == $past(pf_req))
    else $error("%m: request changed while stalled");
endmodule
