// tpc_coordinator: the hard-wired coordinator of the composite prefetcher. It uses
// no storage. Each executed memory instruction is offered to the components in
// turn: T2 first; P1 only if T2 does not own the instruction; C1 only if neither
// does. (T2 and P1 also observe every instruction for their own training; this
// steering decides who prefetches for it and what C1 may monitor.) The
// coordinator also sets the destination of every prefetch: L1 for T2 and P1,
// whose accuracy is high, and L2 for C1. When several components present a
// request in the same cycle the fixed priority T2 > P1 > C1 picks one, and the
// others see ready low and hold their request. Purely combinational. Steering
// order and destinations follow the design; the merge priority is this design's.
module tpc_coordinator
  import tpc_pkg::*;
(
  input  logic    ev_valid,
  input  logic    t2_handled,
  input  logic    p1_handled,
  output logic    p1_ev_valid,
  output logic    c1_ev_valid,
  input  logic    t2_pf_valid,
  input  pf_req_t t2_pf_req,
  output logic    t2_pf_ready,
  input  logic    p1_pf_valid,
  input  pf_req_t p1_pf_req,
  output logic    p1_pf_ready,
  input  logic    c1_pf_valid,
  input  pf_req_t c1_pf_req,
  output logic    c1_pf_ready,
  output logic    out_valid,
  output pf_out_t out_req,
  input  logic    out_ready
);
  always_comb begin
    p1_ev_valid = ev_valid && !t2_handled;
    c1_ev_valid = ev_valid && !t2_handled && !p1_handled;

    t2_pf_ready = 1'b0;
    p1_pf_ready = 1'b0;
    c1_pf_ready = 1'b0;
    out_valid   = t2_pf_valid || p1_pf_valid || c1_pf_valid;
    if (t2_pf_valid) begin
      out_req     = '{addr: t2_pf_req.addr, src: t2_pf_req.src, tag: t2_pf_req.tag, dest: DEST_L1};
      t2_pf_ready = out_ready;
    end else if (p1_pf_valid) begin
      out_req     = '{addr: p1_pf_req.addr, src: p1_pf_req.src, tag: p1_pf_req.tag, dest: DEST_L1};
      p1_pf_ready = out_ready;
    end else begin
      out_req     = '{addr: c1_pf_req.addr, src: c1_pf_req.src, tag: c1_pf_req.tag, dest: DEST_L2};
      c1_pf_ready = out_ready;
    end
  end
endmodule
