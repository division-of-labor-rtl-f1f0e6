// pf_queue: the queue between the prefetcher and the memory side. It always takes
// a request (in_valid); when it is full it has to drop one, and it drops the
// least likely to be useful: a C1 (region) prefetch. A full queue that receives a
// T2 or P1 request removes its youngest C1 entry to make room; if it holds no C1
// entry, or the incoming request is itself from C1, the incoming request is
// dropped. The head is never the victim: it is on show at out_req, and a
// presented request stays stable until out_ready (asserted below). drop / drop_c1 pulse in the cycle of the drop. The head is presented
// with valid/ready (out_valid/out_ready); entries leave in order. The drop policy
// follows the design; the depth is this design's choice.
module pf_queue
  import tpc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pf_out_t in_req,
  output logic    out_valid,
  output pf_out_t out_req,
  input  logic    out_ready,
  output logic    drop,
  output logic    drop_c1,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  pf_out_t       q_q [DEPTH];
  logic [CW-1:0] n_q;

  pf_out_t       q_n [DEPTH];
  logic [CW-1:0] n_n;
  logic          drop_n, drop_c1_n;
  logic          found;
  int unsigned   victim;
  always_comb begin
    for (int i = 0; i < DEPTH; i++) q_n[i] = q_q[i];
    n_n = n_q;
    drop_n = 1'b0;
    drop_c1_n = 1'b0;
    found = 1'b0;
    victim = 0;
    // pop
    if (n_q != '0 && out_ready) begin
      for (int i = 0; i < DEPTH - 1; i++) q_n[i] = q_q[i + 1];
      n_n = n_q - 1'b1;
    end
    // push
    if (in_valid) begin
      if (n_n < CW'(DEPTH)) begin
        q_n[n_n[$clog2(DEPTH)-1:0]] = in_req;
        n_n = n_n + 1'b1;
      end else begin
        drop_n = 1'b1;
        if (in_req.src != SRC_C1)
          for (int i = 1; i < DEPTH; i++)
            if (q_n[i].src == SRC_C1) begin found = 1'b1; victim = i; end
        if (found) begin
          drop_c1_n = 1'b1;
          for (int i = 0; i < DEPTH - 1; i++)
            if (i >= victim) q_n[i] = q_n[i + 1];
          q_n[DEPTH - 1] = in_req;
        end else if (in_req.src == SRC_C1) begin
          drop_c1_n = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q_q[i] <= '0;
      n_q <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q_q[i] <= q_n[i];
      n_q <= n_n;
    end
  end

  assign out_valid = n_q != '0;
  assign out_req   = q_q[0];
  assign drop      = drop_n;
  assign drop_c1   = drop_c1_n;
  assign count     = n_q;

  // valid/ready: a presented request is held unchanged until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && out_req == $past(out_req))
    else $error("pf_queue: head changed while stalled");
endmodule
