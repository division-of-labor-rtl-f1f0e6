// amat_tracker: running estimate of the average memory access time used by T2's
// prefetch distance. Each completed demand miss reports its latency in cycles;
// the estimate moves 1/8 of the way towards every sample (exponential average,
// kept with 3 extra fraction bits). It starts at AMAT_INIT after reset. The
// averaging rule and the initial value are this design's choices; the design only
// requires that AMAT be tracked. The output changes one cycle after a sample.
module amat_tracker #(
  parameter int unsigned LAT_W     = 16,
  parameter int unsigned AMAT_INIT = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lat_valid,
  input  logic [LAT_W-1:0] lat,
  output logic [LAT_W-1:0] amat
);
  logic [LAT_W+2:0] acc_q;  // amat * 8
  logic [LAT_W+3:0] nxt;

  always_comb nxt = {1'b0, acc_q} - {4'b0, acc_q[LAT_W+2:3]} + {4'b0, lat};

  always_ff @(posedge clk) begin
    if (!rst_n)         acc_q <= (LAT_W+3)'(AMAT_INIT * 8);
    else if (lat_valid) acc_q <= nxt[LAT_W+2:0];
  end

  assign amat = acc_q[LAT_W+2:3];
endmodule
