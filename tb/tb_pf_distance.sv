// tb_pf_distance: applies AMAT / T_iter pairs to pf_distance and checks that the
// distance equals clamp((AMAT + 20) / T_iter, 1, 16) within W + 3 = 19 cycles of the change, and
// that it is 4 while no loop is identified.
module tb_pf_distance;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] amat = 0, t_iter = 0;
  logic loop_valid = 0;
  logic [DIST_W-1:0] d;
  int checks = 0, failures = 0;

  pf_distance dut (.clk, .rst_n, .amat, .t_iter, .loop_valid, .d_out(d));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expd(int a, int t);
    int q = (a + 20) / t;
    if (q < 1) q = 1;
    if (q > 16) q = 16;
    return q;
  endfunction

  task automatic try(int a, int t);
    int e = expd(a, t);
    int waited = 0;
    amat <= 16'(a); t_iter <= 16'(t); loop_valid <= 1;
    // the divider may be in the middle of a division with old operands
    repeat (2 * 18) @(posedge clk);
    checks++;
    if (int'(d) != e) begin failures++; $display("amat %0d titer %0d: d %0d exp %0d", a, t, d, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    checks++; if (d != 6'd4) begin failures++; $display("default %0d", d); end
    try(100, 10);   // 12
    try(180, 10);   // 20 -> 16
    try(100, 500);  // 0 -> 1
    try(300, 40);   // 8
    for (int n = 0; n < 60; n++) try($urandom_range(10, 1000), $urandom_range(1, 300));
    // latency: from a fresh start the result is there after at most 19 cycles
    loop_valid <= 0; repeat (40) @(posedge clk);
    checks++; if (d != 6'd4) begin failures++; $display("no loop %0d", d); end
    amat <= 16'd230; t_iter <= 16'd25; loop_valid <= 1;   // (250)/25 = 10
    begin
      int c = 0;
      while (d != 6'd10 && c < 40) begin @(posedge clk); c++; end
      checks++;
      if (c > 19) begin failures++; $display("latency %0d cycles", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
