// tb_t2_pf_engine: gives the engine runs and compares the issued addresses with
// the expected list base + k*delta, k = from..to, leaving out repeats of a line,
// under random back-pressure. Also checks that the engine refuses a run while
// busy, issues one prefetch per cycle when the consumer is always ready (12 prefetches within 13 cycles: one cycle to take the run), and
// handles negative deltas. Finally 300 random runs (random base, delta of
// -512..512 bytes, from/to including empty runs that must be ignored) under
// random back-pressure against a model of the run and of the line filter, whose
// last line carries over from run to run.
module tb_t2_pf_engine;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, idle, pf_valid, pf_ready = 0;
  addr_t req_base = 0, req_delta = 0;
  logic [DIST_W-1:0] req_from = 0, req_to = 0;
  pf_req_t pf_req;
  int checks = 0, failures = 0;
  addr_t exp_q[$];
  bit rand_ready = 1;

  t2_pf_engine dut (.clk, .rst_n, .req_valid, .req_base, .req_delta, .req_from, .req_to,
                    .req_src(SRC_T2), .req_tag(5'd3), .idle, .pf_valid, .pf_req, .pf_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) pf_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && pf_valid && pf_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected %h", pf_req.addr); end
    else begin
      addr_t e;
      e = exp_q.pop_front();
      if (pf_req.addr != e || pf_req.tag != 5'd3) begin failures++; $display("got %h exp %h", pf_req.addr, e); end
    end
  end

  task automatic run(addr_t b, addr_t d, int f, int t);
    @(negedge clk);
    req_valid = 1; req_base = b; req_delta = d; req_from = DIST_W'(f); req_to = DIST_W'(t);
    @(negedge clk);
    req_valid = 0;
  endtask
  task automatic drain();
    int c = 0;
    while ((exp_q.size() != 0 || !idle) && c < 500) begin @(posedge clk); c++; end
    checks++; if (exp_q.size() != 0) begin failures++; $display("missing %0d", exp_q.size()); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    exp_q = '{64'h1100, 64'h1180, 64'h1200, 64'h1280};
    run(64'h1000, 64'h80, 2, 5);
    checks++; if (idle) begin failures++; $display("idle while busy"); end
    run(64'h7000, 64'h80, 1, 1);   // refused: engine busy
    drain();
    exp_q = '{64'h2010, 64'h2040, 64'h2080};
    run(64'h2000, 64'h10, 1, 8);
    drain();
    exp_q = '{64'h8fc0, 64'h8f80, 64'h8f40};
    run(64'h9000, -64'sh40, 1, 3);
    drain();
    // throughput: always ready, 12 prefetches in 12 cycles
    rand_ready = 0;
    @(negedge clk);
    for (int k = 1; k <= 12; k++) begin
      addr_t a;
      a = 64'h10_0000 + addr_t'(k) * 64'h100;
      exp_q.push_back(a);
    end
    begin
      int c = 0;
      run(64'h10_0000, 64'h100, 1, 12);
      while (exp_q.size() != 0 && c < 100) begin @(posedge clk); c++; end
      checks++; if (c > 13) begin failures++; $display("throughput: %0d cycles", c); end
    end
    // random runs against the model
    rand_ready = 1;
    begin
      addr_t last_line, b, d, a;
      int f, t;
      last_line = (64'h10_0000 + 12 * 64'h100) >> LINE_OFF;
      for (int r = 0; r < 300; r++) begin
        b = {$urandom(), $urandom()};
        d = addr_t'(($urandom_range(0, 128) - 64) * 8);
        f = $urandom_range(0, 16);
        t = $urandom_range(0, 20);
        if (f != 0 && f <= t)
          for (int k = f; k <= t; k++) begin
            a = b + d * addr_t'(k);
            if ((a >> LINE_OFF) != last_line) begin exp_q.push_back(a); last_line = a >> LINE_OFF; end
          end
        run(b, d, f, t);
        drain();
      end
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
