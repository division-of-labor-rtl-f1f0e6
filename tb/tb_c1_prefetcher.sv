// tb_c1_prefetcher: two instructions run through C1. D (0x500) touches 10 lines of
// every region it visits, S (0x600) only 2. After four of their regions have
// left the Region Monitor, D must be marked dense and S not. Then an execution of
// D must request exactly the other 15 lines of its region (source C1) under
// random back-pressure, a second execution in the same region must request
// nothing, an execution of S nothing, and an I-cache fill of D's line must clear
// its mark. A third instruction E (0x700) touches only 2 lines of each of its
// regions itself, while accesses that are not steered to C1 (acc_valid only)
// touch 8 more: the Region Monitor sees every access, so E must be marked too.
module tb_c1_prefetcher;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, acc_only = 0, ev_l1_miss = 0, handled, fill_en = 0;
  addr_t ev_pc = 0, ev_addr = 0, fill_addr = 0;
  logic pf_valid, pf_ready = 1; pf_req_t pf_req;
  logic region_pf_start, decided, decided_dense;
  int checks = 0, failures = 0, n_decided = 0, n_dense = 0, n_starts = 0;
  addr_t got_q[$];

  c1_prefetcher dut (.clk, .rst_n, .acc_valid(ev_valid || acc_only), .ev_valid, .ev_pc, .ev_addr, .ev_l1_miss, .handled, .fill_en, .fill_addr,
    .pf_valid, .pf_req, .pf_ready, .region_pf_start, .decided, .decided_dense);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) pf_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (rst_n) begin
    if (pf_valid && pf_ready) begin
      got_q.push_back(pf_req.addr);
      checks++; if (pf_req.src != SRC_C1) begin failures++; $display("bad source"); end
    end
    if (decided) n_decided++;
    if (decided_dense) n_dense++;
    if (region_pf_start) n_starts++;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic ex(addr_t pc, addr_t a, bit miss, output bit h);
    @(negedge clk);
    ev_valid = 1; ev_pc = pc; ev_addr = a; ev_l1_miss = miss;
    #1 h = handled;
    @(negedge clk);
    ev_valid = 0;
  endtask

  // an access by an instruction owned by another component
  task automatic other(addr_t a);
    @(negedge clk);
    acc_only = 1; ev_pc = 64'h900; ev_addr = a; ev_l1_miss = 0;
    @(negedge clk);
    acc_only = 0;
  endtask

  function automatic addr_t reg_base(int r);
    return 64'h80_0000 + addr_t'(r) * 64'h400;
  endfunction

  bit h;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // D visits regions 0..23 (10 lines each), S visits regions 100..123 (2 lines)
    for (int r = 0; r < 24; r++) begin
      for (int l = 0; l < 10; l++) ex(64'h500, reg_base(r) + addr_t'(l) * 64'h40, l == 0, h);
      for (int l = 0; l < 2; l++)  ex(64'h600, reg_base(100 + r) + addr_t'(l) * 64'h40, l == 0, h);
      for (int l = 0; l < 2; l++)  ex(64'h700, reg_base(200 + r) + addr_t'(l) * 64'h40, l == 0, h);
      for (int l = 2; l < 10; l++) other(reg_base(200 + r) + addr_t'(l) * 64'h40);
    end
    repeat (5) @(negedge clk);
    chk(n_decided >= 3, $sformatf("all three instructions decided (%0d)", n_decided));
    chk(n_dense == 2, $sformatf("exactly two dense decisions, D and E (%0d)", n_dense));
    chk(got_q.size() == 0 || n_starts > 0, "no prefetch before marking");
    repeat (40) @(negedge clk);
    got_q.delete(); n_starts = 0;
    // D in a fresh region, demand line 5
    ex(64'h500, reg_base(300) + 5 * 64'h40 + 8, 0, h);
    chk(h, "D handled by C1");
    repeat (60) @(negedge clk);
    begin
      bit ok;
      ok = got_q.size() == 15;
      for (int l = 0, m = 0; l < 16 && ok; l++) if (l != 5) begin
        if (got_q[m] != reg_base(300) + addr_t'(l) * 64'h40) ok = 0;
        m++;
      end
      chk(ok, $sformatf("15 other lines of the region requested (%0d)", got_q.size()));
    end
    got_q.delete();
    ex(64'h500, reg_base(300) + 9 * 64'h40, 0, h);
    repeat (30) @(negedge clk);
    chk(got_q.size() == 0, "same region not requested twice");
    ex(64'h600, reg_base(301), 0, h);
    repeat (30) @(negedge clk);
    chk(!h && got_q.size() == 0, "S not marked");
    ex(64'h700, reg_base(303), 0, h);
    chk(h, "E marked through accesses of other instructions");
    repeat (30) @(negedge clk);
    got_q.delete();
    @(negedge clk); fill_en = 1; fill_addr = 64'h500; @(negedge clk); fill_en = 0;
    ex(64'h500, reg_base(302), 0, h);
    chk(!h, "mark cleared by I-cache fill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
