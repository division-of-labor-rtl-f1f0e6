// tb_t2_prefetcher: drives executed memory instructions into T2 and checks the
// I-cache state machine and the prefetches against hand-computed expectations
// (distance 4, stride 0x100):
//  * state 0 ignores an instruction until its first primary miss;
//  * prefetching starts at the 4th equal delta with a catch-up run of 4 lines,
//    then one line per instance, always 4 iterations ahead;
//  * the 16th equal delta labels the instruction strided (handled, candidate
//    pulse to P1); random addresses label a load non-strided (candidate pulse,
//    no prefetches);
//  * the same PC reached from two call sites (different RAS tops) forms two
//    streams that are both prefetched;
//  * an I-cache fill of the instruction's line returns it to state 0;
//  * after a strided-pointer mark the distance doubles to 8, requests carry
//    SRC_T2PTR, and a returned word plus the offset is forwarded to P1;
//  * a change of distance: growing to 12 (input 6, doubled) fills the gap with
//    one run of 5 lines, shrinking to 2 issues nothing until the stream is only
//    2 iterations ahead, then one line per instance again.
module tb_t2_prefetcher;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_is_load = 1, ev_l1_miss = 0, handled;
  addr_t ev_pc = 0, ev_ras_top = 0, ev_addr = 0;
  logic fill_en = 0; addr_t fill_addr = 0;
  logic [DIST_W-1:0] pf_dist = 6'd4;
  logic mark_valid = 0; addr_t mark_mpc = 0, mark_delta = 0;
  logic cand_valid, cand_strided; addr_t cand_pc, cand_mpc;
  logic resp_valid = 0; pf_src_e resp_src = SRC_T2; logic [TAG_W-1:0] resp_tag = 0; addr_t resp_data = 0;
  logic ptr_fwd_valid; addr_t ptr_fwd_addr;
  logic pf_valid, pf_ready = 1; pf_req_t pf_req;
  int checks = 0, failures = 0;
  addr_t got_q[$];
  pf_src_e src_q[$];
  logic [TAG_W-1:0] last_tag;
  int cands_str = 0, cands_non = 0;

  t2_prefetcher dut (.clk, .rst_n, .ev_valid, .ev_pc, .ev_ras_top, .ev_addr, .ev_is_load, .ev_l1_miss,
    .handled, .fill_en, .fill_addr, .pf_dist, .mark_valid, .mark_mpc, .mark_delta,
    .cand_valid, .cand_pc, .cand_mpc, .cand_strided, .resp_valid, .resp_src, .resp_tag, .resp_data,
    .ptr_fwd_valid, .ptr_fwd_addr, .pf_valid, .pf_req, .pf_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pf_valid && pf_ready) begin got_q.push_back(pf_req.addr); src_q.push_back(pf_req.src); last_tag <= pf_req.tag; end
    if (cand_valid) begin if (cand_strided) cands_str++; else cands_non++; end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // one instance, then 9 idle cycles; returns handled as seen in its cycle
  task automatic inst(addr_t pc, addr_t ras, addr_t a, bit miss, output bit h);
    @(negedge clk);
    ev_valid = 1; ev_pc = pc; ev_ras_top = ras; ev_addr = a; ev_l1_miss = miss;
    #1 h = handled;
    @(negedge clk);
    ev_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic expect_run(addr_t base, int from, int to, string m);
    int n = to - from + 1;
    bit ok = got_q.size() == n;
    for (int k = 0; k < n && ok; k++) if (got_q[k] != base + addr_t'(from + k) * 64'h100) ok = 0;
    chk(ok, $sformatf("%s: %0d prefetches, expected %0d from index %0d", m, got_q.size(), n, from));
    got_q.delete(); src_q.delete();
  endtask

  localparam addr_t A_PC = 64'h400, B_PC = 64'h800, A0 = 64'h10_0000;
  bit h;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // state 0: no miss -> ignored
    for (int i = 0; i < 6; i++) inst(A_PC, 0, 64'h50_0000 + addr_t'(i) * 64'h100, 0, h);
    chk(got_q.size() == 0, "state 0 ignores hits");
    // first miss: observation; instance index 0 at A0
    inst(A_PC, 0, A0, 1, h);
    for (int i = 1; i <= 3; i++) inst(A_PC, 0, A0 + addr_t'(i) * 64'h100, 0, h);
    chk(got_q.size() == 0, "no prefetch before 4 equal deltas");
    inst(A_PC, 0, A0 + 4 * 64'h100, 0, h);
    expect_run(A0, 5, 8, "catch-up at 4th delta");
    for (int i = 5; i <= 15; i++) begin
      inst(A_PC, 0, A0 + addr_t'(i) * 64'h100, 0, h);
      chk(!h, "not handled while observed");
    end
    expect_run(A0, 9, 19, "steady state in observation");
    inst(A_PC, 0, A0 + 16 * 64'h100, 0, h);   // 16th delta
    chk(cands_str == 1, "strided candidate to P1");
    for (int i = 17; i <= 24; i++) begin
      inst(A_PC, 0, A0 + addr_t'(i) * 64'h100, 0, h);
      chk(h, "handled once strided");
    end
    expect_run(A0, 20, 28, "steady state strided");
    // non-strided load
    inst(B_PC, 0, 64'h90_0000, 1, h);
    for (int i = 1; i <= 8; i++) inst(B_PC, 0, 64'h90_0000 + addr_t'($urandom_range(1, 4000)) * 64'h40, 0, h);
    chk(cands_non == 1, "non-strided candidate to P1");
    chk(got_q.size() == 0, "no prefetch for non-strided");
    // two call sites of one PC: streams at C0 (ras 0x1000) and D0 (ras 0x2000)
    begin
      addr_t C0 = 64'h200_0000, D0 = 64'h300_0000;
      int nc = 0, nd = 0;
      inst(64'hc00, 64'h1000, C0, 1, h);
      inst(64'hc00, 64'h2000, D0, 1, h);
      for (int i = 1; i <= 20; i++) begin
        inst(64'hc00, 64'h1000, C0 + addr_t'(i) * 64'h100, 0, h);
        inst(64'hc00, 64'h2000, D0 + addr_t'(i) * 64'h100, 0, h);
      end
      foreach (got_q[k]) begin
        if (got_q[k] >= C0 && got_q[k] < C0 + 64'h10000) nc++;
        if (got_q[k] >= D0 && got_q[k] < D0 + 64'h10000) nd++;
      end
      chk(nc == 20 && nd == 20, $sformatf("both call sites prefetched (%0d, %0d)", nc, nd));
      got_q.delete(); src_q.delete();
    end
    // I-cache fill returns A to state 0
    @(negedge clk); fill_en = 1; fill_addr = A_PC; @(negedge clk); fill_en = 0;
    inst(A_PC, 0, A0 + 25 * 64'h100, 0, h);
    chk(!h && got_q.size() == 0, "state 0 after I-cache fill");
    // back to observation/strided, then strided-pointer mark
    inst(A_PC, 0, A0 + 26 * 64'h100, 1, h);
    for (int i = 27; i <= 45; i++) inst(A_PC, 0, A0 + addr_t'(i) * 64'h100, 0, h);
    got_q.delete(); src_q.delete();
    @(negedge clk); mark_valid = 1; mark_mpc = A_PC; mark_delta = 64'h20; @(negedge clk); mark_valid = 0;
    inst(A_PC, 0, A0 + 46 * 64'h100, 0, h);
    expect_run(A0, 50, 54, "distance doubles to 8");
    inst(A_PC, 0, A0 + 47 * 64'h100, 0, h);
    chk(src_q.size() == 1 && src_q[0] == SRC_T2PTR, "strided-pointer source");
    got_q.delete(); src_q.delete();
    @(negedge clk);
    resp_valid = 1; resp_src = SRC_T2PTR; resp_tag = last_tag; resp_data = 64'hab_c000;
    @(negedge clk); resp_valid = 0;
    chk(ptr_fwd_valid && ptr_fwd_addr == 64'hab_c020, "pointer forwarded with offset");
    // distance changes (A is 8 ahead after instance 47)
    pf_dist = 6'd6;
    inst(A_PC, 0, A0 + 48 * 64'h100, 0, h);
    expect_run(A0, 56, 60, "distance grows to 12");
    pf_dist = 6'd1;
    for (int i = 49; i <= 58; i++) inst(A_PC, 0, A0 + addr_t'(i) * 64'h100, 0, h);
    chk(got_q.size() == 0, $sformatf("nothing while more than 2 ahead (%0d)", got_q.size()));
    inst(A_PC, 0, A0 + 59 * 64'h100, 0, h);
    expect_run(A0, 61, 61, "one line once 2 ahead");
    inst(A_PC, 0, A0 + 60 * 64'h100, 0, h);
    expect_run(A0, 62, 62, "steady at distance 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
