// tb_p1_prefetcher: runs P1 on two synthetic programs with a small memory model.
//  * Array of pointers: T2 offers a strided load i (0x100, loading P[n]); the
//    decoder shows j = load [i's value + ...] (0x108). Executed instances give
//    addr(j) = P[n] + 0x30. P1 must mark i in T2's SIT with offset 0x30 after the
//    4th equal offset, set j's P1 bit (handled), and turn a forwarded
//    value + offset into one L1 prefetch with source P1.
//  * Pointer chain: i (0x200) loads from a linked list whose next node address is
//    the loaded value + 0x10. After detection the FSM must catch up by issuing
//    the next 4 node addresses (distance 4), each only after the previous one
//    returned, then issue exactly one node, 4 ahead, per instance.
//  * Correction: when the program moves to another list, the chain FSM must give
//    up after CHAIN_TIMEOUT (16 here) unmatched instances, clear i's P1 bit and
//    start a new test.
module tb_p1_prefetcher;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cand_valid = 0, cand_strided = 0; addr_t cand_pc = 0, cand_mpc = 0;
  logic dec_valid = 0, dec_is_load = 0, dec_src1_v = 0, dec_src2_v = 0, dec_dst_v = 0;
  addr_t dec_pc = 0; lreg_t dec_src1 = 0, dec_src2 = 0, dec_dst = 0;
  logic ev_valid = 0, ev_is_load = 1; addr_t ev_pc = 0, ev_addr = 0, ev_value = 0;
  logic handled, fill_en = 0; addr_t fill_addr = 0;
  logic [DIST_W-1:0] pf_dist = 6'd4;
  logic mark_valid; addr_t mark_mpc, mark_delta;
  logic ptr_fwd_valid = 0; addr_t ptr_fwd_addr = 0;
  logic resp_valid = 0; pf_src_e resp_src = SRC_P1; logic [TAG_W-1:0] resp_tag = 0; addr_t resp_data = 0;
  logic pf_valid, pf_ready = 1; pf_req_t pf_req;
  logic chain_active, chain_reset;
  int checks = 0, failures = 0;
  int marks = 0, resets = 0;
  addr_t last_mark_mpc, last_mark_delta;
  pf_req_t got_q[$];
  addr_t   pend_a[$];
  int      pend_t[$];
  int      cyc = 0;

  p1_prefetcher #(.CHAIN_TIMEOUT(16)) dut (.clk, .rst_n, .cand_valid, .cand_pc, .cand_mpc, .cand_strided,
    .dec_valid, .dec_pc, .dec_is_load, .dec_src1_v, .dec_src1, .dec_src2_v, .dec_src2, .dec_dst_v, .dec_dst,
    .ev_valid, .ev_pc, .ev_addr, .ev_value, .ev_is_load, .handled, .fill_en, .fill_addr, .pf_dist,
    .mark_valid, .mark_mpc, .mark_delta, .ptr_fwd_valid, .ptr_fwd_addr,
    .resp_valid, .resp_src, .resp_tag, .resp_data, .pf_valid, .pf_req, .pf_ready,
    .chain_active, .chain_reset);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // linked lists: node k of list L; M[node] + 0x10 = next node
  function automatic addr_t node(int l, int k);
    return 64'h4000_0000 + addr_t'(l) * 64'h100_0000 + addr_t'((k * 7919) % 4096) * 64'h40;
  endfunction
  function automatic addr_t mem_word(addr_t a);
    // the word at a node of list l, index k (found by search) is next - 0x10
    for (int l = 0; l < 2; l++)
      for (int k = 0; k < 200; k++) if (node(l, k) == a) return node(l, k + 1) - 64'h10;
    return 64'h0;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (mark_valid) begin marks++; last_mark_mpc = mark_mpc; last_mark_delta = mark_delta; end
      if (chain_reset) resets++;
      if (pf_valid && pf_ready) begin
        got_q.push_back(pf_req);
        if (pf_req.tag == P1_TAG_CHAIN) begin pend_a.push_back(pf_req.addr); pend_t.push_back(cyc + 6); end
      end
    end
  end
  // memory model: a chain prefetch returns its word 6 cycles later
  always @(negedge clk) begin
    resp_valid = 0;
    if (pend_t.size() != 0 && pend_t[0] <= cyc) begin
      resp_valid = 1; resp_src = SRC_P1; resp_tag = P1_TAG_CHAIN;
      resp_data = mem_word(pend_a[0]);
      void'(pend_a.pop_front()); void'(pend_t.pop_front());
    end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic dec(addr_t pc, bit ld, int s1, int d);
    @(negedge clk);
    dec_valid = 1; dec_pc = pc; dec_is_load = ld;
    dec_src1_v = 1; dec_src1 = lreg_t'(s1); dec_src2_v = 0; dec_dst_v = 1; dec_dst = lreg_t'(d);
    @(negedge clk);
    dec_valid = 0;
  endtask
  task automatic ex(addr_t pc, addr_t a, addr_t v, output bit h);
    @(negedge clk);
    ev_valid = 1; ev_pc = pc; ev_addr = a; ev_value = v;
    #1 h = handled;
    @(negedge clk);
    ev_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  bit h;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // ---------------- array of pointers ----------------
    cand_valid = 1; cand_pc = 64'h100; cand_mpc = 64'h100; cand_strided = 1;
    @(negedge clk); cand_valid = 0;
    dec(64'h100, 1, 2, 1);   // i: r1 <- [r2]
    dec(64'h104, 0, 1, 3);   // r3 <- r1 + c
    dec(64'h108, 1, 3, 5);   // j: load [r3]
    dec(64'h10c, 0, 2, 2);
    dec(64'h100, 1, 2, 1);
    for (int n = 0; n < 4; n++) begin
      addr_t p;
      p = 64'h7000_0000 + addr_t'($urandom_range(0, 65535)) * 64'h80;
      ex(64'h100, 64'h10_0000 + addr_t'(n) * 8, p, h);
      chk(marks == 0, "no mark before the 4th offset");
      ex(64'h108, p + 64'h30, 64'h0, h);
    end
    chk(marks == 1 && last_mark_mpc == 64'h100 && last_mark_delta == 64'h30, "strided pointer marked with offset 0x30");
    ex(64'h108, 64'h7100_0030, 64'h0, h);
    chk(h, "j handled by P1");
    got_q.delete();
    @(negedge clk); ptr_fwd_valid = 1; ptr_fwd_addr = 64'h7abc_0030; @(negedge clk); ptr_fwd_valid = 0;
    repeat (3) @(negedge clk);
    chk(got_q.size() == 1 && got_q[0].addr == 64'h7abc_0030 && got_q[0].src == SRC_P1 &&
        got_q[0].tag == P1_TAG_TARGET, "pointer target prefetched");
    got_q.delete();
    // ---------------- pointer chain ----------------
    @(negedge clk);
    cand_valid = 1; cand_pc = 64'h200; cand_mpc = 64'h200; cand_strided = 0;
    @(negedge clk); cand_valid = 0;
    dec(64'h200, 1, 1, 1);   // i: r1 <- [r1 + 0x10]
    dec(64'h204, 0, 1, 6);
    dec(64'h200, 1, 1, 1);
    for (int k = 0; k <= 4; k++) ex(64'h200, node(0, k), mem_word(node(0, k)), h);
    chk(got_q.size() == 0, "no prefetch while checking");
    ex(64'h200, node(0, 5), mem_word(node(0, 5)), h);
    chk(h, "chain instruction handled by P1");
    repeat (60) @(negedge clk);
    begin
      bit ok;
      ok = got_q.size() == 4;
      for (int m = 0; m < 4 && ok; m++) if (got_q[m].addr != node(0, 6 + m) || got_q[m].tag != P1_TAG_CHAIN) ok = 0;
      chk(ok, $sformatf("catch-up issued nodes 6..9 (%0d prefetches)", got_q.size()));
    end
    chk(chain_active, "chain in steady state");
    got_q.delete();
    for (int k = 6; k < 30; k++) begin
      ex(64'h200, node(0, k), mem_word(node(0, k)), h);
      chk(got_q.size() == k - 5 && got_q[k - 6].addr == node(0, k + 4), $sformatf("steady prefetch of node %0d", k + 4));
    end
    chk(resets == 0, "no reset while on track");
    // ---------------- correction ----------------
    for (int k = 0; k < 20; k++) ex(64'h200, node(1, k), mem_word(node(1, k)), h);
    chk(resets == 1, "chain reset after time-out");
    ex(64'h200, node(1, 20), mem_word(node(1, 20)), h);
    chk(!h, "P1 bit cleared after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
