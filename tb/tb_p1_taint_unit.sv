// tb_p1_taint_unit: decodes short instruction sequences through the taint unit.
//  * array of pointers: i = load r1 <- [r2]; r3 = r1 + r4; load [r3] is reported,
//    load [r7] is not; done with chain = 0 when i is decoded again;
//  * taint is cleared when a register is overwritten from untainted sources;
//  * pointer chain: i = load r1 <- [r1 + 8]; done with chain = 1;
//  * a pass that never sees i again ends with fail after MAX_INSNS decodes;
//  * 300 random passes (random registers r0-r7, loads and bodies of up to 40
//    instructions) against a taint model kept here: the candidate list and the
//    chain result of every pass must match the model.
module tb_p1_taint_unit;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0; addr_t ptr_pc = 0;
  logic dec_valid = 0, dec_is_load = 0, dec_src1_v = 0, dec_src2_v = 0, dec_dst_v = 0;
  addr_t dec_pc = 0; lreg_t dec_src1 = 0, dec_src2 = 0, dec_dst = 0;
  logic busy, cand_valid, done, chain, fail;
  addr_t cand_pc;
  int checks = 0, failures = 0;
  addr_t cands[$];
  int n_done = 0, n_fail = 0; bit last_chain;

  p1_taint_unit #(.MAX_INSNS(64)) dut (.clk, .rst_n, .start, .ptr_pc, .dec_valid, .dec_pc, .dec_is_load,
    .dec_src1_v, .dec_src1, .dec_src2_v, .dec_src2, .dec_dst_v, .dec_dst, .busy, .cand_valid, .cand_pc,
    .done, .chain, .fail);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cand_valid) cands.push_back(cand_pc);
    if (done) begin n_done++; last_chain = chain; end
    if (fail) n_fail++;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // decode: pc, load?, src1 (-1 none), src2 (-1 none), dst (-1 none)
  task automatic dec(addr_t pc, bit ld, int s1, int s2, int d);
    @(negedge clk);
    dec_valid = 1; dec_pc = pc; dec_is_load = ld;
    dec_src1_v = s1 >= 0; dec_src1 = lreg_t'(s1 < 0 ? 0 : s1);
    dec_src2_v = s2 >= 0; dec_src2 = lreg_t'(s2 < 0 ? 0 : s2);
    dec_dst_v  = d >= 0;  dec_dst  = lreg_t'(d < 0 ? 0 : d);
    @(negedge clk);
    dec_valid = 0;
  endtask

  task automatic go(addr_t pc);
    @(negedge clk); start = 1; ptr_pc = pc; @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // array of pointers
    go(64'h100);
    chk(busy, "busy after start");
    dec(64'h0f0, 1, 3, -1, 5);       // before i: ignored
    dec(64'h100, 1, 2, -1, 1);       // i: r1 <- [r2]
    dec(64'h104, 0, 1, 4, 3);        // r3 = r1 + r4   (tainted)
    dec(64'h108, 1, 3, -1, 5);       // load [r3]      -> candidate
    dec(64'h10c, 1, 7, -1, 6);       // load [r7]      -> not
    dec(64'h110, 0, 9, -1, 3);       // r3 = r9        (clears r3)
    dec(64'h114, 1, 3, -1, 8);       // load [r3]      -> not
    dec(64'h118, 0, 2, -1, 2);       // r2 = r2 + 8
    dec(64'h100, 1, 2, -1, 1);       // i again
    repeat (2) @(negedge clk);
    chk(cands.size() == 1 && cands[0] == 64'h108, $sformatf("one candidate 0x108 (got %0d)", cands.size()));
    chk(n_done == 1 && !last_chain, "done, not a chain");
    chk(!busy, "idle after pass");
    // pointer chain
    cands.delete();
    go(64'h200);
    dec(64'h200, 1, 1, -1, 1);       // i: r1 <- [r1 + 8]
    dec(64'h204, 1, 1, -1, 3);       // load [r1]  -> candidate
    dec(64'h208, 0, 3, 5, 5);        // r5 = r3 + r5 (tainted)
    dec(64'h200, 1, 1, -1, 1);
    repeat (2) @(negedge clk);
    chk(n_done == 2 && last_chain, "pointer chain found");
    chk(cands.size() == 1 && cands[0] == 64'h204, "chain candidate");
    // time-out
    go(64'h300);
    dec(64'h300, 1, 2, -1, 1);
    for (int i = 0; i < 70; i++) dec(64'h400 + addr_t'(i) * 4, 0, 10, -1, 11);
    repeat (2) @(negedge clk);
    chk(n_fail == 1 && !busy, "time-out");
    // random passes against the model
    for (int pass = 0; pass < 300; pass++) begin
      bit taint [8];
      addr_t exp_c[$];
      int s1, s2, d, n;
      bit ld, st, exp_chain;
      cands.delete();
      exp_c.delete();
      n = n_done;
      go(64'h800);
      repeat ($urandom_range(0, 2)) dec(64'h700, 1, 1, 2, 3);
      d = $urandom_range(0, 7);
      dec(64'h800, 1, $urandom_range(0, 7), -1, d);
      foreach (taint[r]) taint[r] = 0;
      taint[d] = 1;
      repeat ($urandom_range(1, 40)) begin
        s1 = $urandom_range(0, 3) == 0 ? -1 : $urandom_range(0, 7);
        s2 = $urandom_range(0, 1) == 0 ? -1 : $urandom_range(0, 7);
        d  = $urandom_range(0, 4) == 0 ? -1 : $urandom_range(0, 7);
        ld = $urandom_range(0, 2) == 0;
        st = (s1 >= 0 && taint[s1]) || (s2 >= 0 && taint[s2]);
        if (ld && st) exp_c.push_back(64'h10_0000 + addr_t'(pass) * 64'h400 + addr_t'(exp_c.size()) * 4);
        dec(ld && st ? exp_c[$] : 64'h2000, ld, s1, s2, d);
        if (d >= 0) taint[d] = st;
      end
      s1 = $urandom_range(0, 7);
      exp_chain = taint[s1];
      dec(64'h800, 1, s1, -1, s1);
      repeat (2) @(negedge clk);
      chk(n_done == n + 1 && last_chain == exp_chain, $sformatf("pass %0d chain %0d", pass, exp_chain));
      chk(cands.size() == exp_c.size(), $sformatf("pass %0d candidates %0d/%0d", pass, cands.size(), exp_c.size()));
      if (cands.size() == exp_c.size()) foreach (exp_c[k]) chk(cands[k] == exp_c[k], "candidate pc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
