// tb_tpc_top: end-to-end run of the composite prefetcher on a synthetic loop,
// with the design at its default parameters. Each iteration of the loop
// (backward branch 0x1040 -> 0x1000) contains
//   A  0x1000  load r1 <- [r2]       strided, stride 0x40, loads pointer P[n]
//   J  0x1008  load r5 <- [r1+0x30]  depends on A's value (array of pointers)
//   C  0x1010  load r4 <- [r4+0x10]  linked list (pointer chain)
//   D  0x1018  8 stores per iteration in random line order, 16 lines per region
//   S  0x1020  a store to a random address (no pattern)
// decoded, then executed, with primary-miss flags from a simple line-touch model
// and a miss latency of 200 cycles. The memory side accepts prefetches with random
// back-pressure (and stops for 300 cycles once, so the queue overflows) and returns
// each one 20 cycles later with the word stored at its address.
// Checks: every prefetch lies on a pattern of the program (T2: A's stream ahead
// of the current element; P1: P[k] + 0x30 or a node of a list; C1: a line of a
// region of D, destination L2; T2/P1 destination L1). Mechanisms that must each
// occur at least once: loop identified and iterations counted, T2 owning A,
// strided-pointer mark, pointer-target prefetch, pointer chain in steady state,
// chain reset after the list changes, C1 decision and region prefetch, C1
// drops in the full queue. Their counts are printed.
module tb_tpc_top;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic br_valid = 0; addr_t br_pc = 0, br_target = 0;
  logic dec_valid = 0, dec_is_load = 0, dec_src1_v = 0, dec_src2_v = 0, dec_dst_v = 0;
  addr_t dec_pc = 0; lreg_t dec_src1 = 0, dec_src2 = 0, dec_dst = 0;
  logic mem_valid = 0, mem_is_load = 0, mem_l1_miss = 0;
  addr_t mem_pc = 0, mem_ras_top = 0, mem_addr = 0, mem_value = 0;
  logic lat_valid = 0; logic [15:0] lat = 0;
  logic ic_fill_valid = 0; addr_t ic_fill_addr = 0;
  logic pf_valid, pf_ready = 0; pf_out_t pf_out;
  logic resp_valid = 0; pf_src_e resp_src = SRC_T2; logic [TAG_W-1:0] resp_tag = 0; addr_t resp_data = 0;
  logic st_iter_pulse, st_loop_valid, st_t2_handled, st_p1_handled, st_c1_handled, st_ptr_mark,
        st_chain_active, st_chain_reset, st_region_pf, st_c1_decided, st_drop, st_drop_c1;
  logic [DIST_W-1:0] st_dist;

  tpc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, cur_n = 0;
  int n_iter = 0, n_loop = 0, n_t2h = 0, n_p1h = 0, n_c1h = 0, n_mark = 0, n_chain = 0, n_creset = 0,
      n_region = 0, n_decided = 0, n_drop = 0, n_drop_c1 = 0;
  int n_pf_t2 = 0, n_pf_ptr = 0, n_pf_target = 0, n_pf_chain = 0, n_pf_c1 = 0;
  bit stall = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam addr_t A0 = 64'h10_0000;
  localparam addr_t D0 = 64'h80_0000;
  function automatic addr_t ptr(int n);      // P[n]
    return 64'h7000_0000 + addr_t'((n * 2654435761) % 65536) * 64'h80;
  endfunction
  // list nodes: one per 64 KB block, at a random line inside it
  addr_t nodes [2][401];
  function automatic addr_t node(int l, int k);
    return nodes[l][k];
  endfunction
  function automatic addr_t word_at(addr_t a);
    if (a >= A0 && a < A0 + 64'h40 * 1000 && a[5:0] == 0) return ptr(int'((a - A0) >> 6));
    for (int l = 0; l < 2; l++)
      for (int k = 0; k < 400; k++) if (node(l, k) == a) return node(l, k + 1) - 64'h10;
    return 64'h0;
  endfunction
  function automatic bit is_target(addr_t a);
    for (int k = 0; k < 1000; k++) if (ptr(k) + 64'h30 == a) return 1;
    return 0;
  endfunction
  function automatic bit is_node(addr_t a);
    for (int l = 0; l < 2; l++) for (int k = 0; k < 400; k++) if (node(l, k) == a) return 1;
    return 0;
  endfunction

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // ---------------- memory side ----------------
  addr_t rq_a[$]; pf_src_e rq_s[$]; logic [TAG_W-1:0] rq_t[$]; int rq_c[$];
  always @(negedge clk) begin
    pf_ready <= !stall && $urandom_range(0, 3) != 0;
    resp_valid <= 0;
    if (rq_c.size() != 0 && rq_c[0] <= cyc) begin
      resp_valid <= 1; resp_src <= rq_s[0]; resp_tag <= rq_t[0]; resp_data <= word_at(rq_a[0]);
      void'(rq_a.pop_front()); void'(rq_s.pop_front()); void'(rq_t.pop_front()); void'(rq_c.pop_front());
    end
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pf_valid && pf_ready) begin
        rq_a.push_back(pf_out.addr); rq_s.push_back(pf_out.src); rq_t.push_back(pf_out.tag); rq_c.push_back(cyc + 20);
        unique case (pf_out.src)
          SRC_T2, SRC_T2PTR: begin
            if (pf_out.src == SRC_T2) n_pf_t2++; else n_pf_ptr++;
            chk(pf_out.dest == DEST_L1 && pf_out.addr >= A0 + addr_t'(cur_n) * 64'h40 &&
                pf_out.addr < A0 + 64'h40 * 1000 && pf_out.addr[5:0] == 0, $sformatf("T2 prefetch %h", pf_out.addr));
          end
          SRC_P1: begin
            if (pf_out.tag == P1_TAG_CHAIN) begin n_pf_chain++; chk(is_node(pf_out.addr), $sformatf("chain prefetch %h", pf_out.addr)); end
            else begin n_pf_target++; chk(is_target(pf_out.addr), $sformatf("target prefetch %h", pf_out.addr)); end
            chk(pf_out.dest == DEST_L1, "P1 to L1");
          end
          SRC_C1: begin
            n_pf_c1++;
            chk(pf_out.dest == DEST_L2 && pf_out.addr >= D0 && pf_out.addr < D0 + 64'h400 * 200, $sformatf("C1 prefetch %h", pf_out.addr));
          end
        endcase
      end
      if (st_iter_pulse) n_iter++;
      if (st_loop_valid) n_loop++;
      if (st_t2_handled) n_t2h++;
      if (st_p1_handled) n_p1h++;
      if (st_c1_handled) n_c1h++;
      if (st_ptr_mark) n_mark++;
      if (st_chain_active) n_chain++;
      if (st_chain_reset) n_creset++;
      if (st_region_pf) n_region++;
      if (st_c1_decided) n_decided++;
      if (st_drop) n_drop++;
      if (st_drop_c1) n_drop_c1++;
    end
  end

  // ---------------- core side ----------------
  bit touched [longint];   // lines touched so far: first touch is a primary miss
  task automatic dec(addr_t pc, bit ld, int s1, int d);
    @(negedge clk);
    dec_valid = 1; dec_pc = pc; dec_is_load = ld;
    dec_src1_v = s1 >= 0; dec_src1 = lreg_t'(s1 < 0 ? 0 : s1);
    dec_src2_v = 0; dec_dst_v = d >= 0; dec_dst = lreg_t'(d < 0 ? 0 : d);
    @(negedge clk); dec_valid = 0;
  endtask
  task automatic ex(addr_t pc, addr_t a, addr_t v, bit ld);
    longint line = longint'(a >> 6);
    bit miss = !touched.exists(line);
    touched[line] = 1;
    @(negedge clk);
    mem_valid = 1; mem_pc = pc; mem_ras_top = 64'h0; mem_addr = a; mem_value = v; mem_is_load = ld; mem_l1_miss = miss;
    lat_valid = miss; lat = 16'd200;
    @(negedge clk); mem_valid = 0; lat_valid = 0;
  endtask

  int perm [8] = '{3, 6, 1, 4, 7, 2, 5, 0};
  initial begin
    int list;
    list = 0;
    for (int l = 0; l < 2; l++)
      for (int k = 0; k < 401; k++)
        nodes[l][k] = 64'h4000_0000 + addr_t'(l) * 64'h400_0000 + addr_t'(k) * 64'h1_0000 + addr_t'($urandom_range(0, 1023)) * 64'h40;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 260; n++) begin
      cur_n = n;
      if (n == 160) list = 1;                    // the program moves to another list
      if (n == 120) stall = 1;
      if (n == 126) stall = 0;
      // decode the iteration
      dec(64'h1000, 1, 2, 1);
      dec(64'h1004, 0, 1, 3);
      dec(64'h1008, 1, 3, 5);
      dec(64'h1010, 1, 4, 4);
      dec(64'h1018, 0, 6, -1);
      dec(64'h1020, 0, 7, -1);
      dec(64'h103c, 0, 2, 2);
      // execute it
      ex(64'h1000, A0 + addr_t'(n) * 64'h40, ptr(n), 1);
      ex(64'h1008, ptr(n) + 64'h30, 64'h0, 1);
      if (n >= 3) ex(64'h1010, node(list, n), word_at(node(list, n)), 1);
      for (int m = 0; m < 8; m++)
        ex(64'h1018, D0 + addr_t'(n / 2) * 64'h400 + addr_t'((n % 2) * 8 + perm[(m + n) % 8]) * 64'h40, 64'h0, 0);
      ex(64'h1020, 64'h9000_0000 + addr_t'($urandom_range(0, 1 << 20)) * 64'h40, 64'h0, 0);
      @(negedge clk);
      br_valid = 1; br_pc = 64'h1040; br_target = 64'h1000;
      @(negedge clk); br_valid = 0;
    end
    repeat (100) @(negedge clk);
    $display("mechanisms: iter=%0d loop=%0d t2_owned=%0d p1_owned=%0d c1_owned=%0d ptr_mark=%0d chain_steady=%0d chain_reset=%0d c1_decided=%0d region_pf=%0d drop=%0d drop_c1=%0d dist=%0d",
             n_iter, n_loop, n_t2h, n_p1h, n_c1h, n_mark, n_chain, n_creset, n_decided, n_region, n_drop, n_drop_c1, st_dist);
    $display("prefetches: t2=%0d t2ptr=%0d p1_target=%0d p1_chain=%0d c1=%0d", n_pf_t2, n_pf_ptr, n_pf_target, n_pf_chain, n_pf_c1);
    chk(n_iter > 200 && n_loop > 0, "loop identified, iterations counted");
    chk(n_t2h > 0, "T2 owned the strided load");
    chk(n_mark > 0 && n_pf_ptr > 0, "strided-pointer mark and doubled-distance stream");
    chk(n_pf_target > 0, "pointer-target prefetches");
    chk(n_chain > 0 && n_pf_chain > 0, "pointer chain in steady state");
    chk(n_creset > 0, "chain reset after the list changed");
    chk(n_p1h > 0, "P1 owned instructions");
    chk(n_decided > 0 && n_region > 0 && n_pf_c1 > 0 && n_c1h > 0, "C1 decision and region prefetch");
    chk(n_drop > 0 && n_drop_c1 > 0, "queue full: C1 prefetches dropped");
    chk(st_dist > 0, "distance computed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
