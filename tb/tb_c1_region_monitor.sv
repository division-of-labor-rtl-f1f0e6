// tb_c1_region_monitor: random accesses over 19 regions, with random monitored
// instruction ids and occasional IM clears, are applied to the Region Monitor
// and to a reference model written here (16 entries, invalid-first then
// round-robin victim, dense = more than six lines). Every eviction report (valid,
// region, density, instruction vector) is compared with the model, and directed
// cases check the density threshold at exactly 6 and 7 lines.
module tb_c1_region_monitor;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, acc_im_valid = 0, im_clear = 0;
  addr_t acc_addr = 0;
  logic [3:0] acc_im_id = 0, im_clear_id = 0;
  logic ev_valid, ev_dense;
  logic [15:0] ev_pcvec;
  logic [ADDR_W-REGION_OFF-1:0] ev_region;
  int checks = 0, failures = 0, evictions = 0, dense_seen = 0;

  c1_region_monitor dut (.clk, .rst_n, .acc_valid, .acc_addr, .acc_im_valid, .acc_im_id,
    .im_clear, .im_clear_id, .ev_valid, .ev_dense, .ev_pcvec, .ev_region);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit        m_v [16];
  longint    m_tag [16];
  bit [15:0] m_lines [16];
  bit [15:0] m_pcs [16];
  int        m_rr = 0;
  bit        e_v; longint e_tag; bit e_dense; bit [15:0] e_pcs;

  task automatic model_step(longint tag, int line, bit imv, int id, bit clr, int cid);
    int hit = -1, vic = -1;
    e_v = 0;
    if (clr) for (int i = 0; i < 16; i++) m_pcs[i][cid] = 0;
    for (int i = 0; i < 16; i++) if (m_v[i] && m_tag[i] == tag) hit = i;
    if (hit >= 0) begin
      m_lines[hit][line] = 1;
      if (imv) m_pcs[hit][id] = 1;
    end else begin
      for (int i = 15; i >= 0; i--) if (!m_v[i]) vic = i;
      if (vic < 0) begin vic = m_rr; m_rr = (m_rr + 1) % 16; end
      if (m_v[vic]) begin
        e_v = 1; e_tag = m_tag[vic]; e_dense = $countones(m_lines[vic]) > 6; e_pcs = m_pcs[vic];
      end
      m_v[vic] = 1; m_tag[vic] = tag; m_lines[vic] = 16'(1 << line); m_pcs[vic] = imv ? 16'(1 << id) : 16'h0;
    end
  endtask

  task automatic access(longint tag, int line, bit imv, int id, bit clr, int cid);
    @(negedge clk);
    acc_valid = 1; acc_addr = addr_t'(tag) << REGION_OFF | addr_t'(line) << LINE_OFF | addr_t'(7);
    acc_im_valid = imv; acc_im_id = 4'(id); im_clear = clr; im_clear_id = 4'(cid);
    model_step(tag, line, imv, id, clr, cid);
    @(negedge clk);
    acc_valid = 0; im_clear = 0;
    checks++;
    if (ev_valid != e_v || (e_v && (ev_region != (ADDR_W-REGION_OFF)'(e_tag) || ev_dense != e_dense || ev_pcvec != e_pcs))) begin
      failures++;
      $display("eviction mismatch: dut v%0d r%h d%0d p%h  model v%0d r%h d%0d p%h",
               ev_valid, ev_region, ev_dense, ev_pcvec, e_v, e_tag, e_dense, e_pcs);
    end
    if (ev_valid) begin evictions++; if (ev_dense) dense_seen++; end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin m_v[i] = 0; m_tag[i] = 0; m_lines[i] = 0; m_pcs[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // directed: region 1000 with 7 lines (dense), 1001 with 6 lines (not dense)
    for (int l = 0; l < 7; l++) access(1000, l, 1, 2, 0, 0);
    for (int l = 0; l < 6; l++) access(1001, l, 1, 5, 0, 0);
    for (int r = 0; r < 16; r++) access(2000 + r, 0, 0, 0, 0, 0);
    // random traffic
    for (int n = 0; n < 3000; n++)
      access($urandom_range(0, 18), $urandom_range(0, 15), $urandom_range(0, 1), $urandom_range(0, 15),
             $urandom_range(0, 20) == 0, $urandom_range(0, 15));
    checks++;
    if (evictions < 100 || dense_seen < 10) begin failures++; $display("too few evictions %0d / dense %0d", evictions, dense_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
