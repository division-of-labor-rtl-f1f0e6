// tb_t2_sit: exercises the stride identifier table.
//  * an instruction with a constant delta: early_ok from the 4th equal delta,
//    to_strided exactly at the 16th;
//  * deltas that keep changing: to_nonstrided exactly at the 4th change;
//  * the lead: set by pf_take, decremented by one per instance;
//  * the strided-pointer mark and the offset read back by index;
//  * allocation of 32 entries and round-robin replacement of the 33rd.
module tb_t2_sit;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, acc_alloc = 1, pf_take = 0, mark_valid = 0;
  addr_t acc_mpc = 0, acc_addr = 0, mark_mpc = 0, mark_delta = 0, delta_new, ptr_delta;
  logic hit, same_delta, to_strided, to_nonstrided, early_ok, is_ptr;
  logic [4:0] hit_idx, ptr_idx = 0;
  logic [DIST_W-1:0] lead_dec, pf_lead = 0;
  int checks = 0, failures = 0;

  t2_sit dut (.clk, .rst_n, .acc_valid, .acc_alloc, .acc_mpc, .acc_addr, .hit, .hit_idx, .delta_new,
              .same_delta, .to_strided, .to_nonstrided, .early_ok, .is_ptr, .lead_dec, .pf_take, .pf_lead,
              .mark_valid, .mark_mpc, .mark_delta, .ptr_idx, .ptr_delta);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // present one access; outputs are sampled before the clock edge
  task automatic acc(addr_t mpc, addr_t a, bit take = 0, int lead = 0);
    @(negedge clk);
    acc_valid = 1; acc_mpc = mpc; acc_addr = a; pf_take = take; pf_lead = DIST_W'(lead);
    #1;
  endtask
  task automatic idle();
    @(negedge clk); acc_valid = 0; pf_take = 0; mark_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // constant delta 0x40
    acc(64'h100, 64'h8000);
    chk(!hit, "first access misses");
    for (int k = 1; k <= 17; k++) begin
      acc(64'h100, 64'h8000 + 64'h40 * k);
      chk(hit && delta_new == 64'h40, "hit with delta 0x40");
      chk(early_ok == (k >= 4), $sformatf("early_ok at delta %0d", k));
      chk(to_strided == (k >= 16), $sformatf("to_strided at delta %0d", k));
      chk(!to_nonstrided, "no nonstrided");
    end
    // lead: take a run to lead 6, then it drops one per instance
    acc(64'h100, 64'h8000 + 64'h40 * 18, 1, 6);
    for (int k = 19; k < 23; k++) begin
      acc(64'h100, 64'h8000 + 64'h40 * k);
      chk(lead_dec == DIST_W'(6 - (k - 18)), $sformatf("lead %0d at %0d", lead_dec, k));
    end
    // changing deltas on another instruction
    acc(64'h200, 64'h1_0000);
    for (int k = 1; k <= 6; k++) begin
      acc(64'h200, 64'h1_0000 + 64'(k * k * 8));
      if (k >= 2) chk(to_nonstrided == (k >= 5), $sformatf("to_nonstrided at change %0d", k - 1));
      chk(!early_ok, "no early_ok for changing deltas");
    end
    // strided-pointer mark
    idle();
    mark_valid = 1; mark_mpc = 64'h100; mark_delta = 64'h18;
    idle();
    acc(64'h100, 64'h8000 + 64'h40 * 23);
    chk(is_ptr, "marked as strided pointer");
    ptr_idx = hit_idx; #1;
    chk(ptr_delta == 64'h18, "pointer offset");
    // fill the table, then one more replaces the round-robin victim (entry 0)
    for (int i = 0; i < 30; i++) acc(64'h1000 + 64'(i), 64'h0);
    acc(64'h5000, 64'h0);
    chk(!hit, "33rd instruction misses");
    acc(64'h100, 64'h8000 + 64'h40 * 24);
    chk(!hit, "oldest (entry 0) was replaced");
    acc(64'h1010, 64'h0);
    chk(hit, "other entries still present");
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
