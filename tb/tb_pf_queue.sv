// tb_pf_queue: random requests from all sources with random memory-side
// back-pressure go through the queue and through a reference model written here.
// The model: pop the head if ready, then append; when full, a T2/P1 request
// evicts the youngest C1 entry other than the head, otherwise the incoming request is dropped. Every
// popped request and every drop pulse is compared with the model, and the test
// requires that both kinds of drop happened.
module tb_pf_queue;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, out_ready = 0, drop, drop_c1;
  pf_out_t in_req = '0, out_req;
  logic [3:0] count;
  int checks = 0, failures = 0, n_evict_c1 = 0, n_drop_in = 0;
  pf_out_t mq[$];

  pf_queue dut (.clk, .rst_n, .in_valid, .in_req, .out_valid, .out_req, .out_ready, .drop, .drop_c1, .count);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5000; n++) begin
      bit exp_drop, exp_drop_c1;
      int vic;
      @(negedge clk);
      in_valid  = $urandom_range(0, 3) != 0;
      in_req    = '{addr: addr_t'(n), src: pf_src_e'($urandom_range(0, 3)), tag: '0, dest: DEST_L1};
      out_ready = (n % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      #1;
      // compare head
      chk(out_valid == (mq.size() != 0), "valid");
      if (out_valid && mq.size() != 0) chk(out_req == mq[0], "head");
      // model step
      exp_drop = 0; exp_drop_c1 = 0;
      if (mq.size() != 0 && out_ready) void'(mq.pop_front());
      if (in_valid) begin
        if (mq.size() < 8) mq.push_back(in_req);
        else begin
          exp_drop = 1;
          vic = -1;
          if (in_req.src != SRC_C1) foreach (mq[i]) if (i > 0 && mq[i].src == SRC_C1) vic = i;
          if (vic >= 0) begin mq.delete(vic); mq.push_back(in_req); exp_drop_c1 = 1; n_evict_c1++; end
          else begin exp_drop_c1 = in_req.src == SRC_C1; n_drop_in++; end
        end
      end
      chk(drop == exp_drop && drop_c1 == exp_drop_c1, "drop pulses");
    end
    chk(n_evict_c1 > 10 && n_drop_in > 10, $sformatf("both drop kinds happened (%0d, %0d)", n_evict_c1, n_drop_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
