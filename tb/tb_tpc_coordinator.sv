// tb_tpc_coordinator: applies all combinations of the steering and request
// inputs (with random addresses) to the coordinator and compares every output
// with the rules: an access reaches P1 only if T2 does not own it and C1 only if
// neither does; T2 wins over P1 over C1 for the merged request; T2 and P1
// requests go to L1, C1 requests to L2; only the winner sees ready.
module tb_tpc_coordinator;
  import tpc_pkg::*;
  logic ev_valid, t2_handled, p1_handled, p1_ev_valid, c1_ev_valid;
  logic t2_pf_valid, p1_pf_valid, c1_pf_valid, t2_pf_ready, p1_pf_ready, c1_pf_ready;
  pf_req_t t2_pf_req, p1_pf_req, c1_pf_req;
  logic out_valid, out_ready;
  pf_out_t out_req;
  int checks = 0, failures = 0;

  tpc_coordinator dut (.ev_valid, .t2_handled, .p1_handled, .p1_ev_valid, .c1_ev_valid,
    .t2_pf_valid, .t2_pf_req, .t2_pf_ready, .p1_pf_valid, .p1_pf_req, .p1_pf_ready,
    .c1_pf_valid, .c1_pf_req, .c1_pf_ready, .out_valid, .out_req, .out_ready);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 128; v++) begin
        {ev_valid, t2_handled, p1_handled, t2_pf_valid, p1_pf_valid, c1_pf_valid, out_ready} = 7'(v);
        t2_pf_req = '{addr: {$urandom, $urandom}, src: SRC_T2, tag: 5'($urandom)};
        p1_pf_req = '{addr: {$urandom, $urandom}, src: SRC_P1, tag: 5'($urandom)};
        c1_pf_req = '{addr: {$urandom, $urandom}, src: SRC_C1, tag: 5'($urandom)};
        #1;
        chk(p1_ev_valid == (ev_valid && !t2_handled), "P1 steering");
        chk(c1_ev_valid == (ev_valid && !t2_handled && !p1_handled), "C1 steering");
        chk(out_valid == (t2_pf_valid || p1_pf_valid || c1_pf_valid), "merged valid");
        if (t2_pf_valid)
          chk(out_req.addr == t2_pf_req.addr && out_req.dest == DEST_L1 && out_req.src == SRC_T2 &&
              t2_pf_ready == out_ready && !p1_pf_ready && !c1_pf_ready, "T2 first, to L1");
        else if (p1_pf_valid)
          chk(out_req.addr == p1_pf_req.addr && out_req.dest == DEST_L1 && out_req.tag == p1_pf_req.tag &&
              p1_pf_ready == out_ready && !t2_pf_ready && !c1_pf_ready, "P1 second, to L1");
        else if (c1_pf_valid)
          chk(out_req.addr == c1_pf_req.addr && out_req.dest == DEST_L2 &&
              c1_pf_ready == out_ready && !t2_pf_ready && !p1_pf_ready, "C1 last, to L2");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
