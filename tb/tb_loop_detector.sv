// tb_loop_detector: plays branch traces into loop_detector and checks
//  1. a backward branch repeated every 20 cycles becomes the loop (loop_pc,
//     loop_valid), each instance after the first gives one iter_pulse, and
//     T_iter settles at 20;
//  2. a backward branch interleaved once per iteration does not disturb the
//     loop and is learned as non-loop: afterwards even two back-to-back
//     instances of it leave the loop register alone;
//  3. forward branches are ignored;
//  4. an inner loop (a backward branch repeated back to back) takes over, and
//     T_iter follows its period of 6 cycles;
//  5. 200 instances of that loop with random periods of 2..60 cycles: after each
//     one T_iter must equal a model of the average kept here
//     (4*T <- 4*T - floor(4*T/4) + period).
module tb_loop_detector;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic br_valid = 0;
  addr_t br_pc = 0, br_target = 0, loop_pc;
  logic iter_pulse, loop_valid;
  logic [15:0] t_iter;
  int checks = 0, failures = 0, pulses = 0;

  loop_detector dut (.clk, .rst_n, .br_valid, .br_pc, .br_target, .iter_pulse, .loop_valid, .loop_pc, .t_iter);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && iter_pulse) pulses++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam addr_t L_PC = 64'h1000, L_T = 64'h0f00;
  localparam addr_t X_PC = 64'h0f80, X_T = 64'h0f40;
  localparam addr_t I_PC = 64'h0fa0, I_T = 64'h0f60;

  // one branch, then gap-1 idle cycles
  task automatic br(addr_t pc, addr_t t, int gap);
    br_valid <= 1; br_pc <= pc; br_target <= t;
    @(posedge clk);
    br_valid <= 0;
    repeat (gap - 1) @(posedge clk);
  endtask

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (pulses=%0d loop_pc=%h t_iter=%0d)", m, pulses, loop_pc, t_iter); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 1. simple loop
    for (int i = 0; i < 10; i++) br(L_PC, L_T, 20);
    chk(pulses == 9, "9 iteration pulses");
    chk(loop_valid && loop_pc == L_PC, "loop identified");
    chk(t_iter == 16'd20, "T_iter = 20");
    // 2. interloper once per iteration
    pulses = 0;
    for (int i = 0; i < 8; i++) begin br(X_PC, X_T, 10); br(L_PC, L_T, 10); end
    chk(pulses == 8, "loop kept through interloper");
    chk(loop_pc == L_PC, "loop pc kept");
    br(X_PC, X_T, 3); br(X_PC, X_T, 3); br(X_PC, X_T, 3);
    chk(loop_pc == L_PC, "non-loop branch ignored");
    // 3. forward branches
    pulses = 0;
    for (int i = 0; i < 5; i++) begin br(64'h2000, 64'h2100, 5); br(L_PC, L_T, 15); end
    chk(pulses == 5 && loop_pc == L_PC, "forward branches ignored");
    chk(t_iter == 16'd20, "T_iter still 20");
    // 4. inner loop takes over
    pulses = 0;
    for (int i = 0; i < 12; i++) br(I_PC, I_T, 6);
    chk(loop_pc == I_PC, "inner loop took over");
    chk(pulses == 11, "inner loop pulses");
    chk(t_iter == 16'd6, "T_iter = 6");
    // 5. random periods against the averaging model
    begin
      int avg4, prev, g, bad;
      avg4 = 24; prev = 6; bad = 0;
      for (int k = 0; k < 200; k++) begin
        g = $urandom_range(2, 60);
        br(I_PC, I_T, g);
        avg4 = avg4 - avg4 / 4 + prev;
        chk(t_iter == 16'(avg4 / 4) && loop_pc == I_PC, $sformatf("average after instance %0d: model %0d", k, avg4 / 4));
        prev = g;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
