// tb_amat_tracker: drives random miss latencies into amat_tracker and compares the
// estimate after each sample with an integer model of the 1/8 exponential
// average (acc = acc - acc/8 + sample, estimate = acc/8), starting at 100 cycles.
module tb_amat_tracker;
  logic clk = 0, rst_n = 0;
  logic lat_valid = 0;
  logic [15:0] lat = 0, amat;
  int checks = 0, failures = 0;
  int unsigned acc;

  amat_tracker dut (.clk, .rst_n, .lat_valid, .lat, .amat);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (amat != 16'd100) begin failures++; $display("init amat %0d", amat); end
    acc = 800;
    for (int n = 0; n < 300; n++) begin
      lat_valid <= ($urandom_range(0, 3) != 0);
      lat       <= (n < 150) ? 16'($urandom_range(150, 250)) : 16'($urandom_range(20, 40));
      @(posedge clk);
      if (lat_valid) acc = acc - acc / 8 + lat;
      #1;
      checks++;
      if (amat != 16'(acc / 8)) begin failures++; $display("n=%0d amat %0d exp %0d", n, amat, acc / 8); end
    end
    // after many short latencies the estimate must have come down near them
    checks++; if (amat > 45) begin failures++; $display("did not converge %0d", amat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
