// tb_inst_state_bits: writes random 2-bit states to random instruction slots,
// keeps a reference copy, reads them back, and checks that an I-cache line fill
// clears exactly the 16 slots of the filled 64-byte line.
module tb_inst_state_bits;
  import tpc_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t rd_pc = 0, wr_pc = 0, fill_addr = 0;
  logic [1:0] rd_data, wr_data = 0;
  logic wr_en = 0, fill_en = 0;
  int checks = 0, failures = 0;
  logic [1:0] ref_q [8192];

  inst_state_bits #(.W(2), .ENTRIES(8192)) dut (.clk, .rst_n, .rd_pc, .rd_data, .wr_en, .wr_pc, .wr_data, .fill_en, .fill_addr);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(addr_t pc);
    rd_pc = pc; #1;
    checks++;
    if (rd_data != ref_q[pc[14:2]]) begin failures++; $display("pc %h read %0d exp %0d", pc, rd_data, ref_q[pc[14:2]]); end
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) ref_q[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 50; i++) rd_check(addr_t'($urandom) << 2);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en = 1; wr_pc = {32'h0, $urandom} & 64'h7ffc | 64'h4000_0000; wr_data = 2'($urandom_range(1, 3));
      @(posedge clk); #1;
      ref_q[wr_pc[14:2]] = wr_data;
      wr_en = 0;
    end
    for (int i = 0; i < 8192; i += 7) rd_check(addr_t'(i) << 2);
    // fill: line at 0x1240 (slots 0x490..0x49f) cleared
    @(negedge clk);
    fill_en = 1; fill_addr = 64'h1240 + 64'h8;
    @(posedge clk); #1;
    fill_en = 0;
    for (int i = 'h490; i < 'h4a0; i++) ref_q[i] = 0;
    for (int i = 'h480; i < 'h4b0; i++) begin
      rd_check(addr_t'(i) << 2);
    end
    for (int i = 'h490; i < 'h4a0; i++) begin
      rd_pc = addr_t'(i) << 2; #1; checks++;
      if (rd_data != 0) begin failures++; $display("not cleared %h", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
