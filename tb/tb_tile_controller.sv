// tb_tile_controller: the PC loops 0..9 after reset; a JUMP received in the
// middle of a pass takes effect after instruction 9 (PC continues 10..19);
// LOAD drives the instruction memory write port in the cycle it arrives;
// CLOCK sets the clock factor.
module tb_tile_controller;
  import asoc_pkg::*;

  logic clk = 0, rst_n = 0;
  flit_t cfg;
  logic [4:0] pc, imem_waddr;
  logic wrap, imem_we, clk_mul, jumped;
  instr_t imem_wdata;
  logic [2:0] clk_n;
  int checks = 0, failures = 0;

  tile_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pc(int exp);
    checks++;
    if (int'(pc) != exp) begin
      failures++;
      $display("FAIL pc %0d exp %0d at %0t", pc, exp, $time);
    end
  endtask

  initial begin
    cfg = FLIT_IDLE;
    #12 rst_n = 1;
    // wait for the start of a pass: the PC left 0 at the first edge after reset
    checks++;
    @(negedge clk);
    if (pc != 5'd1) begin failures++; $display("FAIL first step %0d", pc); end
    while (pc != 0) @(negedge clk);
    // two passes of the reset schedule
    for (int i = 0; i < 20; i++) begin
      expect_pc(i % 10);
      checks++;
      if (wrap != (i % 10 == 9)) begin failures++; $display("FAIL wrap"); end
      @(negedge clk);
    end
    // jump at offset 3 of the next pass
    expect_pc(0); @(negedge clk);
    expect_pc(1); @(negedge clk);
    expect_pc(2);
    cfg = '{valid: 1'b1, data: cmd_jump(5'd10, 5'd9)};
    @(negedge clk);
    cfg = FLIT_IDLE;
    for (int i = 3; i < 10; i++) begin expect_pc(i); @(negedge clk); end
    checks++;
    if (!jumped) begin failures++; $display("FAIL jumped pulse"); end
    for (int i = 0; i < 25; i++) begin expect_pc(10 + i % 10); @(negedge clk); end
    // load
    cfg = '{valid: 1'b1, data: cmd_load(5'd21, instr_t'(21'h1abcde))};
    #1;
    checks++;
    if (!(imem_we && imem_waddr == 5'd21 && imem_wdata == instr_t'(21'h1abcde))) begin
      failures++; $display("FAIL load");
    end
    @(negedge clk);
    cfg = '{valid: 1'b0, data: cmd_load(5'd3, '0)};  // invalid word: no write
    #1;
    checks++;
    if (imem_we) begin failures++; $display("FAIL write on invalid word"); end
    // clock factor
    cfg = '{valid: 1'b1, data: cmd_clock(1'b0, 3'd5)};
    @(negedge clk);
    cfg = FLIT_IDLE;
    checks++;
    if (clk_n != 3'd5 || clk_mul) begin failures++; $display("FAIL clock cmd"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
