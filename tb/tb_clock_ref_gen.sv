// tb_clock_ref_gen: for every n the core clock period must be 2^n
// interconnect cycles (measured between rising edges after the change has
// settled); the multiply request falls back to factor 1.
module tb_clock_ref_gen;
  logic clk = 0, rst_n = 0, mul = 0;
  logic [2:0] n = 0, n_active;
  logic clk_core;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_rise = 0, period = 0;

  clock_ref_gen dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk_core) begin
    period = cyc - last_rise;
    last_rise = cyc;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int exp);
    repeat (600) @(posedge clk);
    repeat (3) @(posedge clk_core);
    #1;
    checks++;
    if (period != exp) begin
      failures++;
      $display("FAIL n=%0d mul=%0d period %0d exp %0d", n, mul, period, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      n = 3'(k);
      measure(1 << k);
      checks++;
      if (n_active != 3'(k)) begin failures++; $display("FAIL n_active"); end
    end
    n = 3'd2;
    measure(4);
    n = 3'd6; mul = 1;
    measure(1);
    n = 3'd3; mul = 0;
    measure(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
