// tb_instr_mem: checks reset contents, asynchronous read and the write port
// of the instruction memory against a model array.
module tb_instr_mem;
  import asoc_pkg::*;

  function automatic sched_t init_pattern();
    sched_t s;
    foreach (s[i]) s[i] = instr_t'(i * 32'h1234 + 7);
    return s;
  endfunction

  logic clk = 0, rst_n = 0;
  logic [4:0] rd_addr, wr_addr;
  instr_t rd_instr, wr_instr;
  logic wr_en;
  int checks = 0, failures = 0;
  instr_t model [32];

  instr_mem #(.INIT(init_pattern())) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      rd_addr = 5'(a);
      #1;
      checks++;
      if (rd_instr !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rd_instr, model[a]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_instr = 0; rd_addr = 0;
    for (int i = 0; i < 32; i++) model[i] = instr_t'(i * 32'h1234 + 7);
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = 5'($urandom_range(0, 31));
      wr_instr = instr_t'($urandom);
      @(posedge clk);
      model[wr_addr] = wr_instr;
      #1 wr_en = 0;
      rd_addr = wr_addr;
      #1;
      checks++;
      if (rd_instr !== model[wr_addr]) begin
        failures++;
        $display("FAIL after write addr %0d", wr_addr);
      end
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
