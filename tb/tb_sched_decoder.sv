// tb_sched_decoder: random instructions; each destination's one-hot select
// must name the source in its 3-bit field, and output coreport reads must be
// flagged exactly when some destination names that coreport.
module tb_sched_decoder;
  import asoc_pkg::*;

  instr_t instr;
  logic [NUM_DEST-1:0][6:0] sel;
  logic [1:0] op_read;
  int checks = 0, failures = 0;

  sched_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [1:0] exp_rd;
      instr = instr_t'($urandom);
      if (t == 0) instr = mk_instr(SRC_N, X, SRC_N, X, X, X, X);  // north to south & east
      if (t == 1) instr = mk_instr(X, SRC_N, SRC_N, X, X, X, X);
      #1;
      exp_rd = 0;
      for (int d = 0; d < 7; d++) begin
        int f;
        logic [6:0] exp;
        f = int'(instr[d*3 +: 3]);
        exp = (f == 7) ? 7'b1 : 7'(1 << f);
        if (f == 5) exp_rd[0] = 1;
        if (f == 6) exp_rd[1] = 1;
        checks++;
        if (sel[d] !== exp) begin
          failures++;
          $display("FAIL instr %h dest %0d sel %b exp %b", instr, d, sel[d], exp);
        end
      end
      checks++;
      if (op_read !== exp_rd) begin
        failures++;
        $display("FAIL op_read %b exp %b", op_read, exp_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
