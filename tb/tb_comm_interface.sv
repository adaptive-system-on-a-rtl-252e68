// tb_comm_interface: one tile with a test schedule of length 10:
//   0: west -> east and west -> input coreport 1 (multicast)
//   1: output coreport 1 -> north and south (one word, one pop)
//   2: south -> local config line
//   3: north -> south and east
//   4: south -> input coreport 2
// Checks: registered neighbour outputs one cycle after the scheduled slot,
// hold of link data on invalid slots, core-side delivery through the input
// coreports, one pop per multicast from an output coreport, a LOAD that
// rewrites instruction 5, a JUMP to a second schedule, and a CLOCK command
// that divides the core clock by 4.
module tb_comm_interface;
  import asoc_pkg::*;

  function automatic sched_t test_sched();
    sched_t s;
    foreach (s[i]) s[i] = '0;
    s[0]  = mk_instr(X, X, SRC_W, X, SRC_W, X, X);
    s[1]  = mk_instr(SRC_OP1, SRC_OP1, X, X, X, X, X);
    s[2]  = mk_instr(X, X, X, X, X, X, SRC_S);
    s[3]  = mk_instr(X, SRC_N, SRC_N, X, X, X, X);
    s[4]  = mk_instr(X, X, X, X, X, SRC_S, X);
    s[16] = mk_instr(X, X, X, SRC_E, X, X, X);      // second schedule: east -> west
    s[17] = mk_instr(X, X, X, X, X, X, SRC_S);
    return s;
  endfunction

  logic clk = 0, rst_n = 0;
  flit_t in_n, in_s, in_e, in_w, out_n, out_s, out_e, out_w;
  logic core_clk_out;
  logic [1:0] ip_pop, ip_empty;
  logic [1:0][31:0] ip_rdata;
  logic [0:0] op_push, op_full;
  logic [0:0][31:0] op_wdata;
  logic [4:0] pc;
  logic jumped;
  logic [1:0] ip_overflow;
  logic [3:0] link_toggles;
  logic [2:0] clk_n_active;
  int checks = 0, failures = 0;

  comm_interface #(.INIT(test_sched())) dut (
    .clk, .rst_n, .in_n, .in_s, .in_e, .in_w, .out_n, .out_s, .out_e, .out_w,
    .core_clk_out, .core_clk(core_clk_out),
    .ip_pop, .ip_rdata, .ip_empty, .op_push, .op_wdata, .op_full,
    .pc, .jumped, .ip_overflow, .link_toggles, .clk_n_active
  );

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic to_pc(int p);
    do @(negedge clk); while (int'(pc) != p);
  endtask

  task automatic core_push(logic [31:0] d);
    @(negedge core_clk_out);
    op_wdata[0] = d; op_push = 1;
    @(posedge core_clk_out);
    #1 op_push = 0;
  endtask

  task automatic core_pop(int i, logic [31:0] exp, string what);
    int guard = 0;
    while (ip_empty[i] && guard < 50) begin @(negedge core_clk_out); guard++; end
    @(negedge core_clk_out);
    chk(!ip_empty[i] && ip_rdata[i] == exp, what);
    ip_pop[i] = 1;
    @(posedge core_clk_out);
    #1 ip_pop[i] = 0;
  endtask

  logic [31:0] held;
  int period, t0;

  initial begin
    in_n = FLIT_IDLE; in_s = FLIT_IDLE; in_e = FLIT_IDLE; in_w = FLIT_IDLE;
    ip_pop = 0; op_push = 0; op_wdata = '0;
    #22 rst_n = 1;

    // slot 0: multicast west word to east link and input coreport 1
    to_pc(0);
    in_w = '{valid: 1, data: 32'hA0A0_0001};
    @(negedge clk);
    in_w = FLIT_IDLE;
    chk(out_e.valid && out_e.data == 32'hA0A0_0001, "west->east registered");
    chk(!out_w.valid, "west output idle");
    core_pop(0, 32'hA0A0_0001, "west->ip1");

    // invalid slot: link data held, valid low
    held = out_e.data;
    to_pc(0);
    in_w = '{valid: 0, data: 32'h5555_5555};
    @(negedge clk);
    chk(!out_e.valid && out_e.data == held, "invalid transfer holds link data");
    chk(ip_empty[0], "invalid transfer not written to coreport");

    // slot 1: output coreport word multicast north and south, popped once
    core_push(32'hB0B0_0002);
    core_push(32'hB0B0_0003);
    to_pc(1);
    @(negedge clk);
    chk(out_n.valid && out_n.data == 32'hB0B0_0002 && out_s.valid && out_s.data == 32'hB0B0_0002,
        "op1 -> north & south");
    to_pc(1);
    @(negedge clk);
    chk(out_n.valid && out_n.data == 32'hB0B0_0003, "second op1 word next pass");
    to_pc(1);
    @(negedge clk);
    chk(!out_n.valid, "empty output coreport gives invalid transfer");

    // slot 3: north to south and east
    to_pc(3);
    in_n = '{valid: 1, data: 32'hC0C0_0004};
    @(negedge clk);
    in_n = FLIT_IDLE;
    chk(out_s.valid && out_e.valid && out_s.data == 32'hC0C0_0004 && out_e.data == 32'hC0C0_0004,
        "north -> south & east");

    // slot 4: south to input coreport 2
    to_pc(4);
    in_s = '{valid: 1, data: 32'hD0D0_0005};
    @(negedge clk);
    in_s = FLIT_IDLE;
    core_pop(1, 32'hD0D0_0005, "south->ip2");

    // slot 2: LOAD instruction 5 := west -> north
    to_pc(2);
    in_s = '{valid: 1, data: cmd_load(5'd5, mk_instr(SRC_W, X, X, X, X, X, X))};
    @(negedge clk);
    in_s = FLIT_IDLE;
    to_pc(5);
    in_w = '{valid: 1, data: 32'hE0E0_0006};
    @(negedge clk);
    in_w = FLIT_IDLE;
    chk(out_n.valid && out_n.data == 32'hE0E0_0006, "loaded instruction executes");

    // slot 2: JUMP to schedule 16..17
    to_pc(2);
    in_s = '{valid: 1, data: cmd_jump(5'd16, 5'd1)};
    @(negedge clk);
    in_s = FLIT_IDLE;
    to_pc(9);
    @(negedge clk);
    chk(pc == 5'd16, "jump at end of pass");
    in_e = '{valid: 1, data: 32'hF0F0_0007};
    @(negedge clk);
    in_e = FLIT_IDLE;
    chk(out_w.valid && out_w.data == 32'hF0F0_0007, "new schedule routes east -> west");
    chk(pc == 5'd17, "second schedule steps");
    @(negedge clk);
    chk(pc == 5'd16, "second schedule loops");

    // slot 17: CLOCK n = 2
    to_pc(17);
    in_s = '{valid: 1, data: cmd_clock(1'b0, 3'd2)};
    @(negedge clk);
    in_s = FLIT_IDLE;
    repeat (20) @(posedge clk);
    @(posedge core_clk_out); t0 = int'($time);
    @(posedge core_clk_out); period = int'($time) - t0;
    chk(period == 40 && clk_n_active == 3'd2, "core clock divided by 4");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
