// tb_crossbar: random selects and words. Combinational destinations (input
// coreports, config line) must carry the selected source; neighbour outputs
// must carry it one cycle later, and keep their old data bits with valid low
// when the transfer is invalid.
module tb_crossbar;
  import asoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NUM_DEST-1:0][6:0] sel;
  flit_t in_n, in_s, in_e, in_w, op1, op2;
  flit_t out_n, out_s, out_e, out_w, ip1, ip2, cfg;
  logic [3:0] link_toggles;
  int checks = 0, failures = 0;
  int holds = 0;

  crossbar dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t pick(int s);
    case (s)
      1: return in_n;  2: return in_s;  3: return in_e;  4: return in_w;
      5: return op1;   6: return op2;
      default: return FLIT_IDLE;
    endcase
  endfunction

  flit_t exp_link [4];
  flit_t got [4];

  initial begin
    sel = '0;
    for (int d = 0; d < 7; d++) sel[d] = 7'b1;
    {in_n, in_s, in_e, in_w, op1, op2} = '0;
    for (int l = 0; l < 4; l++) exp_link[l] = FLIT_IDLE;
    #12 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int src [7];
      @(negedge clk);
      in_n = '{valid: 1'($urandom), data: $urandom};
      in_s = '{valid: 1'($urandom), data: $urandom};
      in_e = '{valid: 1'($urandom), data: $urandom};
      in_w = '{valid: 1'($urandom), data: $urandom};
      op1  = '{valid: 1'($urandom), data: $urandom};
      op2  = '{valid: 1'($urandom), data: $urandom};
      for (int d = 0; d < 7; d++) begin
        src[d] = $urandom_range(0, 6);
        sel[d] = 7'(1 << src[d]);
      end
      #1;
      begin
        flit_t e1, e2, ec;
        e1 = pick(src[4]); e2 = pick(src[5]); ec = pick(src[6]);
        checks += 3;
        if (ip1.valid !== e1.valid || (e1.valid && ip1.data !== e1.data)) begin failures++; $display("FAIL ip1"); end
        if (ip2.valid !== e2.valid || (e2.valid && ip2.data !== e2.data)) begin failures++; $display("FAIL ip2"); end
        if (cfg.valid !== ec.valid || (ec.valid && cfg.data !== ec.data)) begin failures++; $display("FAIL cfg"); end
      end
      for (int l = 0; l < 4; l++) begin
        flit_t f;
        f = pick(src[l]);
        exp_link[l].valid = f.valid;
        if (f.valid) exp_link[l].data = f.data;
        else holds++;
      end
      @(posedge clk);
      #1;
      got[0] = out_n; got[1] = out_s; got[2] = out_e; got[3] = out_w;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (got[l] !== exp_link[l]) begin
          failures++;
          $display("FAIL link %0d got %p exp %p", l, got[l], exp_link[l]);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
