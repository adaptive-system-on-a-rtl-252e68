// tb_mc_unit: random macroblock and window, several motion vectors including
// the window corners. Every output word is compared with a difference
// computed here (saturated to signed 8 bits, 8x8 block order, pixel 0 in the
// low byte). The consumer is made busy at random to exercise out_full.
module tb_mc_unit;
  localparam int N = 16, RMAX = 7, W = N + 2 * RMAX;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [7:0] mv_dx, mv_dy;
  logic [7:0] cur_addr;
  logic [9:0] ref_addr;
  logic [7:0] cur_pix, ref_pix;
  logic out_full = 0, out_push, busy, done;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  logic [7:0] cur [N*N];
  logic [7:0] refw [W*W];
  assign cur_pix = cur[cur_addr];
  assign ref_pix = refw[ref_addr];

  mc_unit #(.N(N), .RMAX(RMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] exp_word(int w, int dx, int dy);
    logic [31:0] r;
    for (int q = 0; q < 4; q++) begin
      int idx, blk, py, px, d;
      idx = w * 4 + q;
      blk = idx / 64;
      py = (blk / (N/8)) * 8 + (idx % 64) / 8;
      px = (blk % (N/8)) * 8 + idx % 8;
      d = int'(cur[py*N + px]) - int'(refw[(py + RMAX + dy) * W + px + RMAX + dx]);
      if (d > 127) d = 127;
      if (d < -128) d = -128;
      r[8*q +: 8] = 8'(d);
    end
    return r;
  endfunction

  int nw;
  always @(posedge clk) begin
    out_full <= ($urandom_range(0, 3) == 0);
    if (rst_n && out_push) begin
      checks++;
      if (out_data !== exp_word(nw, int'(mv_dx), int'(mv_dy))) begin
        failures++;
        $display("FAIL word %0d t=%0t got %h exp %h", nw, $time, out_data, exp_word(nw, int'(mv_dx), int'(mv_dy)));
      end
      nw++;
    end
  end

  task automatic run(int dx, int dy);
    for (int i = 0; i < N*N; i++) cur[i] = 8'($urandom);
    for (int i = 0; i < W*W; i++) refw[i] = 8'($urandom);
    nw = 0;
    @(negedge clk);
    mv_dx = 8'(dx); mv_dy = 8'(dy); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nw != N*N/4) begin failures++; $display("FAIL %0d words", nw); end
  endtask

  initial begin
    mv_dx = 0; mv_dy = 0;
    #22 rst_n = 1;
    run(0, 0);
    run(-7, -7);
    run(7, 7);
    run(3, -6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
