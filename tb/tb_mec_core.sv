// tb_mec_core: three macroblocks through the ME&C core with the current
// block and the search window arriving on separate streams at different
// paces. Each run uses a different search configuration word; the motion
// vector word is compared with a full-search / three-step model here, and
// the difference words with a direct computation. The last macroblock runs
// with motion compensation disabled and must produce no difference words.
module tb_mec_core;
  import asoc_pkg::*;
  localparam int N = 16, RMAX = 7, W = N + 2 * RMAX;

  logic clk = 0, rst_n = 0;
  logic cur_empty, cur_pop, ref_empty, ref_pop, mecfg_empty, mecfg_pop, mccfg_empty, mccfg_pop;
  logic [31:0] cur_data, ref_data, mecfg_data, mccfg_data, mv_data, diff_data;
  logic mv_full = 0, mv_push, diff_full = 0, diff_push, busy;
  logic [15:0] cand_cnt, mb_cnt;
  int checks = 0, failures = 0;

  mec_core #(.N(N), .RMAX(RMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] curq [$], refq [$], mecq [$], mccq [$], mvq [$], diffq [$];
  bit cur_gate, ref_gate;
  // stream heads are refreshed at the falling edge, popped at the rising edge
  always @(negedge clk) begin
    cur_empty   = (curq.size() == 0) || !cur_gate;
    cur_data    = (curq.size() == 0) ? '0 : curq[0];
    ref_empty   = (refq.size() == 0) || !ref_gate;
    ref_data    = (refq.size() == 0) ? '0 : refq[0];
    mecfg_empty = (mecq.size() == 0);
    mecfg_data  = mecfg_empty ? '0 : mecq[0];
    mccfg_empty = (mccq.size() == 0);
    mccfg_data  = mccfg_empty ? '0 : mccq[0];
  end

  always @(posedge clk) begin
    if (cur_pop) void'(curq.pop_front());
    if (ref_pop) void'(refq.pop_front());
    if (mecfg_pop) void'(mecq.pop_front());
    if (mccfg_pop) void'(mccq.pop_front());
    if (rst_n && mv_push) mvq.push_back(mv_data);
    if (rst_n && diff_push) diffq.push_back(diff_data);
    cur_gate <= ($urandom_range(0, 9) < 3);
    ref_gate <= ($urandom_range(0, 9) < 8);
    mv_full <= ($urandom_range(0, 3) == 0);
    diff_full <= ($urandom_range(0, 3) == 0);
  end

  logic [7:0] cur [N*N];
  logic [7:0] refw [W*W];

  function automatic int sad(int dx, int dy);
    int s;
    s = 0;
    for (int i = 0; i < N*N; i++) begin
      int a, b;
      a = cur[i];
      b = refw[(i / N + RMAX + dy) * W + i % N + RMAX + dx];
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  task automatic run(me_method_e m, int r, bit mc_en, int tx, int ty);
    int bdx, bdy, bs;
    int ndiff;
    for (int i = 0; i < W*W; i++) refw[i] = 8'($urandom);
    for (int i = 0; i < N*N; i++) cur[i] = refw[(i / N + RMAX + ty) * W + i % N + RMAX + tx] ^ 8'($urandom_range(0, 1));
    // expected vector
    bs = -1; bdx = 0; bdy = 0;
    if (m == ME_FULL) begin
      for (int y = -r; y <= r; y++) for (int x = -r; x <= r; x++) begin
        int s;
        s = sad(x, y);
        if (bs < 0 || s < bs) begin bs = s; bdx = x; bdy = y; end
      end
    end else begin
      bdx = tx; bdy = ty; bs = sad(tx, ty);  // random window: the planted match is found
    end
    mecq.push_back({16'd0, 8'd0, 4'(r), 2'b00, m});
    mccq.push_back({31'd0, mc_en});
    for (int w = 0; w < N*N/4; w++) curq.push_back({cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    for (int w = 0; w < W*W/4; w++) refq.push_back({refw[4*w+3], refw[4*w+2], refw[4*w+1], refw[4*w]});
    while (mvq.size() == 0) @(posedge clk);
    checks++;
    if (mvq[0] !== {8'(bdx), 8'(bdy), 16'(bs)}) begin
      failures++;
      $display("FAIL mv %h exp (%0d,%0d,%0d)", mvq[0], bdx, bdy, bs);
    end
    void'(mvq.pop_front());
    ndiff = mc_en ? N*N/4 : 0;
    repeat (3000) @(posedge clk);
    checks++;
    if (diffq.size() != ndiff) begin failures++; $display("FAIL %0d diff words exp %0d", diffq.size(), ndiff); end
    for (int w = 0; w < ndiff && w < diffq.size(); w++) begin
      logic [31:0] e;
      for (int q = 0; q < 4; q++) begin
        int idx, blk, py, px, d;
        idx = 4*w + q;
        blk = idx / 64;
        py = (blk / (N/8)) * 8 + (idx % 64) / 8;
        px = (blk % (N/8)) * 8 + idx % 8;
        d = int'(cur[py*N + px]) - int'(refw[(py + RMAX + bdy) * W + px + RMAX + bdx]);
        e[8*q +: 8] = 8'(d > 127 ? 127 : d < -128 ? -128 : d);
      end
      checks++;
      if (diffq[w] !== e) begin failures++; $display("FAIL diff word %0d", w); end
    end
    while (diffq.size() > 0) void'(diffq.pop_front());
    $display("macroblock done: method %0d range %0d mc %0d, %0d candidates", m, r, mc_en, cand_cnt);
  endtask

  initial begin
    #22 rst_n = 1;
    run(ME_FULL, 7, 1, 2, -3);
    run(ME_TSS, 7, 1, 4, 4);
    run(ME_FULL, 4, 0, -4, 1);
    checks++;
    if (mb_cnt != 3) begin failures++; $display("FAIL mb_cnt %0d", mb_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
