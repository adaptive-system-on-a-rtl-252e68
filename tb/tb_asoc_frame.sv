// tb_asoc_frame: a P-frame workload on the three-tile system at its default
// sizes: one complete 352x240 P-frame, 22 x 15 = 330 macroblocks.
// The reference frame is a smooth pattern with fine random texture; the current frame is the reference
// moved by a global motion of (+2, -1) pixels plus small noise. For each
// macroblock the search window (block position +-7, clamped at the frame
// edge) is streamed as the saved frame and the 16x16 block as the frame in,
// each at one word per 10-cycle schedule pass, as in the P-frame schedule.
// The ME configuration changes every macroblock (full, spiral and three step
// search in turn), one configuration word per macroblock. Every motion
// vector and every DCT word of the compensated difference leaving the east
// edge is compared with models here; interior macroblocks must find the
// global motion. The testbench also counts the slots used by the frame-in
// stream against the slots it was offered and checks that no coreport
// overflowed.
module tb_asoc_frame;
  import asoc_pkg::*;
  localparam int N = 16, RMAX = 7, W = N + 2 * RMAX;

  logic clk = 0, rst_n = 0;
  flit_t west_in, west_out, east_in, east_out;
  flit_t north_in [3], north_out [3], south_in [3], south_out [3];
  logic [4:0] pc [3];
  logic [2:0] jumped;
  logic [2:0] clk_n_active [3];
  logic [3:0] link_toggles [3];
  logic [5:0] ip_overflow;
  logic [15:0] me_cand_cnt, me_mb_cnt, dct_blk_cnt, dct_vec_skipped, dct_planes_saved;
  logic [31:0] dct_planes_done;
  logic me_busy, dct_busy;
  int checks = 0, failures = 0;

  asoc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired: mb %0d blk %0d dct words %0d mv %0d busy %b%b ovf %b", me_mb_cnt, dct_blk_cnt, dct_got.size(), mv_got.size(), me_busy, dct_busy, ip_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------------
  // stream sources: words wait in queues and go out in their slot
  // ------------------------------------------------------------------
  logic [31:0] frame_q [$], saved_q [$];
  logic [31:0] corecfg_q [3][$];
  logic [31:0] ifcfg_q   [3][$];
  logic [31:0] north_test_q [$];

  always @(negedge clk) begin
    int p;
    west_in = FLIT_IDLE;
    for (int t = 0; t < 3; t++) begin south_in[t] = FLIT_IDLE; north_in[t] = FLIT_IDLE; end
    east_in = FLIT_IDLE;
    p = int'(pc[0]);
    if (rst_n) begin
      if ((p == 0 || p == 10) && frame_q.size() > 0) west_in = '{valid: 1, data: frame_q.pop_front()};
      if ((p == 0 || p == 10) && saved_q.size() > 0) south_in[1] = '{valid: 1, data: saved_q.pop_front()};
      if (p == 1 || p == 11)
        for (int t = 0; t < 3; t++)
          if (corecfg_q[t].size() > 0) south_in[t] = '{valid: 1, data: corecfg_q[t].pop_front()};
      if (p == 2 || p == 12)
        for (int t = 0; t < 3; t++)
          if (ifcfg_q[t].size() > 0) south_in[t] = '{valid: 1, data: ifcfg_q[t].pop_front()};
      if (p == 13 && north_test_q.size() > 0) south_in[0] = '{valid: 1, data: north_test_q.pop_front()};
    end
  end

  // ------------------------------------------------------------------
  // east edge monitor
  // ------------------------------------------------------------------
  logic [31:0] mv_got [$], dct_got [$], north_got [$];
  int idle_dct_slots = 0;
  int prev_pc;
  always @(posedge clk) begin
    // the link register was loaded in the previous cycle's slot
    prev_pc = int'(pc[0]) == 0 ? -1 : int'(pc[0]) - 1;
    if (rst_n) begin
      if (east_out.valid && (prev_pc == 0 || prev_pc == 10)) dct_got.push_back(east_out.data);
      else if (east_out.valid && prev_pc == 3) mv_got.push_back(east_out.data);
      else if (east_out.valid) begin failures++; $display("FAIL east word in slot %0d", prev_pc); end
      if (!east_out.valid && prev_pc == 0) idle_dct_slots++;
      if (north_out[0].valid) north_got.push_back(north_out[0].data);
    end
  end

  // ------------------------------------------------------------------
  // frames: 352x240, reference = smooth pattern plus texture, current = moved reference
  // ------------------------------------------------------------------
  localparam int FW = 352, FH = 240, MVX = 2, MVY = -1;
  localparam int SPIRAL_THR = 600;   // early stop for the spiral search
  logic [7:0] ref_f [FW*FH];
  logic [7:0] noise [FW*FH];

  function automatic logic [7:0] ref_px(int y, int x);
    y = y < 0 ? 0 : y >= FH ? FH - 1 : y;
    x = x < 0 ? 0 : x >= FW ? FW - 1 : x;
    return ref_f[y * FW + x];
  endfunction

  // the current pixel (y, x) shows the reference pixel (y + MVY, x + MVX)
  function automatic logic [7:0] cur_px(int y, int x);
    return ref_px(y + MVY, x + MVX) + noise[y * FW + x];
  endfunction

  // ------------------------------------------------------------------
  // models
  // ------------------------------------------------------------------
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

  function automatic int c(int k, int n);
    real s, v;
    s = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    v = 256.0 * s * $cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic logic [7:0] quant3(int z);
    int t;
    t = (z + 4) >>> 3;
    return 8'(t > 127 ? 127 : t < -128 ? -128 : t);
  endfunction

  // integer 2-D DCT with the core's rounding, quantised by 8, 16 packed words
  task automatic dct_words(input int x [64], output logic [31:0] w [16]);
    int y [64], z [64];
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++) begin
        int s;
        s = 0;
        for (int n = 0; n < 8; n++) s += c(k, n) * x[r*8 + n];
        y[r*8 + k] = (s + 32) >>> 6;
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        int s;
        s = 0;
        for (int n = 0; n < 8; n++) s += c(u, n) * y[n*8 + v];
        z[u*8 + v] = (s + 512) >>> 10;
      end
    for (int i = 0; i < 16; i++)
      w[i] = {quant3(z[4*i + 3]), quant3(z[4*i + 2]), quant3(z[4*i + 1]), quant3(z[4*i])};
  endtask

  task automatic macroblock(me_method_e m, int tx, int ty, output int mvx, output int mvy);
    int bdx, bdy, bs, n_mv, n_dct;
    n_mv = mv_got.size();
    n_dct = dct_got.size();
    for (int i = 0; i < W*W; i++) refw[i] = ref_px(ty + i / W - RMAX, tx + i % W - RMAX);
    for (int i = 0; i < N*N; i++) cur[i] = cur_px(ty + i / N, tx + i % N);
    bs = -1; bdx = 0; bdy = 0;
    if (m == ME_FULL) begin
      for (int y = -RMAX; y <= RMAX; y++) for (int x = -RMAX; x <= RMAX; x++) begin
        int s;
        s = sad(x, y);
        if (bs < 0 || s < bs) begin bs = s; bdx = x; bdy = y; end
      end
    end else if (m == ME_SPIRAL) begin
      // rings of growing distance from (0,0), clockwise from the top-left
      // corner, stopping at the first SAD at or below the threshold
      bit stop;
      stop = 0;
      for (int d = 0; d <= RMAX && !stop; d++)
        for (int p = 0; p < ((d == 0) ? 1 : 8 * d) && !stop; p++) begin
          int x, y, sv;
          if (d == 0) begin x = 0; y = 0; end
          else if (p < 2*d) begin x = -d + p; y = -d; end
          else if (p < 4*d) begin x = d; y = -d + (p - 2*d); end
          else if (p < 6*d) begin x = d - (p - 4*d); y = d; end
          else begin x = -d; y = d - (p - 6*d); end
          sv = sad(x, y);
          if (bs < 0 || sv < bs) begin bs = sv; bdx = x; bdy = y; end
          if (sv <= SPIRAL_THR) stop = 1;
        end
    end else begin
      // three step search: steps 4, 2, 1 around the best so far
      int cx, cy;
      cx = 0; cy = 0; bs = sad(0, 0);
      for (int st = 4; st > 0; st = st / 2) begin
        for (int oy = -1; oy <= 1; oy++)
          for (int ox = -1; ox <= 1; ox++) begin
            int x, y, sv;
            x = cx + ox * st; y = cy + oy * st;
            if (!(ox == 0 && oy == 0) && x >= -RMAX && x <= RMAX && y >= -RMAX && y <= RMAX) begin
              sv = sad(x, y);
              if (sv < bs) begin bs = sv; bdx = x; bdy = y; end
            end
          end
        cx = bdx; cy = bdy;
      end
    end
    corecfg_q[0].push_back({16'(SPIRAL_THR), 8'd0, 4'(RMAX), 2'b00, m});
    for (int w = 0; w < N*N/4; w++) frame_q.push_back({cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    for (int w = 0; w < W*W/4; w++) saved_q.push_back({refw[4*w+3], refw[4*w+2], refw[4*w+1], refw[4*w]});
    while (mv_got.size() == n_mv) @(posedge clk);
    chk(mv_got[n_mv] == {8'(bdx), 8'(bdy), 16'(bs)}, "motion vector at east edge");
    mvx = bdx; mvy = bdy;
    while (dct_got.size() < n_dct + 4 * 16) @(posedge clk);
    for (int b = 0; b < 4; b++) begin
      int x [64];
      logic [31:0] ew [16];
      for (int i = 0; i < 64; i++) begin
        int py, px, d;
        py = (b / 2) * 8 + i / 8;
        px = (b % 2) * 8 + i % 8;
        d = int'(cur[py*N + px]) - int'(refw[(py + RMAX + bdy) * W + px + RMAX + bdx]);
        x[i] = d > 127 ? 127 : d < -128 ? -128 : d;
      end
      dct_words(x, ew);
      for (int i = 0; i < 16; i++) chk(dct_got[n_dct + b*16 + i] == ew[i], "DCT coefficient word");
    end
  endtask

  int frame_slots = 0, frame_words = 0;
  always @(posedge clk) if (rst_n && (pc[0] == 0)) begin
    frame_slots++;
    if (west_in.valid) frame_words++;
  end

  initial begin
    int mvx, mvy, n_found, n_full, n_spiral, n_tss;
    int cands [3];
    west_in = FLIT_IDLE; east_in = FLIT_IDLE;
    for (int t = 0; t < 3; t++) begin north_in[t] = FLIT_IDLE; south_in[t] = FLIT_IDLE; end
    for (int i = 0; i < FW*FH; i++) begin
      real v;
      v = 120.0 + 50.0 * $sin(6.2832 * real'(i % FW) / 40.0) + 40.0 * $cos(6.2832 * real'(i / FW) / 36.0);
      ref_f[i] = 8'(int'(v)) + 8'($urandom_range(0, 7));
      noise[i] = 8'($urandom_range(0, 2));
    end
    #22 rst_n = 1;
    corecfg_q[1].push_back(32'd1);                  // MC on
    corecfg_q[2].push_back(32'(3 << 3 | 3'b110));   // DCT: inter, MSB rejection, RCC, q = 3
    repeat (40) @(posedge clk);

    n_found = 0; n_full = 0; n_spiral = 0; n_tss = 0;
    cands = '{0, 0, 0};
    for (int mb_row = 0; mb_row < FH / N; mb_row++)
      for (int mb = 0; mb < FW / N; mb++) begin
        me_method_e m;
        m = me_method_e'((mb + mb_row) % 3);
        macroblock(m, mb * N, mb_row * N, mvx, mvy);
        cands[m] += int'(me_cand_cnt);
        if (m == ME_FULL) n_full++; else if (m == ME_SPIRAL) n_spiral++; else n_tss++;
        if (mvx == MVX && mvy == MVY) n_found++;
        // away from the frame edge the model (and so the engine) must find the motion
        if (mb > 0 && mb < FW / N - 1 && mb_row > 0 && mb_row < FH / N - 1)
          chk(mvx == MVX && mvy == MVY, "global motion found");
      end
    chk(me_mb_cnt == 16'(FW / N * FH / N), "330 macroblocks through the ME core");
    chk(dct_blk_cnt == 16'(4 * FW / N * FH / N), "1320 8x8 blocks through the DCT core");
    chk(ip_overflow == 0, "no coreport overflow");
    chk(n_full > 0 && n_spiral > 0 && n_tss > 0, "all three search methods used");
    chk(cands[ME_SPIRAL] < cands[ME_FULL], "spiral search stops early");
    chk(frame_words == FW * FH / 4, "one frame of frame-in words");
    chk(frame_words <= frame_slots, "frame-in words within their slots");
    $display("candidates per macroblock: full %0d, spiral %0d, three step %0d",
             cands[ME_FULL] / n_full, cands[ME_SPIRAL] / n_spiral, cands[ME_TSS] / n_tss);
    $display("macroblocks %0d (full %0d, spiral %0d, three step %0d), motion found in %0d; frame-in slots offered %0d, used %0d; RCC skips %0d, bit planes processed %0d",
             me_mb_cnt, n_full, n_spiral, n_tss, n_found, frame_slots, frame_words, dct_vec_skipped, dct_planes_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
