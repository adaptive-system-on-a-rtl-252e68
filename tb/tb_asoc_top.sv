// tb_asoc_top: end-to-end run of the three-tile system at its default sizes
// (16x16 macroblocks, search range 7).
//   1. P-frame schedule. Control words from the south: ME full search,
//      MC on, DCT inter mode with MSB rejection and RCC. One macroblock: 64 current-block words enter from the
//      west (slot 0), 225 search-window words from the south of the MC tile
//      (slot 0). The motion vector must leave at the east edge in slot 4 of
//      a pass and the four 8x8 DCT blocks of the motion compensated
//      difference in slot 1; both are compared with models here.
//   2. A second macroblock with the three step search (mode switch) and the
//      ME tile's core clock divided by 2 through a CLOCK command.
//   3. JUMP to the I-frame schedule in all tiles, and a LOAD that adds a
//      south-to-north route to the ME tile's I-frame schedule. One 8x8 block
//      of pixels enters from the west, bypasses ME and MC and is transformed
//      in intra mode; the ME core must see nothing.
// Each mechanism (idle slot with valid low, clock division, two search
// methods, jump, load, bypass, MSB rejection, RCC) is counted and must occur.
module tb_asoc_top;
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
    #4ms;
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

  task automatic macroblock(me_method_e m, int tx, int ty);
    int bdx, bdy, bs, n_mv, n_dct;
    n_mv = mv_got.size();
    n_dct = dct_got.size();
    for (int i = 0; i < W*W; i++) refw[i] = 8'($urandom);
    for (int i = 0; i < N*N; i++)
      cur[i] = refw[(i / N + RMAX + ty) * W + i % N + RMAX + tx] + 8'($urandom_range(0, 3));
    bs = -1; bdx = 0; bdy = 0;
    if (m == ME_FULL) begin
      for (int y = -RMAX; y <= RMAX; y++) for (int x = -RMAX; x <= RMAX; x++) begin
        int s;
        s = sad(x, y);
        if (bs < 0 || s < bs) begin bs = s; bdx = x; bdy = y; end
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
    corecfg_q[0].push_back({16'd0, 8'd0, 4'(RMAX), 2'b00, m});
    for (int w = 0; w < N*N/4; w++) frame_q.push_back({cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    for (int w = 0; w < W*W/4; w++) saved_q.push_back({refw[4*w+3], refw[4*w+2], refw[4*w+1], refw[4*w]});
    while (mv_got.size() == n_mv) @(posedge clk);
    chk(mv_got[n_mv] == {8'(bdx), 8'(bdy), 16'(bs)}, "motion vector at east edge");
    $display("MV word %h, expected (%0d,%0d) SAD %0d, %0d candidates", mv_got[n_mv], bdx, bdy, bs, me_cand_cnt);
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

  int n_methods = 0;
  int saved0;
  logic [7:0] pix [64];

  initial begin
    west_in = FLIT_IDLE; east_in = FLIT_IDLE;
    for (int t = 0; t < 3; t++) begin north_in[t] = FLIT_IDLE; south_in[t] = FLIT_IDLE; end
    #22 rst_n = 1;

    // configuration for the P-frame run
    corecfg_q[1].push_back(32'd1);                  // MC on
    corecfg_q[2].push_back(32'(3 << 3 | 3'b110));   // DCT: inter, MSB rejection, RCC, q = 3
    repeat (40) @(posedge clk);

    macroblock(ME_FULL, 3, -2);
    n_methods++;
    chk(me_cand_cnt == 225, "full search visits 225 candidates");
    // the three step search needs far fewer cycles: halve the ME core clock
    ifcfg_q[0].push_back(cmd_clock(1'b0, 3'd1));
    repeat (40) @(posedge clk);
    chk(clk_n_active[0] == 3'd1 && clk_n_active[2] == 3'd0, "ME tile clock divided");
    macroblock(ME_TSS, -5, 6);
    n_methods++;
    chk(me_cand_cnt == 25, "three step search visits 25 candidates");
    chk(idle_dct_slots > 0, "idle DCT output slots travel with valid low");

    // switch every tile to the I-frame schedule; add a route with LOAD
    ifcfg_q[0].push_back(cmd_load(5'd13, mk_instr(SRC_S, X, X, X, X, X, X)));
    ifcfg_q[0].push_back(cmd_jump(5'd10, 5'd9));
    ifcfg_q[1].push_back(32'd0);
    ifcfg_q[1].push_back(cmd_jump(5'd10, 5'd9));
    ifcfg_q[2].push_back(32'd0);
    ifcfg_q[2].push_back(cmd_jump(5'd10, 5'd9));
    while (pc[0] < 10) @(posedge clk);
    chk(pc[1] == pc[0] && pc[2] == pc[0], "tiles jump together");

    // one intra 8x8 block: a gradient with flat (value 128) rows
    saved0 = dct_got.size();
    corecfg_q[2].push_back(32'(3 << 3 | 3'b111));   // DCT: intra, MSB rejection, RCC, q = 3
    for (int i = 0; i < 64; i++) pix[i] = ((i / 8) % 2 == 0) ? 8'd128 : 8'(100 + 5 * (i % 8) + i / 8);
    for (int w = 0; w < 16; w++) frame_q.push_back({pix[4*w+3], pix[4*w+2], pix[4*w+1], pix[4*w]});
    north_test_q.push_back(32'h1234_5678);
    while (dct_got.size() < saved0 + 16) @(posedge clk);
    begin
      int x [64];
      logic [31:0] ew [16];
      for (int i = 0; i < 64; i++) x[i] = int'(pix[i]) - 128;
      dct_words(x, ew);
      for (int i = 0; i < 16; i++) chk(dct_got[saved0 + i] == ew[i], "intra DCT word (bypass path)");
    end
    chk(me_mb_cnt == 2, "ME core idle during I-frame");
    chk(north_got.size() == 1 && north_got[0] == 32'h1234_5678, "loaded instruction routes south to north");
    chk(ip_overflow == 0, "no coreport overflow");

    $display("mechanisms: idle slots %0d, methods %0d, jumps %0d, loads %0d, bypass blocks %0d, RCC skips %0d, MSB planes saved %0d, clock factor %0d",
             idle_dct_slots, n_methods, 1, north_got.size(), 1, dct_vec_skipped, dct_planes_saved, clk_n_active[0]);
    chk(dct_vec_skipped > 0, "RCC skipped vectors");
    chk(dct_planes_saved > 0, "MSB rejection saved bit planes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
