// tb_me_engine: full, spiral and three-step search on random windows with a
// planted match, at several ranges. A behavioural model in this testbench
// computes SADs directly and walks each method's candidate order; the
// engine's vector, SAD and candidate count must match it. The full search
// cycle count must be candidates * (N*N + 1) + 2, and the full search must
// find the planted vector.
module tb_me_engine;
  import asoc_pkg::*;
  localparam int N = 16, RMAX = 7, W = N + 2 * RMAX;

  logic clk = 0, rst_n = 0, start = 0;
  me_method_e method;
  logic [3:0] range;
  logic [15:0] thresh;
  logic [7:0] cur_addr;
  logic [9:0] ref_addr;
  logic [7:0] cur_pix, ref_pix;
  logic busy, done;
  logic signed [7:0] mv_dx, mv_dy;
  logic [15:0] best_sad, cand_cnt;
  int checks = 0, failures = 0;

  logic [7:0] cur [N*N];
  logic [7:0] refw [W*W];
  assign cur_pix = cur[cur_addr];
  assign ref_pix = refw[ref_addr];

  me_engine #(.N(N), .RMAX(RMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad(int dx, int dy);
    int s = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int a, b;
        a = cur[i*N + j];
        b = refw[(i + RMAX + dy) * W + j + RMAX + dx];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // model state
  int m_dx, m_dy, m_sad, m_cnt;
  bit m_have;

  function automatic bit eval(int dx, int dy);
    int s;
    s = sad(dx, dy);
    m_cnt++;
    if (!m_have || s < m_sad) begin m_have = 1; m_sad = s; m_dx = dx; m_dy = dy; end
    return s;
  endfunction

  task automatic model(me_method_e m, int r, int thr);
    m_have = 0; m_cnt = 0;
    if (m == ME_FULL) begin
      for (int y = -r; y <= r; y++) for (int x = -r; x <= r; x++) void'(eval(x, y));
    end else if (m == ME_SPIRAL) begin
      bit stop = 0;
      for (int d = 0; d <= r && !stop; d++) begin
        int npos = (d == 0) ? 1 : 8 * d;
        for (int p = 0; p < npos && !stop; p++) begin
          int x, y, s;
          if (d == 0) begin x = 0; y = 0; end
          else if (p < 2*d) begin x = -d + p; y = -d; end
          else if (p < 4*d) begin x = d; y = -d + (p - 2*d); end
          else if (p < 6*d) begin x = d - (p - 4*d); y = d; end
          else begin x = -d; y = d - (p - 6*d); end
          s = sad(x, y);
          void'(eval(x, y));
          if (s <= thr) stop = 1;
        end
      end
    end else begin
      int s = 0, cx = 0, cy = 0;
      for (int b = 3; b >= 0; b--) if (s == 0 && r >= (1 << b)) s = 1 << b;
      void'(eval(0, 0));
      while (s > 0) begin
        for (int oy = -1; oy <= 1; oy++)
          for (int ox = -1; ox <= 1; ox++)
            if (!(ox == 0 && oy == 0)) begin
              int x = cx + ox * s, y = cy + oy * s;
              if (x >= -r && x <= r && y >= -r && y <= r) void'(eval(x, y));
            end
        cx = m_dx; cy = m_dy;
        s = s / 2;
      end
    end
  endtask

  task automatic fill(int tx, int ty, int noise);
    for (int i = 0; i < W*W; i++) refw[i] = 8'($urandom_range(0, 255));
    // smooth the window a little so that the SAD surface has a slope
    for (int k = 0; k < 2; k++)
      for (int i = 1; i < W*W - 1; i++) refw[i] = 8'((int'(refw[i-1]) + int'(refw[i]) + int'(refw[i+1])) / 3);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int v = int'(refw[(i + RMAX + ty) * W + j + RMAX + tx]) + $urandom_range(0, noise);
        cur[i*N + j] = 8'(v > 255 ? 255 : v);
      end
  endtask

  task automatic run(me_method_e m, int r, int thr, int tx, int ty, int noise);
    int cyc = 0;
    fill(tx, ty, noise);
    model(m, r, thr);
    @(negedge clk);
    method = m; range = 4'(r); thresh = 16'(thr); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 4;
    if (mv_dx != 8'(m_dx) || mv_dy != 8'(m_dy)) begin
      failures++; $display("FAIL m%0d r%0d mv (%0d,%0d) exp (%0d,%0d)", m, r, mv_dx, mv_dy, m_dx, m_dy);
    end
    if (int'(best_sad) != m_sad) begin failures++; $display("FAIL m%0d sad %0d exp %0d", m, best_sad, m_sad); end
    if (int'(cand_cnt) != m_cnt) begin failures++; $display("FAIL m%0d cands %0d exp %0d", m, cand_cnt, m_cnt); end
    if (m == ME_FULL) begin
      if (cyc != m_cnt * (N*N + 1) + 2) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, m_cnt * (N*N+1) + 2); end
      checks++;
      if (noise == 0 && (m_dx != tx || m_dy != ty)) begin failures++; $display("FAIL planted vector not found"); end
    end else if (busy) failures++;
    $display("method %0d range %0d: mv (%0d,%0d) sad %0d candidates %0d cycles %0d",
             m, r, mv_dx, mv_dy, best_sad, cand_cnt, cyc);
  endtask

  initial begin
    method = ME_FULL; range = 0; thresh = 0;
    #22 rst_n = 1;
    run(ME_FULL,   7, 0,    3, -5, 0);
    run(ME_FULL,   7, 0,   -7,  7, 3);
    run(ME_FULL,   2, 0,    1,  2, 0);
    run(ME_SPIRAL, 7, 200,  2, -1, 2);
    run(ME_SPIRAL, 7, 0,   -4,  3, 0);
    run(ME_SPIRAL, 3, 0,    5,  5, 2);
    run(ME_TSS,    7, 0,    4, -2, 1);
    run(ME_TSS,    7, 0,   -6,  5, 0);
    run(ME_TSS,    3, 0,    1,  1, 0);
    run(ME_TSS,    0, 0,    0,  0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
