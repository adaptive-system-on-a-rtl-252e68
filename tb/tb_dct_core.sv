// tb_dct_core: blocks of several kinds (random differences, small values,
// blocks with zero rows, an all-zero block, intra pixels) under each setting
// of MSB rejection and RCC and several quantiser steps. Coefficients are
// compared with an integer model of the same arithmetic (row sums rounded by
// 2^6, column sums by 2^10, output divided by 2^q and saturated to a byte)
// and, where not saturated, with a floating-point orthonormal DCT to within
// 2 + 2^(q-1). The model counts the
// vectors RCC must skip and the bit planes MSB rejection must save; the
// core's counters must agree.
module tb_dct_core;
  logic clk = 0, rst_n = 0;
  logic in_empty, in_pop, cfg_empty, cfg_pop, out_full = 0, out_push, busy;
  logic [31:0] in_data, cfg_data, out_data, planes_done;
  logic [15:0] blk_cnt, vec_skipped, planes_saved;
  int checks = 0, failures = 0;

  dct_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] inq [$], cfgq [$];
  // stream heads are refreshed at the falling edge, popped at the rising edge
  always @(negedge clk) begin
    in_empty  = (inq.size() == 0);
    in_data   = in_empty ? '0 : inq[0];
    cfg_empty = (cfgq.size() == 0);
    cfg_data  = cfg_empty ? '0 : cfgq[0];
  end
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (cfg_pop) void'(cfgq.pop_front());
    out_full <= ($urandom_range(0, 4) == 0);
  end

  function automatic int c(int k, int n);
    real s, v;
    s = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    v = 256.0 * s * $cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int width_of(int v [8]);
    int w = 1;
    for (int n = 0; n < 8; n++)
      while (!(v[n] >= -(1 << (w - 1)) && v[n] < (1 << (w - 1)))) w++;
    return w;
  endfunction

  int x [64], y [64], z [64];
  int exp_skip, exp_saved;

  task automatic model(bit msbrej, bit rcc);
    exp_skip = 0; exp_saved = 0;
    for (int r = 0; r < 8; r++) begin
      int v [8];
      bit zero;
      zero = 1;
      for (int n = 0; n < 8; n++) begin v[n] = x[r*8 + n]; if (v[n] != 0) zero = 0; end
      if (rcc && zero) begin exp_skip++; exp_saved += 8; end
      else if (msbrej) exp_saved += 8 - width_of(v);
      for (int k = 0; k < 8; k++) begin
        int s;
        s = 0;
        for (int n = 0; n < 8; n++) s += c(k, n) * v[n];
        y[r*8 + k] = (s + 32) >>> 6;
      end
    end
    for (int col = 0; col < 8; col++) begin
      int v [8];
      bit zero;
      zero = 1;
      for (int n = 0; n < 8; n++) begin v[n] = y[n*8 + col]; if (v[n] != 0) zero = 0; end
      if (rcc && zero) begin exp_skip++; exp_saved += 12; end
      else if (msbrej) exp_saved += 12 - width_of(v);
      for (int u = 0; u < 8; u++) begin
        int s;
        s = 0;
        for (int n = 0; n < 8; n++) s += c(u, n) * v[n];
        z[u*8 + col] = (s + 512) >>> 10;
      end
    end
  endtask

  function automatic real dct_ref(int u, int v);
    real s = 0.0;
    real cu, cv;
    cu = (u == 0) ? $sqrt(0.125) : 0.5;
    cv = (v == 0) ? $sqrt(0.125) : 0.5;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        s += x[i*8 + j] * $cos(real'((2*i + 1) * u) * 3.14159265358979 / 16.0)
                        * $cos(real'((2*j + 1) * v) * 3.14159265358979 / 16.0);
    return cu * cv * s;
  endfunction

  // kind: 0 random, 1 small, 2 zero rows, 3 all zero
  function automatic int quant(int z, int q);
    int t;
    t = (q == 0) ? z : (z + (1 << (q - 1))) >>> q;
    return t > 127 ? 127 : t < -128 ? -128 : t;
  endfunction

  task automatic run_block(int kind, bit intra, bit msbrej, bit rcc, int q);
    logic [7:0] b [64];
    int k0, s0, p0, got;
    for (int i = 0; i < 64; i++) begin
      case (kind)
        0: b[i] = 8'($urandom);
        1: b[i] = 8'($urandom_range(0, 6) - 3);
        2: b[i] = ((i / 8) % 3 == 0) ? 8'($urandom_range(0, 30) - 15) : 8'd0;
        default: b[i] = intra ? 8'd128 : 8'd0;
      endcase
      x[i] = intra ? int'(b[i]) - 128 : int'($signed(b[i]));
    end
    model(msbrej, rcc);
    k0 = blk_cnt; s0 = vec_skipped; p0 = planes_saved;
    cfgq.push_back({26'd0, 3'(q), rcc, msbrej, intra});
    for (int w = 0; w < 16; w++) inq.push_back({b[4*w+3], b[4*w+2], b[4*w+1], b[4*w]});
    for (int w = 0; w < 16; w++) begin
      do @(posedge clk); while (!out_push);
      for (int h = 0; h < 4; h++) begin
        int idx, e;
        real f, tol;
        idx = 4*w + h;
        got = int'($signed(out_data[8*h +: 8]));
        e = quant(z[idx], q);
        f = dct_ref(idx / 8, idx % 8) / real'(1 << q);
        tol = (2.0 + ((q == 0) ? 0.0 : real'(1 << (q - 1)))) / real'(1 << q);
        checks++;
        if (got != e) begin
          failures++;
          $display("FAIL kind %0d q %0d coef %0d got %0d exp %0d", kind, q, idx, got, e);
        end
        if (e > -128 && e < 127) begin
          checks++;
          if (real'(got) - f > tol + 0.5 || f - real'(got) > tol + 0.5) begin
            failures++;
            $display("FAIL kind %0d coef %0d got %0d float %f", kind, idx, got, f);
          end
        end
      end
    end
    @(negedge clk);
    checks += 3;
    if (blk_cnt != 16'(k0 + 1)) begin failures++; $display("FAIL blk_cnt"); end
    if (int'(vec_skipped) - s0 != exp_skip) begin failures++; $display("FAIL skipped %0d exp %0d", int'(vec_skipped) - s0, exp_skip); end
    if (int'(planes_saved) - p0 != exp_saved) begin failures++; $display("FAIL saved %0d exp %0d", int'(planes_saved) - p0, exp_saved); end
  endtask

  int tot_skip = 0;

  initial begin
    #22 rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      bit msbrej, rcc;
      msbrej = m[0]; rcc = m[1];
      run_block(0, 0, msbrej, rcc, 3);
      run_block(1, 0, msbrej, rcc, 0);
      run_block(2, 0, msbrej, rcc, 1);
      run_block(3, 0, msbrej, rcc, 3);
      run_block(0, 1, msbrej, rcc, 4);
      run_block(3, 1, msbrej, rcc, 2);
      run_block(0, 0, msbrej, rcc, 0);
    end
    checks++;
    if (vec_skipped == 0 || planes_saved == 0) begin failures++; $display("FAIL mechanisms never used"); end
    $display("skipped vectors %0d, saved planes %0d, processed planes %0d", vec_skipped, planes_saved, planes_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
