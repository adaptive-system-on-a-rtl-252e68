// tb_dct_rac: for each output index K (one RAC per K), random 8-input vectors
// of random width are fed bit plane by bit plane, most significant first,
// starting at the vector's own width. The accumulator must equal the dot
// product with C[K][n] = round(256 * s_K * cos((2n+1) K pi / 16)), computed
// here with real arithmetic.
module tb_dct_rac;
  logic clk = 0, rst_n = 0;
  logic first = 0, step = 0;
  logic [7:0] addr [8];
  logic signed [23:0] acc [8];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 8; k++) begin : g
    dct_rac #(.K(k)) dut (.clk, .rst_n, .first, .step, .addr(addr[k]), .acc(acc[k]));
  end

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int c(int k, int n);
    real s, v;
    s = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    v = 256.0 * s * $cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    #22 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int x [8];
      int bits;
      bits = $urandom_range(1, 12);
      for (int n = 0; n < 8; n++) begin
        x[n] = $urandom_range(0, (1 << bits) - 1);
        if (x[n] >= (1 << (bits - 1))) x[n] -= (1 << bits);
      end
      if (t == 0) foreach (x[n]) x[n] = -2048;
      if (t == 0) bits = 12;
      for (int b = bits - 1; b >= 0; b--) begin
        @(negedge clk);
        first = (b == bits - 1);
        step  = (b != bits - 1);
        for (int k = 0; k < 8; k++)
          for (int n = 0; n < 8; n++) addr[k][n] = 1'((x[n] >>> b) & 1);
      end
      @(negedge clk);
      first = 0; step = 0;
      for (int k = 0; k < 8; k++) begin
        int e;
        e = 0;
        for (int n = 0; n < 8; n++) e += c(k, n) * x[n];
        checks++;
        if (int'(acc[k]) != e) begin
          failures++;
          $display("FAIL k=%0d got %0d exp %0d", k, acc[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
