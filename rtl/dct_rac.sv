// dct_rac: one ROM-accumulator (RAC) of the distributed-arithmetic DCT.
//
// Computes y_K = sum_n C[K][n] * x_n for the 8 inputs of one row or column,
// bit-serially. Each cycle the core presents one bit plane of the eight
// two's-complement inputs as an 8-bit ROM address (bit n = input n); the ROM
// holds, for every address, the sum of the coefficients whose inputs have a 1
// there. The planes come most significant first: the first plane (the sign
// plane of the chosen width) loads acc = -ROM[a], each later plane does
// acc = 2*acc + ROM[a]. After B planes acc is the exact dot product of the
// B-bit inputs, so processing fewer planes for narrow inputs (MSB rejection)
// gives the same result in fewer cycles.
// Coefficients: C[k][n] = round(256 * s_k * cos((2n+1)*k*pi/16)), s_0 =
// sqrt(1/8), s_k = 1/2 otherwise, i.e. the orthonormal DCT-II scaled by 256.
// They are formed from cos(m*pi/16) scaled by 128 for m = 0..8 (128, 126,
// 118, 106, 91, 71, 49, 25, 0) with the cosine's symmetries; C[0][n] = 91.
// The RAC structure is the one the document names for its DCT; ROM width,
// coefficient scale and MSB-first order are this design's choices.
module dct_rac #(
  parameter int unsigned K     = 0,
  parameter int unsigned ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    first,   // sign plane: acc = -ROM[addr]
  input  logic                    step,    // later plane: acc = 2*acc + ROM[addr]
  input  logic [7:0]              addr,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned ROM_W = 13;
  typedef logic signed [ROM_W-1:0] rom_t [256];

  function automatic int coef(int k, int n);
    int cos128 [9] = '{128, 126, 118, 106, 91, 71, 49, 25, 0};
    int m;
    bit neg;
    if (k == 0) return 91;
    m   = (k * (2 * n + 1)) % 32;
    neg = 1'b0;
    if (m > 16) m = 32 - m;           // cos(2pi - a) = cos(a)
    if (m > 8) begin m = 16 - m; neg = 1'b1; end  // cos(pi - a) = -cos(a)
    return neg ? -cos128[m] : cos128[m];
  endfunction

  function automatic rom_t build_rom(int k);
    rom_t r;
    for (int a = 0; a < 256; a++) begin
      int s;
      s = 0;
      for (int n = 0; n < 8; n++) if (a[n]) s += coef(k, n);
      r[a] = ROM_W'(s);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom(int'(K));

  logic signed [ROM_W-1:0] rom_q;
  assign rom_q = ROM[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (first) acc <= -ACC_W'(rom_q);
    else if (step)  acc <= (acc <<< 1) + ACC_W'(rom_q);
  end

endmodule
