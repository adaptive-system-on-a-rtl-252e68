// dct_core: 8x8 two-dimensional DCT built from eight replicated RACs.
//
// Block flow: load 16 words (64 samples, raster order, four per word, sample
// 0 in bits [7:0]); row pass; column pass; send 16 words of coefficients.
// Each pass treats its eight vectors (rows, then columns of the row result)
// one after the other. The eight dct_rac units compute the eight outputs of a
// vector in parallel, one input bit plane per cycle. Two activity-saving
// mechanisms, each switchable by the configuration word:
//   MSB rejection: before a vector is processed, the smallest two's-complement
//     width that holds all eight inputs is found, and only that many bit
//     planes are fed to the RACs (8 for rows and 12 for columns otherwise);
//   row/column classification (RCC): a vector whose inputs are all zero is
//     not processed at all and its outputs are written as zero.
// Both give exactly the result of the full computation.
// Arithmetic: row results Y = round(sum/64) (12-bit, 2 fraction bits), final
// Z = round(sum/1024), so Z is the orthonormal 2-D DCT-II of the input,
// rounded to an integer. Z is kept to 16 bits internally. For output each
// coefficient is divided by 2^q with rounding and saturated to a signed byte
// (a uniform quantiser of step 2^q), and four are packed per word, so that a
// block leaves in 16 words, as it arrived: output word i holds Q[u][v+j] in
// bits [8j+7:8j], u = i/2, v = 4*(i%2).
// Configuration word (cfg stream, taken between blocks and used from the
// next block): [0] intra (input bytes are pixels, level-shifted by -128; else
// signed differences), [1] MSB rejection on, [2] RCC on. After reset: inter,
// both on.
// The RAC structure, MSB rejection and RCC are named by the document; how
// they are realised, the number formats and the word formats are this
// design's choices. Four coefficients per word follows the document's
// packing of transformed data; the quantiser step that makes them fit in a
// byte is this design's choice.
// Lint notes: configuration bits [31:6] are reserved and ignored; the upper
// bits of the rounding temporary are discarded by design (results fit 16 bits).
module dct_core #(
  parameter int unsigned ACC_W = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_empty,
  input  logic [31:0] in_data,
  output logic        in_pop,
  input  logic        cfg_empty,
  input  logic [31:0] cfg_data,
  output logic        cfg_pop,
  input  logic        out_full,
  output logic        out_push,
  output logic [31:0] out_data,
  output logic        busy,
  output logic [15:0] blk_cnt,
  output logic [15:0] vec_skipped,    // vectors skipped by RCC
  output logic [15:0] planes_saved,   // bit planes skipped by MSB rejection
  output logic [31:0] planes_done     // bit planes processed
);

  typedef enum logic [2:0] {S_LOAD, S_SETUP, S_BITS, S_STORE, S_OUT} state_e;
  state_e state_q;

  logic signed [11:0] x_mem [64];   // input samples x[r][n]
  logic signed [11:0] y_mem [64];   // row results Y[r][k]
  logic signed [15:0] z_mem [64];   // coefficients Z[u][v]

  logic        intra_q, msbrej_q, rcc_q;
  logic [2:0]  q_q;                 // output quantiser step 2^q
  logic        pass_q;              // 0: rows, 1: columns
  logic [2:0]  vec_q;
  logic [3:0]  bit_q;
  logic [4:0]  wcnt_q;              // word counter for load / output

  // configuration is taken only between blocks, ahead of the block's data
  assign cfg_pop = !cfg_empty && (state_q == S_LOAD) && (wcnt_q == 0);
  assign in_pop  = !in_empty && (state_q == S_LOAD) && !(wcnt_q == 0 && !cfg_empty);
  assign busy    = (state_q != S_LOAD) || (wcnt_q != 0);

  // current vector
  logic signed [11:0] v [8];
  always_comb
    for (int n = 0; n < 8; n++)
      v[n] = pass_q ? y_mem[n * 8 + int'(vec_q)] : x_mem[int'(vec_q) * 8 + n];

  // width needed for MSB rejection, all-zero test for RCC
  logic [11:0] diffbits;
  logic [3:0]  width;
  logic        all_zero;
  always_comb begin
    diffbits = '0;
    all_zero = 1'b1;
    for (int n = 0; n < 8; n++) begin
      diffbits |= v[n] ^ {12{v[n][11]}};
      if (v[n] != 0) all_zero = 1'b0;
    end
    width = 4'd1;
    for (int b = 0; b < 11; b++) if (diffbits[b]) width = 4'(b + 2);
  end

  logic [3:0] full_w;
  assign full_w = pass_q ? 4'd12 : 4'd8;

  // RAC array
  logic [7:0]              plane;
  logic                    rac_first, rac_step;
  logic signed [ACC_W-1:0] acc [8];
  always_comb
    for (int n = 0; n < 8; n++) plane[n] = v[n][bit_q];
  assign rac_first = (state_q == S_BITS) && (bit_q == (msbrej_q ? width : full_w) - 4'd1);
  assign rac_step  = (state_q == S_BITS) && !rac_first;

  for (genvar k = 0; k < 8; k++) begin : g_rac
    dct_rac #(.K(k), .ACC_W(ACC_W)) u_rac (
      .clk, .rst_n, .first(rac_first), .step(rac_step), .addr(plane), .acc(acc[k])
    );
  end

  function automatic logic signed [15:0] round_shift(logic signed [ACC_W-1:0] a, int sh);
    logic signed [ACC_W-1:0] t;
    t = (a + (ACC_W'(1) <<< (sh - 1))) >>> sh;
    return 16'(t);
  endfunction

  // output word: four quantised coefficients
  function automatic logic [7:0] quant(logic signed [15:0] z, logic [2:0] q);
    logic signed [16:0] t;
    t = (q == 0) ? 17'(z) : (17'(z) + (17'sd1 <<< (q - 1))) >>> q;
    if (t > 17'sd127)  return 8'h7f;
    if (t < -17'sd128) return 8'h80;
    return t[7:0];
  endfunction

  always_comb
    for (int j = 0; j < 4; j++)
      out_data[8*j +: 8] = quant(z_mem[{wcnt_q[3:0], 2'b00} + 6'(j)], q_q);
  assign out_push = (state_q == S_OUT) && !out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_LOAD;
      intra_q      <= 1'b0;
      msbrej_q     <= 1'b1;
      rcc_q        <= 1'b1;
      q_q          <= 3'd3;
      pass_q       <= 1'b0;
      vec_q        <= '0;
      bit_q        <= '0;
      wcnt_q       <= '0;
      blk_cnt      <= '0;
      vec_skipped  <= '0;
      planes_saved <= '0;
      planes_done  <= '0;
      for (int i = 0; i < 64; i++) begin
        x_mem[i] <= '0;
        y_mem[i] <= '0;
        z_mem[i] <= '0;
      end
    end else begin
      if (cfg_pop) begin
        intra_q  <= cfg_data[0];
        msbrej_q <= cfg_data[1];
        rcc_q    <= cfg_data[2];
        q_q      <= cfg_data[5:3];
      end
      case (state_q)
        S_LOAD: if (in_pop) begin
          for (int q = 0; q < 4; q++)
            x_mem[4 * int'(wcnt_q) + q] <= intra_q ? 12'($signed({1'b0, in_data[8*q +: 8]}) - 9'sd128)
                                                    : 12'($signed(in_data[8*q +: 8]));
          if (wcnt_q == 5'd15) begin
            wcnt_q  <= '0;
            pass_q  <= 1'b0;
            vec_q   <= '0;
            state_q <= S_SETUP;
          end else begin
            wcnt_q <= wcnt_q + 1'b1;
          end
        end

        S_SETUP: begin
          if (rcc_q && all_zero) begin
            vec_skipped  <= vec_skipped + 1'b1;
            planes_saved <= planes_saved + 16'(full_w);
            for (int k = 0; k < 8; k++)
              if (pass_q) z_mem[k * 8 + int'(vec_q)] <= '0;
              else        y_mem[int'(vec_q) * 8 + k] <= '0;
            if (vec_q == 3'd7) begin
              vec_q <= '0;
              if (pass_q) state_q <= S_OUT;
              else        pass_q  <= 1'b1;
            end else begin
              vec_q <= vec_q + 1'b1;
            end
          end else begin
            bit_q   <= msbrej_q ? width - 4'd1 : full_w - 4'd1;
            if (msbrej_q) planes_saved <= planes_saved + 16'(full_w - width);
            state_q <= S_BITS;
          end
        end

        S_BITS: begin
          planes_done <= planes_done + 1'b1;
          if (bit_q == 0) state_q <= S_STORE;
          else            bit_q   <= bit_q - 1'b1;
        end

        S_STORE: begin
          for (int k = 0; k < 8; k++)
            if (pass_q) z_mem[k * 8 + int'(vec_q)] <= round_shift(acc[k], 10);
            else        y_mem[int'(vec_q) * 8 + k] <= 12'(round_shift(acc[k], 6));
          if (vec_q == 3'd7) begin
            vec_q <= '0;
            if (pass_q) state_q <= S_OUT;
            else        pass_q  <= 1'b1;
          end else begin
            vec_q <= vec_q + 1'b1;
          end
          state_q <= (vec_q == 3'd7 && pass_q) ? S_OUT : S_SETUP;
        end

        S_OUT: if (!out_full) begin
          if (wcnt_q == 5'd15) begin
            wcnt_q  <= '0;
            blk_cnt <= blk_cnt + 1'b1;
            state_q <= S_LOAD;
          end else begin
            wcnt_q <= wcnt_q + 1'b1;
          end
        end

        default: state_q <= S_LOAD;
      endcase
    end
  end

endmodule
