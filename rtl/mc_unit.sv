// mc_unit: motion compensated difference for one macroblock.
//
// Given the motion vector (dx, dy) found by motion estimation, forms
// cur(y,x) - ref(y+RMAX+dy, x+RMAX+dx) for every pixel of the N x N block,
// saturates it to a signed 8-bit value and packs four results per 32-bit
// word, pixel 0 in bits [7:0]. Words leave in 8x8 block order (blocks in
// raster order, rows top to bottom, two words per row), which is the order
// the DCT core consumes. One pixel per cycle through asynchronous read ports;
// a word waits while out_full is high. 'done' pulses after the last word.
// The document gives this unit's function (a motion compensated difference
// frame for the DCT) but not its design; saturation, packing and order are
// this design's choices.
module mc_unit #(
  parameter int unsigned N    = 16,
  parameter int unsigned RMAX = 7,
  localparam int unsigned W   = N + 2 * RMAX,
  localparam int unsigned CAW = $clog2(N * N),
  localparam int unsigned RAW = $clog2(W * W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic signed [7:0] mv_dx,
  input  logic signed [7:0] mv_dy,
  output logic [CAW-1:0]    cur_addr,
  input  logic [7:0]        cur_pix,
  output logic [RAW-1:0]    ref_addr,
  input  logic [7:0]        ref_pix,
  input  logic              out_full,
  output logic              out_push,
  output logic [31:0]       out_data,
  output logic              busy,
  output logic              done
);

  localparam int unsigned NB = N / 8;   // 8x8 blocks per row of the macroblock
  localparam int unsigned NPIX = N * N;

  logic [$clog2(NPIX+1)-1:0] idx_q;     // pixel index in output order
  logic [1:0]                 q_q;
  logic [23:0]                part_q;
  logic                       pend_q;   // a full word waits for space
  logic                       run_q;
  logic signed [7:0]          dx_q, dy_q;

  // output order -> pixel coordinates
  int blk, py, px;
  assign blk = int'(idx_q) / 64;
  assign py  = (blk / int'(NB)) * 8 + (int'(idx_q) % 64) / 8;
  assign px  = (blk % int'(NB)) * 8 + int'(idx_q) % 8;
  assign cur_addr = CAW'(py * int'(N) + px);
  assign ref_addr = RAW'((py + int'(RMAX) + int'(dy_q)) * int'(W) + px + int'(RMAX) + int'(dx_q));

  logic signed [8:0] diff;
  logic [7:0]        sat;
  assign diff = $signed({1'b0, cur_pix}) - $signed({1'b0, ref_pix});
  assign sat  = (diff > 9'sd127) ? 8'h7f : (diff < -9'sd128) ? 8'h80 : diff[7:0];

  assign busy     = run_q;
  assign out_push = pend_q && !out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q    <= '0;
      q_q      <= '0;
      part_q   <= '0;
      pend_q   <= 1'b0;
      run_q    <= 1'b0;
      dx_q     <= '0;
      dy_q     <= '0;
      out_data <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q <= 1'b1;
          idx_q <= '0;
          q_q   <= '0;
          dx_q  <= mv_dx;
          dy_q  <= mv_dy;
        end
      end else if (pend_q) begin
        if (!out_full) begin
          pend_q <= 1'b0;
          if (int'(idx_q) == int'(NPIX)) begin
            run_q <= 1'b0;
            done  <= 1'b1;
          end
        end
      end else begin
        if (q_q == 2'd3) begin
          out_data <= {sat, part_q};
          pend_q   <= 1'b1;
        end else begin
          part_q[8*q_q +: 8] <= sat;
        end
        q_q   <= q_q + 1'b1;
        idx_q <= idx_q + 1'b1;
      end
    end
  end

endmodule
