// me_engine: block-matching motion estimation with selectable search method.
//
// Finds the displacement (dx, dy), |dx|,|dy| <= range, that minimises the sum
// of absolute differences (SAD) between the N x N current block and the
// displaced block of the search window. The window is W = N + 2*RMAX pixels
// square with the current block's position at offset (RMAX, RMAX). Pixels are
// read one per cycle through two asynchronous read ports (cur_addr/ref_addr),
// so one candidate costs N*N cycles plus one cycle of candidate selection.
// Three methods trade work for quality:
//   FULL   : every candidate, raster order (dy outer, dx inner);
//   SPIRAL : candidates ring by ring outward from (0,0), each ring walked
//            clockwise from its top-left corner; stops at the first
//            candidate whose SAD <= thresh, or after the last ring;
//   TSS    : three step search: centre, then the 8 neighbours at step s
//            (s = largest power of two <= range), re-centre on the best,
//            halve s, until s = 0. Neighbours outside the range are skipped.
// A candidate replaces the best only with a strictly smaller SAD. The three
// methods and the selectable range are the document's; candidate orders,
// the spiral termination rule and the tie rule are this design's choices.
// Timing: 'start' (one cycle, with method/range/thresh) -> 'done' one cycle,
// with mv_dx/mv_dy/best_sad/cand_cnt valid until the next start.
module me_engine
  import asoc_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned RMAX = 7,
  localparam int unsigned W     = N + 2 * RMAX,
  localparam int unsigned CAW   = $clog2(N * N),
  localparam int unsigned RAW   = $clog2(W * W),
  localparam int unsigned SAD_W = $clog2(N * N * 255 + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  me_method_e          method,
  input  logic [3:0]          range,
  input  logic [15:0]         thresh,
  output logic [CAW-1:0]      cur_addr,
  input  logic [7:0]          cur_pix,
  output logic [RAW-1:0]      ref_addr,
  input  logic [7:0]          ref_pix,
  output logic                busy,
  output logic                done,
  output logic signed [7:0]   mv_dx,
  output logic signed [7:0]   mv_dy,
  output logic [SAD_W-1:0]    best_sad,
  output logic [15:0]         cand_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_NEXT, S_SAD} state_e;
  state_e state_q;

  me_method_e      meth_q;
  logic signed [6:0] r_q;
  logic [SAD_W-1:0] thr_q;
  logic            first_q;
  logic signed [6:0] cdx_q, cdy_q;      // candidate under evaluation
  logic [CAW-1:0]  pix_q;
  logic [SAD_W-1:0] acc_q;
  logic            have_best_q;
  // spiral
  logic [3:0]      ring_q;
  logic [7:0]      pos_q;
  // three step search
  logic [3:0]      step_q;
  logic [3:0]      nb_q;
  logic signed [6:0] tcx_q, tcy_q;

  // pixel addressing
  logic [CAW-1:0] row, col;
  assign row = CAW'(pix_q / N);
  assign col = CAW'(pix_q % N);
  assign cur_addr = pix_q;
  always_comb begin
    int ry, rx;
    ry = int'(row) + int'(RMAX) + int'(cdy_q);
    rx = int'(col) + int'(RMAX) + int'(cdx_q);
    ref_addr = RAW'(ry * int'(W) + rx);
  end

  logic [7:0]       absdiff;
  logic [SAD_W-1:0] sad_fin;
  assign absdiff = (cur_pix > ref_pix) ? cur_pix - ref_pix : ref_pix - cur_pix;
  assign sad_fin = acc_q + SAD_W'(absdiff);

  function automatic logic [3:0] first_step(logic signed [6:0] r);
    logic [3:0] s;
    s = 0;
    for (int b = 3; b >= 0; b--)
      if (s == 0 && int'(r) >= (1 << b)) s = 4'(1 << b);
    return s;
  endfunction

  // position p on the square ring of radius d
  function automatic void ring_pos(input logic [3:0] d, input logic [7:0] p,
                                   output logic signed [6:0] x,
                                   output logic signed [6:0] y);
    int di, pi;
    di = int'(d);
    pi = int'(p);
    if (pi < 2 * di)      begin x = 7'(-di + pi);            y = 7'(-di); end
    else if (pi < 4 * di) begin x = 7'(di);                  y = 7'(-di + pi - 2 * di); end
    else if (pi < 6 * di) begin x = 7'(di - (pi - 4 * di));  y = 7'(di); end
    else                  begin x = 7'(-di);                 y = 7'(di - (pi - 6 * di)); end
  endfunction

  // next spiral candidate
  logic [3:0]        sp_d;
  logic [7:0]        sp_p;
  logic signed [6:0] sp_x, sp_y;
  always_comb begin
    if (first_q) begin
      sp_d = '0; sp_p = '0;
    end else if (ring_q == 0 || int'(pos_q) == 8 * int'(ring_q) - 1) begin
      sp_d = ring_q + 1'b1; sp_p = '0;
    end else begin
      sp_d = ring_q; sp_p = pos_q + 1'b1;
    end
    ring_pos(sp_d, sp_p, sp_x, sp_y);
    if (sp_d == 0) begin sp_x = '0; sp_y = '0; end
  end

  // next three-step-search neighbour (index nb_q of the 8 around the centre)
  logic signed [6:0] tss_x, tss_y;
  logic              tss_ok;
  always_comb begin
    int k, x, y;
    k = (nb_q >= 4) ? int'(nb_q) + 1 : int'(nb_q);  // skip the centre of the 3x3
    x = int'(tcx_q) + (k % 3 - 1) * int'(step_q);
    y = int'(tcy_q) + (k / 3 - 1) * int'(step_q);
    tss_x  = 7'(x);
    tss_y  = 7'(y);
    tss_ok = (x >= -int'(r_q)) && (x <= int'(r_q)) && (y >= -int'(r_q)) && (y <= int'(r_q));
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      meth_q      <= ME_FULL;
      r_q         <= '0;
      thr_q       <= '0;
      first_q     <= 1'b0;
      cdx_q       <= '0;
      cdy_q       <= '0;
      pix_q       <= '0;
      acc_q       <= '0;
      have_best_q <= 1'b0;
      ring_q      <= '0;
      pos_q       <= '0;
      step_q      <= '0;
      nb_q        <= '0;
      tcx_q       <= '0;
      tcy_q       <= '0;
      mv_dx       <= '0;
      mv_dy       <= '0;
      best_sad    <= '0;
      cand_cnt    <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          meth_q      <= (method == ME_SPIRAL || method == ME_TSS) ? method : ME_FULL;
          r_q         <= (int'(range) > int'(RMAX)) ? 7'(RMAX) : 7'(range);
          thr_q       <= SAD_W'(thresh);
          first_q     <= 1'b1;
          have_best_q <= 1'b0;
          cand_cnt    <= '0;
          state_q     <= S_NEXT;
        end

        S_NEXT: begin
          first_q <= 1'b0;
          pix_q   <= '0;
          acc_q   <= '0;
          case (meth_q)
            ME_SPIRAL: begin
              ring_q <= sp_d;
              pos_q  <= sp_p;
              if (int'(sp_d) > int'(r_q)) begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end else begin
                cdx_q   <= sp_x;
                cdy_q   <= sp_y;
                state_q <= S_SAD;
              end
            end

            ME_TSS: begin
              if (first_q) begin
                tcx_q   <= '0;
                tcy_q   <= '0;
                step_q  <= first_step(r_q);
                nb_q    <= '0;
                cdx_q   <= '0;
                cdy_q   <= '0;
                state_q <= S_SAD;
              end else if (step_q == 0) begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end else if (nb_q == 4'd8) begin
                // re-centre on the best so far, halve the step
                tcx_q  <= 7'(mv_dx);
                tcy_q  <= 7'(mv_dy);
                step_q <= step_q >> 1;
                nb_q   <= '0;
              end else begin
                nb_q <= nb_q + 1'b1;
                if (tss_ok) begin
                  cdx_q   <= tss_x;
                  cdy_q   <= tss_y;
                  state_q <= S_SAD;
                end
              end
            end

            default: begin  // full search
              if (first_q) begin
                cdx_q   <= -r_q;
                cdy_q   <= -r_q;
                state_q <= S_SAD;
              end else if (cdx_q < r_q) begin
                cdx_q   <= cdx_q + 1'b1;
                state_q <= S_SAD;
              end else if (cdy_q < r_q) begin
                cdx_q   <= -r_q;
                cdy_q   <= cdy_q + 1'b1;
                state_q <= S_SAD;
              end else begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end
            end
          endcase
        end

        S_SAD: begin
          if (int'(pix_q) == int'(N * N) - 1) begin
            cand_cnt <= cand_cnt + 1'b1;
            if (!have_best_q || sad_fin < best_sad) begin
              have_best_q <= 1'b1;
              best_sad    <= sad_fin;
              mv_dx       <= 8'(cdx_q);
              mv_dy       <= 8'(cdy_q);
            end
            if (meth_q == ME_SPIRAL && sad_fin <= thr_q) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              state_q <= S_NEXT;
            end
          end else begin
            acc_q <= sad_fin;
            pix_q <= pix_q + 1'b1;
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
