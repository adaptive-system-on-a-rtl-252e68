// mec_core: the motion estimation and compensation core.
//
// The core spans two tiles. From the first tile's input coreport 1 it takes
// the current macroblock (N*N/4 words, raster order, four pixels per word,
// pixel 0 in bits [7:0]); from the second tile's input coreport 1 the search
// window of the saved frame (W*W/4 words, W = N + 2*RMAX, raster order). The
// two loads proceed independently. When both are complete, me_engine searches
// with the method, range and threshold from the latest ME configuration word
// (first tile, input coreport 2: [1:0] method, [7:4] range, [31:16] spiral
// threshold). The motion vector word {dx[31:24], dy[23:16], SAD[15:0]} goes
// to the first tile's output coreport. If motion compensation is enabled
// (second tile, input coreport 2, bit 0; enabled after reset) mc_unit then
// sends the N*N/4 difference words to the second tile's output coreport.
// Then the next macroblock is loaded. Configuration words are accepted at
// any time. The document names the core, its methods and its streams
// (Table 1: frame in, saved frame, MV, MC frame, config); buffer layout,
// word formats and sequencing are this design's choices.
// Lint notes: the 16-bit clamp of the SAD in the MV word only acts for
// blocks larger than 16x16 (a 16x16 SAD is at most 65,280), and the
// configuration word bits not listed above are reserved and ignored.
module mec_core
  import asoc_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned RMAX = 7,
  localparam int unsigned W   = N + 2 * RMAX,
  localparam int unsigned CAW = $clog2(N * N),
  localparam int unsigned RAW = $clog2(W * W)
) (
  input  logic        clk,
  input  logic        rst_n,
  // current macroblock stream
  input  logic        cur_empty,
  input  logic [31:0] cur_data,
  output logic        cur_pop,
  // search window stream
  input  logic        ref_empty,
  input  logic [31:0] ref_data,
  output logic        ref_pop,
  // ME configuration
  input  logic        mecfg_empty,
  input  logic [31:0] mecfg_data,
  output logic        mecfg_pop,
  // MC configuration
  input  logic        mccfg_empty,
  input  logic [31:0] mccfg_data,
  output logic        mccfg_pop,
  // motion vector out
  input  logic        mv_full,
  output logic        mv_push,
  output logic [31:0] mv_data,
  // difference block out
  input  logic        diff_full,
  output logic        diff_push,
  output logic [31:0] diff_data,
  // status
  output logic        busy,
  output logic [15:0] cand_cnt,
  output logic [15:0] mb_cnt
);

  localparam int unsigned CUR_WORDS = N * N / 4;
  localparam int unsigned REF_WORDS = W * W / 4;

  logic [7:0] cur_mem [N * N];
  logic [7:0] ref_mem [W * W];

  typedef enum logic [2:0] {S_LOAD, S_SEARCH, S_WAIT_ME, S_MV, S_MC} state_e;
  state_e state_q;

  logic [$clog2(CUR_WORDS+1)-1:0] cur_cnt_q;
  logic [$clog2(REF_WORDS+1)-1:0] ref_cnt_q;
  logic [31:0] mecfg_q;
  logic        mc_en_q;

  // configuration: always accepted
  assign mecfg_pop = !mecfg_empty;
  assign mccfg_pop = !mccfg_empty;

  assign cur_pop = !cur_empty && (state_q == S_LOAD) && (int'(cur_cnt_q) < int'(CUR_WORDS));
  assign ref_pop = !ref_empty && (state_q == S_LOAD) && (int'(ref_cnt_q) < int'(REF_WORDS));

  always_ff @(posedge clk) begin
    if (cur_pop)
      for (int q = 0; q < 4; q++) cur_mem[4 * int'(cur_cnt_q) + q] <= cur_data[8*q +: 8];
    if (ref_pop)
      for (int q = 0; q < 4; q++) ref_mem[4 * int'(ref_cnt_q) + q] <= ref_data[8*q +: 8];
  end

  // engine and compensation unit share the buffer read ports
  logic [CAW-1:0] me_caddr, mc_caddr;
  logic [RAW-1:0] me_raddr, mc_raddr;
  logic [7:0]     cur_pix_me, ref_pix_me, cur_pix_mc, ref_pix_mc;
  assign cur_pix_me = cur_mem[me_caddr];
  assign ref_pix_me = ref_mem[me_raddr];
  assign cur_pix_mc = cur_mem[mc_caddr];
  assign ref_pix_mc = ref_mem[mc_raddr];

  logic              me_start, me_busy, me_done;
  logic signed [7:0] mv_dx, mv_dy;
  logic [$clog2(N * N * 255 + 1)-1:0] best_sad;
  logic              mc_start, mc_busy, mc_done;

  me_engine #(.N(N), .RMAX(RMAX)) u_me (
    .clk, .rst_n, .start(me_start),
    .method(me_method_e'(mecfg_q[1:0])), .range(mecfg_q[7:4]), .thresh(mecfg_q[31:16]),
    .cur_addr(me_caddr), .cur_pix(cur_pix_me), .ref_addr(me_raddr), .ref_pix(ref_pix_me),
    .busy(me_busy), .done(me_done), .mv_dx, .mv_dy, .best_sad, .cand_cnt
  );

  mc_unit #(.N(N), .RMAX(RMAX)) u_mc (
    .clk, .rst_n, .start(mc_start), .mv_dx, .mv_dy,
    .cur_addr(mc_caddr), .cur_pix(cur_pix_mc), .ref_addr(mc_raddr), .ref_pix(ref_pix_mc),
    .out_full(diff_full), .out_push(diff_push), .out_data(diff_data),
    .busy(mc_busy), .done(mc_done)
  );

  assign me_start = (state_q == S_SEARCH);
  assign mc_start = (state_q == S_MV) && !mv_full && mc_en_q;
  assign mv_push  = (state_q == S_MV) && !mv_full;
  assign mv_data  = {mv_dx, mv_dy, 16'(best_sad > 16'hffff ? 16'hffff : best_sad)};
  assign busy     = (state_q != S_LOAD) || me_busy || mc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_LOAD;
      cur_cnt_q <= '0;
      ref_cnt_q <= '0;
      mecfg_q   <= {16'd0, 8'd0, 4'(RMAX > 15 ? 15 : RMAX), 2'b00, ME_FULL};
      mc_en_q   <= 1'b1;
      mb_cnt    <= '0;
    end else begin
      if (mecfg_pop) mecfg_q <= mecfg_data;
      if (mccfg_pop) mc_en_q <= mccfg_data[0];
      if (cur_pop) cur_cnt_q <= cur_cnt_q + 1'b1;
      if (ref_pop) ref_cnt_q <= ref_cnt_q + 1'b1;
      case (state_q)
        S_LOAD:
          if (int'(cur_cnt_q) == int'(CUR_WORDS) && int'(ref_cnt_q) == int'(REF_WORDS))
            state_q <= S_SEARCH;
        S_SEARCH:  state_q <= S_WAIT_ME;
        S_WAIT_ME: if (me_done) state_q <= S_MV;
        S_MV: if (!mv_full) begin
          mb_cnt <= mb_cnt + 1'b1;
          if (mc_en_q) state_q <= S_MC;
          else begin
            state_q   <= S_LOAD;
            cur_cnt_q <= '0;
            ref_cnt_q <= '0;
          end
        end
        S_MC: if (mc_done) begin
          state_q   <= S_LOAD;
          cur_cnt_q <= '0;
          ref_cnt_q <= '0;
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

endmodule
