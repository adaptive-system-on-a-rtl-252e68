// asoc_top: the three-tile video system: ME, MC and DCT tiles in a row.
//
// Three aSoC tiles are joined west to east by registered links. The motion
// estimation and compensation core spans the first two tiles (ME and MC
// tiles) and runs on the ME tile's generated core clock; the DCT core sits on
// the third tile with its own generated clock. Each tile starts with the
// P-frame schedule at instructions 0..9 and the I-frame schedule at 10..19
// (asoc_pkg), and runs the P-frame schedule after reset:
//   cycle 0: frame in (west of ME tile) -> ME core; saved frame (south of MC
//            tile) -> core; DCT output coreport -> east
//   cycle 1: MV -> east from ME tile; MC difference -> east from MC tile;
//            core configuration from the south of each tile
//   cycle 2: MV passes the MC tile; MC difference -> DCT core; interface
//            configuration from the south of each tile
//   cycle 3: MV passes the DCT tile to the east edge.
// A JUMP command to base 10 sent to all three tiles switches them together to
// the I-frame schedule, in which the input frame bypasses ME and MC and goes
// straight to the DCT. The edge links of all tiles are ports, as the system
// stands for part of a larger mesh; the control tile that would produce the
// configuration streams is outside and drives the south inputs.
// Status outputs expose PCs, activity counters and core clock factors.
// The DCT tile's coreports are DCT_CP_DEPTH (32) words deep: a 16x16
// macroblock's difference arrives as four 8x8 blocks at one word per
// schedule pass, and this DCT core, at the interconnect clock, can need more
// than a pass per word (up to 224 core cycles per 16-word block
// against 160 interconnect cycles), so it falls behind by some words per
// macroblock and catches up between macroblocks. The other coreports are
// CP_DEPTH (4) words deep.
module asoc_top
  import asoc_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter int unsigned RMAX     = 7,
  parameter int unsigned CP_DEPTH = 4,
  parameter int unsigned DCT_CP_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       west_in,
  output flit_t       west_out,
  input  flit_t       east_in,
  output flit_t       east_out,
  input  flit_t       north_in  [3],
  output flit_t       north_out [3],
  input  flit_t       south_in  [3],
  output flit_t       south_out [3],
  // status
  output logic [IMEM_AW-1:0] pc [3],
  output logic [2:0]         jumped,
  output logic [2:0]         clk_n_active [3],
  output logic [3:0]         link_toggles [3],
  output logic [5:0]         ip_overflow,
  output logic [15:0]        me_cand_cnt,
  output logic [15:0]        me_mb_cnt,
  output logic [15:0]        dct_blk_cnt,
  output logic [15:0]        dct_vec_skipped,
  output logic [15:0]        dct_planes_saved,
  output logic [31:0]        dct_planes_done,
  output logic               me_busy,
  output logic               dct_busy
);

  flit_t e0, w1, e1, w2;     // internal links
  logic  clk_me, clk_dct;
  logic  unused_clk_mc;

  logic [1:0][31:0] ip_rdata [3];
  logic [1:0]       ip_empty [3];
  logic [1:0]       ip_pop   [3];
  logic [0:0][31:0] op_wdata [3];
  logic [0:0]       op_push  [3];
  logic [0:0]       op_full  [3];

  comm_interface #(.INIT(sched_me()), .CP_DEPTH(CP_DEPTH)) u_tile_me (
    .clk, .rst_n,
    .in_n(north_in[0]), .in_s(south_in[0]), .in_e(w1), .in_w(west_in),
    .out_n(north_out[0]), .out_s(south_out[0]), .out_e(e0), .out_w(west_out),
    .core_clk_out(clk_me), .core_clk(clk_me),
    .ip_pop(ip_pop[0]), .ip_rdata(ip_rdata[0]), .ip_empty(ip_empty[0]),
    .op_push(op_push[0]), .op_wdata(op_wdata[0]), .op_full(op_full[0]),
    .pc(pc[0]), .jumped(jumped[0]), .ip_overflow(ip_overflow[1:0]),
    .link_toggles(link_toggles[0]), .clk_n_active(clk_n_active[0])
  );

  comm_interface #(.INIT(sched_mc()), .CP_DEPTH(CP_DEPTH)) u_tile_mc (
    .clk, .rst_n,
    .in_n(north_in[1]), .in_s(south_in[1]), .in_e(w2), .in_w(e0),
    .out_n(north_out[1]), .out_s(south_out[1]), .out_e(e1), .out_w(w1),
    .core_clk_out(unused_clk_mc), .core_clk(clk_me),
    .ip_pop(ip_pop[1]), .ip_rdata(ip_rdata[1]), .ip_empty(ip_empty[1]),
    .op_push(op_push[1]), .op_wdata(op_wdata[1]), .op_full(op_full[1]),
    .pc(pc[1]), .jumped(jumped[1]), .ip_overflow(ip_overflow[3:2]),
    .link_toggles(link_toggles[1]), .clk_n_active(clk_n_active[1])
  );

  comm_interface #(.INIT(sched_dct()), .CP_DEPTH(DCT_CP_DEPTH)) u_tile_dct (
    .clk, .rst_n,
    .in_n(north_in[2]), .in_s(south_in[2]), .in_e(east_in), .in_w(e1),
    .out_n(north_out[2]), .out_s(south_out[2]), .out_e(east_out), .out_w(w2),
    .core_clk_out(clk_dct), .core_clk(clk_dct),
    .ip_pop(ip_pop[2]), .ip_rdata(ip_rdata[2]), .ip_empty(ip_empty[2]),
    .op_push(op_push[2]), .op_wdata(op_wdata[2]), .op_full(op_full[2]),
    .pc(pc[2]), .jumped(jumped[2]), .ip_overflow(ip_overflow[5:4]),
    .link_toggles(link_toggles[2]), .clk_n_active(clk_n_active[2])
  );

  mec_core #(.N(N), .RMAX(RMAX)) u_mec (
    .clk(clk_me), .rst_n,
    .cur_empty(ip_empty[0][0]),   .cur_data(ip_rdata[0][0]),   .cur_pop(ip_pop[0][0]),
    .ref_empty(ip_empty[1][0]),   .ref_data(ip_rdata[1][0]),   .ref_pop(ip_pop[1][0]),
    .mecfg_empty(ip_empty[0][1]), .mecfg_data(ip_rdata[0][1]), .mecfg_pop(ip_pop[0][1]),
    .mccfg_empty(ip_empty[1][1]), .mccfg_data(ip_rdata[1][1]), .mccfg_pop(ip_pop[1][1]),
    .mv_full(op_full[0][0]),   .mv_push(op_push[0][0]),   .mv_data(op_wdata[0][0]),
    .diff_full(op_full[1][0]), .diff_push(op_push[1][0]), .diff_data(op_wdata[1][0]),
    .busy(me_busy), .cand_cnt(me_cand_cnt), .mb_cnt(me_mb_cnt)
  );

  dct_core u_dct (
    .clk(clk_dct), .rst_n,
    .in_empty(ip_empty[2][0]),  .in_data(ip_rdata[2][0]),  .in_pop(ip_pop[2][0]),
    .cfg_empty(ip_empty[2][1]), .cfg_data(ip_rdata[2][1]), .cfg_pop(ip_pop[2][1]),
    .out_full(op_full[2][0]), .out_push(op_push[2][0]), .out_data(op_wdata[2][0]),
    .busy(dct_busy), .blk_cnt(dct_blk_cnt), .vec_skipped(dct_vec_skipped),
    .planes_saved(dct_planes_saved), .planes_done(dct_planes_done)
  );

endmodule
