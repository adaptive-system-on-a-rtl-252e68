// comm_interface: the communication interface of one aSoC tile.
//
// Every interconnect cycle the PC selects an instruction from the instruction
// memory, the decoder turns it into crossbar selects and the crossbar moves
// words between the four neighbour links, the tile's coreports and the local
// config line. Neighbour outputs are registered, so a stream advances one tile
// per cycle. Words routed to the local config line are commands for the
// controller (jump, load, clock factor); the clock reference generator
// derives the core clock from the interconnect clock by the factor they set.
// Coreports are dual-clock FIFOs between the interconnect clock 'clk' and the
// core-side clock 'core_clk' (normally this tile's own 'core_clk_out', or a
// neighbour's when one core spans two tiles).
//
// Interface: neighbour links in_*/out_* (flit_t, valid + 32-bit word); input
// coreport read side ip_* (NIP of them); output coreport write side op_*
// (NOP of them); status outputs. Structure after the document's tile
// interface (instruction memory, PC, decoder, controller, crossbar,
// coreports, clock generator); word formats and sizes are this design's.
// Lint notes: with one output coreport (NOP = 1) the read flag of a second
// one is unused, and the controller's end-of-pass flag is not needed here.
module comm_interface
  import asoc_pkg::*;
#(
  parameter sched_t      INIT      = '{default: '0},
  parameter int unsigned RESET_LEN = 10,
  parameter int unsigned NIP       = 2,
  parameter int unsigned NOP       = 1,
  parameter int unsigned CP_DEPTH  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flit_t                 in_n, in_s, in_e, in_w,
  output flit_t                 out_n, out_s, out_e, out_w,
  output logic                  core_clk_out,
  input  logic                  core_clk,
  input  logic [NIP-1:0]        ip_pop,
  output logic [NIP-1:0][31:0]  ip_rdata,
  output logic [NIP-1:0]        ip_empty,
  input  logic [NOP-1:0]        op_push,
  input  logic [NOP-1:0][31:0]  op_wdata,
  output logic [NOP-1:0]        op_full,
  output logic [IMEM_AW-1:0]    pc,
  output logic                  jumped,
  output logic [NIP-1:0]        ip_overflow,
  output logic [3:0]            link_toggles,
  output logic [2:0]            clk_n_active
);

  instr_t                   instr;
  logic [NUM_DEST-1:0][6:0] sel;
  logic [1:0]               op_read;
  flit_t                    xb_ip [2];
  flit_t                    xb_cfg;
  flit_t                    op_head [2];
  logic                     imem_we;
  logic [IMEM_AW-1:0]       imem_waddr;
  instr_t                   imem_wdata;
  logic                     clk_mul;
  logic [2:0]               clk_n;
  logic                     wrap;

  tile_controller #(.RESET_LEN(RESET_LEN)) u_ctrl (
    .clk, .rst_n, .cfg(xb_cfg), .pc, .wrap,
    .imem_we, .imem_waddr, .imem_wdata, .clk_mul, .clk_n, .jumped
  );

  instr_mem #(.INIT(INIT)) u_imem (
    .clk, .rst_n, .rd_addr(pc), .rd_instr(instr),
    .wr_en(imem_we), .wr_addr(imem_waddr), .wr_instr(imem_wdata)
  );

  sched_decoder u_dec (.instr, .sel, .op_read);

  crossbar u_xbar (
    .clk, .rst_n, .sel,
    .in_n, .in_s, .in_e, .in_w,
    .op1(op_head[0]), .op2(op_head[1]),
    .out_n, .out_s, .out_e, .out_w,
    .ip1(xb_ip[0]), .ip2(xb_ip[1]), .cfg(xb_cfg),
    .link_toggles
  );

  clock_ref_gen u_clk (
    .clk, .rst_n, .mul(clk_mul), .n(clk_n),
    .clk_core(core_clk_out), .n_active(clk_n_active)
  );

  // input coreports: interconnect writes, core reads
  for (genvar i = 0; i < 2; i++) begin : g_ip
    if (i < int'(NIP)) begin : g_on
      logic unused_full;
      coreport #(.W(32), .DEPTH(CP_DEPTH)) u_ip (
        .wclk(clk), .wrst_n(rst_n), .push(xb_ip[i].valid), .wdata(xb_ip[i].data),
        .full(unused_full), .overflow(ip_overflow[i]),
        .rclk(core_clk), .rrst_n(rst_n), .pop(ip_pop[i]),
        .rdata(ip_rdata[i]), .empty(ip_empty[i])
      );
    end
  end

  // output coreports: core writes, interconnect reads when scheduled
  for (genvar j = 0; j < 2; j++) begin : g_op
    if (j < int'(NOP)) begin : g_on
      logic        empty;
      logic [31:0] rdata;
      logic        unused_ovf;
      coreport #(.W(32), .DEPTH(CP_DEPTH)) u_op (
        .wclk(core_clk), .wrst_n(rst_n), .push(op_push[j]), .wdata(op_wdata[j]),
        .full(op_full[j]), .overflow(unused_ovf),
        .rclk(clk), .rrst_n(rst_n), .pop(op_read[j]),
        .rdata, .empty
      );
      assign op_head[j] = '{valid: !empty, data: empty ? '0 : rdata};
    end else begin : g_off
      assign op_head[j] = FLIT_IDLE;
    end
  end

endmodule
