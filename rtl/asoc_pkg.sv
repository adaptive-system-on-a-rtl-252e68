// asoc_pkg: types and constants shared by the tile communication interface,
// the cores and the three-tile system.
//
// A word travelling on the statically scheduled interconnect is a 32-bit
// payload (four 8-bit pixels) plus a valid bit. The valid bit marks whether a
// scheduled transfer carries data; an invalid transfer does not switch the
// link register (see crossbar).
//
// A communication instruction holds, for each crossbar destination, a 3-bit
// source select. Destinations are the four neighbour outputs, two input
// coreports and the local configuration line; sources are the four neighbour
// inputs and up to two output coreports. One source may feed several
// destinations in the same cycle ("North to South & East").
//
// Configuration words on the local config line carry an opcode in bits
// [31:28]: JUMP (move the schedule pointer), LOAD (write one instruction) and
// CLOCK (set the core clock factor 2^n). The encodings are this design's own.
package asoc_pkg;

  localparam int unsigned WORD_W     = 32;  // four 8-bit pixels per word
  localparam int unsigned NUM_DEST   = 7;
  localparam int unsigned SEL_W      = 3;
  localparam int unsigned INSTR_W    = NUM_DEST * SEL_W;  // 21 bits
  localparam int unsigned IMEM_DEPTH = 32;
  localparam int unsigned IMEM_AW    = 5;

  typedef struct packed {
    logic              valid;
    logic [WORD_W-1:0] data;
  } flit_t;

  localparam flit_t FLIT_IDLE = '{valid: 1'b0, data: '0};

  // Crossbar sources
  typedef enum logic [SEL_W-1:0] {
    SRC_NONE = 3'd0,
    SRC_N    = 3'd1,
    SRC_S    = 3'd2,
    SRC_E    = 3'd3,
    SRC_W    = 3'd4,
    SRC_OP1  = 3'd5,
    SRC_OP2  = 3'd6
  } src_e;

  // Crossbar destinations, also the field index inside an instruction
  typedef enum int unsigned {
    DST_N   = 0,
    DST_S   = 1,
    DST_E   = 2,
    DST_W   = 3,
    DST_IP1 = 4,
    DST_IP2 = 5,
    DST_CFG = 6
  } dst_e;

  typedef logic [INSTR_W-1:0] instr_t;

  // Build an instruction from per-destination sources
  function automatic instr_t mk_instr(src_e n, src_e s, src_e e, src_e w,
                                      src_e ip1, src_e ip2, src_e cfg);
    return {cfg, ip2, ip1, w, e, s, n};
  endfunction

  function automatic src_e instr_src(instr_t i, int unsigned dst);
    return src_e'(i[dst*SEL_W +: SEL_W]);
  endfunction

  // Local configuration line commands
  typedef enum logic [3:0] {
    CMD_NOP   = 4'h0,
    CMD_JUMP  = 4'h1,  // [20:16] new base, [4:0] new length-1
    CMD_LOAD  = 4'h2,  // [27:23] address, [20:0] instruction
    CMD_CLOCK = 4'h3   // [3] 1: multiply, 0: divide; [2:0] n
  } cmd_e;

  function automatic logic [WORD_W-1:0] cmd_jump(logic [IMEM_AW-1:0] base,
                                                 logic [IMEM_AW-1:0] len_m1);
    return {CMD_JUMP, 7'd0, base, 11'd0, len_m1};
  endfunction

  function automatic logic [WORD_W-1:0] cmd_load(logic [IMEM_AW-1:0] addr,
                                                 instr_t ins);
    return {CMD_LOAD, addr, 2'b00, ins};
  endfunction

  function automatic logic [WORD_W-1:0] cmd_clock(logic mul, logic [2:0] n);
    return {CMD_CLOCK, 24'd0, mul, n};
  endfunction

  // Motion estimation search methods
  typedef enum logic [1:0] {
    ME_FULL   = 2'd0,
    ME_SPIRAL = 2'd1,
    ME_TSS    = 2'd2
  } me_method_e;

  // ME core configuration word: [1:0] method, [7:4] range, [31:16] spiral
  // early-termination threshold. MC configuration word: [0] MC enable.
  // DCT configuration word: [0] intra (level shift by 128), [1] MSB rejection
  // enable, [2] row/column classification enable.

  // ---------------------------------------------------------------------
  // Schedules of the three-tile system. Instructions 0..9: P-frame schedule;
  // 10..19: I-frame schedule in which the input frame bypasses the ME/MC tiles.
  // ---------------------------------------------------------------------
  typedef instr_t sched_t [IMEM_DEPTH];

  localparam src_e X = SRC_NONE;

  function automatic sched_t sched_me();
    sched_t s;
    foreach (s[i]) s[i] = '0;
    s[0]  = mk_instr(X, X, X,       X, SRC_W, X,     X);     // frame in -> ip1
    s[1]  = mk_instr(X, X, SRC_OP1, X, X,     SRC_S, X);     // MV -> east, config -> ip2
    s[2]  = mk_instr(X, X, X,       X, X,     X,     SRC_S); // config -> interface
    s[10] = mk_instr(X, X, SRC_W,   X, X,     X,     X);     // frame in rerouted east
    s[11] = mk_instr(X, X, X,       X, X,     SRC_S, X);
    s[12] = mk_instr(X, X, X,       X, X,     X,     SRC_S);
    return s;
  endfunction

  function automatic sched_t sched_mc();
    sched_t s;
    foreach (s[i]) s[i] = '0;
    s[0]  = mk_instr(X, X, X,       X, SRC_S, X,     X);     // saved frame -> ip1
    s[1]  = mk_instr(X, X, SRC_OP1, X, X,     SRC_S, X);     // MC frame -> east, config -> ip2
    s[2]  = mk_instr(X, X, SRC_W,   X, X,     X,     SRC_S); // MV passes, config -> interface
    s[10] = mk_instr(X, X, X,       X, SRC_S, X,     X);
    s[11] = mk_instr(X, X, SRC_W,   X, X,     SRC_S, X);     // frame in passes east
    s[12] = mk_instr(X, X, X,       X, X,     X,     SRC_S);
    return s;
  endfunction

  function automatic sched_t sched_dct();
    sched_t s;
    foreach (s[i]) s[i] = '0;
    s[0]  = mk_instr(X, X, SRC_OP1, X, X,     X,     X);     // DCT frame -> east
    s[1]  = mk_instr(X, X, X,       X, X,     SRC_S, X);     // config -> ip2
    s[2]  = mk_instr(X, X, X,       X, SRC_W, X,     SRC_S); // MC frame -> ip1, config -> interface
    s[3]  = mk_instr(X, X, SRC_W,   X, X,     X,     X);     // MV -> east
    s[10] = mk_instr(X, X, SRC_OP1, X, X,     X,     X);
    s[11] = mk_instr(X, X, X,       X, X,     SRC_S, X);
    s[12] = mk_instr(X, X, X,       X, SRC_W, X,     SRC_S); // frame in -> ip1
    return s;
  endfunction

endpackage
