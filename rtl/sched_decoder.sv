// sched_decoder: turns a communication instruction into crossbar settings.
//
// The instruction carries one 3-bit source field per crossbar destination
// (north, south, east, west, input coreports 1 and 2, local config line). The
// decoder expands each field into a one-hot select over the seven sources
// (none, N, S, E, W, output coreports 1 and 2), and flags which output
// coreports the instruction reads, so that each such coreport is popped once
// even when its word is multicast to several destinations. Purely
// combinational. The field layout is this design's own; the document gives
// only the decoder's role (instruction in, switch settings out).
module sched_decoder
  import asoc_pkg::*;
(
  input  instr_t                    instr,
  output logic [NUM_DEST-1:0][6:0]  sel,     // [dest][source] one-hot, bit 0 = none
  output logic [1:0]                op_read  // output coreport j is read this cycle
);

  always_comb begin
    sel     = '0;
    op_read = '0;
    for (int d = 0; d < int'(NUM_DEST); d++) begin
      logic [SEL_W-1:0] f;
      f = instr[d*SEL_W +: SEL_W];
      if (f <= 3'd6) sel[d][f] = 1'b1;
      else           sel[d][0] = 1'b1;  // code 7 is unused: no connection
      if (f == SRC_OP1) op_read[0] = 1'b1;
      if (f == SRC_OP2) op_read[1] = 1'b1;
    end
  end

endmodule
