// instr_mem: the tile's communication instruction memory.
//
// Holds DEPTH communication instructions. The controller's PC addresses it
// every interconnect cycle and the addressed instruction is available in the
// same cycle (asynchronous read), so an instruction takes effect in the cycle
// its PC value is current. A load command arriving on the local config line
// writes one entry through the write port; the new value is readable from the
// next cycle. On reset the memory takes the contents given by INIT, which is
// how a tile starts with its schedule in place (the start-up contents are this
// design's choice; the document only says the memory holds the schedule and
// that load commands replace it).
module instr_mem
  import asoc_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_DEPTH,
  parameter int unsigned AW    = IMEM_AW,
  parameter sched_t      INIT  = '{default: '0}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rd_addr,
  output instr_t        rd_instr,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  instr_t        wr_instr
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= INIT[i];
    end else if (wr_en && (32'(wr_addr) < DEPTH)) begin
      mem[wr_addr] <= wr_instr;
    end
  end

  assign rd_instr = (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;

endmodule
