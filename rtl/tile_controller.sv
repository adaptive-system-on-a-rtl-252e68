// tile_controller: the PC and the local configuration controller of a tile.
//
// The PC walks the current schedule, instructions base .. base+len-1, one per
// interconnect cycle, and loops back to base. Words arriving on the local
// config line with their valid bit set are commands:
//   JUMP  : new base and length, taken at the end of the current pass through
//           the schedule so that the streams of neighbouring tiles, which
//           switch at the same boundary, stay aligned;
//   LOAD  : writes one instruction into the instruction memory at once;
//   CLOCK : sets the core clock factor (multiply/divide flag and 3-bit n).
// The PC counting and looping, jump and load follow the document; when a
// jump takes effect, the command encodings and the reset values are this
// design's choices. Reset: base 0, length RESET_LEN (10, the schedule length
// of the document's example), clock factor 2^0.
module tile_controller
  import asoc_pkg::*;
#(
  parameter int unsigned AW        = IMEM_AW,
  parameter int unsigned RESET_LEN = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         cfg,         // local config line
  output logic [AW-1:0] pc,
  output logic          wrap,        // last instruction of the schedule this cycle
  output logic          imem_we,
  output logic [AW-1:0] imem_waddr,
  output instr_t        imem_wdata,
  output logic          clk_mul,
  output logic [2:0]    clk_n,
  output logic          jumped       // pulse: a pending jump took effect
);

  logic [AW-1:0] base_q, len_m1_q, ofs_q;
  logic          jmp_pend_q;
  logic [AW-1:0] jmp_base_q, jmp_len_m1_q;

  cmd_e cmd;
  assign cmd = cmd_e'(cfg.data[31:28]);

  assign pc   = base_q + ofs_q;
  assign wrap = (ofs_q == len_m1_q);

  assign imem_we    = cfg.valid && (cmd == CMD_LOAD);
  assign imem_waddr = cfg.data[27:23];
  assign imem_wdata = cfg.data[INSTR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q       <= '0;
      len_m1_q     <= AW'(RESET_LEN - 1);
      ofs_q        <= '0;
      jmp_pend_q   <= 1'b0;
      jmp_base_q   <= '0;
      jmp_len_m1_q <= '0;
      clk_mul      <= 1'b0;
      clk_n        <= '0;
      jumped       <= 1'b0;
    end else begin
      jumped <= 1'b0;
      if (wrap) begin
        ofs_q <= '0;
        if (jmp_pend_q) begin
          base_q     <= jmp_base_q;
          len_m1_q   <= jmp_len_m1_q;
          jmp_pend_q <= 1'b0;
          jumped     <= 1'b1;
        end
      end else begin
        ofs_q <= ofs_q + 1'b1;
      end
      if (cfg.valid) begin
        case (cmd)
          CMD_JUMP: begin
            jmp_pend_q   <= 1'b1;
            jmp_base_q   <= cfg.data[20:16];
            jmp_len_m1_q <= cfg.data[4:0];
          end
          CMD_CLOCK: begin
            clk_mul <= cfg.data[3];
            clk_n   <= cfg.data[2:0];
          end
          default: ;
        endcase
      end
    end
  end

endmodule
