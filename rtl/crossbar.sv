// crossbar: the tile's switch between neighbours, coreports and controller.
//
// Each destination takes the word of the source its one-hot select names
// (AND-OR multiplexer). The four neighbour outputs are registered: this
// register is one stage of the interconnect pipeline, so a word crosses one
// tile per interconnect cycle. The valid bit acts as the link driver's
// enable: an invalid transfer leaves the data bits of the link register
// unchanged, so unused stream instances cause no switching on the link. The
// input coreport and config destinations are combinational and are written
// by their consumers at the end of the cycle. Registering the neighbour
// outputs and the hold-on-invalid behaviour follow the document's
// communication pipeline and valid-bit driver enable; the rest is this
// design's choice.
module crossbar
  import asoc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_DEST-1:0][6:0] sel,
  input  flit_t                    in_n, in_s, in_e, in_w,
  input  flit_t                    op1, op2,       // heads of output coreports
  output flit_t                    out_n, out_s, out_e, out_w,
  output flit_t                    ip1, ip2,       // to input coreports
  output flit_t                    cfg,            // local config line
  output logic [3:0]               link_toggles    // link registers loaded this cycle
);

  flit_t src [7];
  flit_t dst [NUM_DEST];

  always_comb begin
    src[0] = FLIT_IDLE;
    src[1] = in_n;
    src[2] = in_s;
    src[3] = in_e;
    src[4] = in_w;
    src[5] = op1;
    src[6] = op2;
    for (int d = 0; d < int'(NUM_DEST); d++) begin
      dst[d] = FLIT_IDLE;
      for (int s = 1; s < 7; s++)
        if (sel[d][s]) dst[d] = '{valid: dst[d].valid | src[s].valid,
                                  data:  dst[d].data  | src[s].data};
      dst[d].data = dst[d].valid ? dst[d].data : '0;
    end
  end

  flit_t link_q [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 4; l++) link_q[l] <= FLIT_IDLE;
    end else begin
      for (int l = 0; l < 4; l++) begin
        link_q[l].valid <= dst[l].valid;
        if (dst[l].valid) link_q[l].data <= dst[l].data;  // driver enabled only when valid
      end
    end
  end

  always_comb
    for (int l = 0; l < 4; l++) link_toggles[l] = dst[l].valid;

  assign out_n = link_q[DST_N];
  assign out_s = link_q[DST_S];
  assign out_e = link_q[DST_E];
  assign out_w = link_q[DST_W];
  assign ip1   = dst[DST_IP1];
  assign ip2   = dst[DST_IP2];
  assign cfg   = dst[DST_CFG];

endmodule
