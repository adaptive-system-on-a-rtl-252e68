// coreport: a word buffer between a core's clock domain and the interconnect.
//
// A small dual-clock FIFO. The writer side pushes a word when not full; the
// reader side sees the head word whenever the FIFO is not empty and pops it.
// Read and write pointers are Gray coded and each crosses to the other clock
// domain through two flip-flops, so the two clocks may have any relation. An
// input coreport is written by the crossbar (interconnect clock) and read by
// the core; an output coreport is written by the core and read by the
// crossbar. A push into a full FIFO is dropped and recorded in the sticky
// 'overflow' flag: on a statically scheduled network there is no way to stall
// the sender. Depth DEPTH (power of two, default 4) is this design's choice;
// the document describes the coreports only as using a simple protocol to
// cross between the core and interconnect clock domains.
module coreport #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic         overflow,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0]  wgray_r1, wgray_r2;  // write pointer in read domain
  logic [AW:0]  rgray_w1, rgray_w2;  // read pointer in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_nx;
  assign full    = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin_q + 1'b1;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (push && !full) begin
        wbin_q  <= wbin_nx;
        wgray_q <= bin2gray(wbin_nx);
      end
      if (push && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge wclk)
    if (push && !full) mem[wbin_q[AW-1:0]] <= wdata;

  // read domain
  logic [AW:0] rbin_nx;
  assign empty   = (rgray_q == wgray_r2);
  assign rbin_nx = rbin_q + 1'b1;
  assign rdata   = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (pop && !empty) begin
        rbin_q  <= rbin_nx;
        rgray_q <= bin2gray(rbin_nx);
      end
    end
  end

endmodule
