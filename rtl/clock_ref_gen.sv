// clock_ref_gen: the tile's configurable core clock reference.
//
// Produces the core clock from the interconnect clock divided by 2^n, where n
// is the 3-bit value the controller receives through a CLOCK command. n = 0
// passes the interconnect clock through; for n >= 1 a counter toggles the
// output every 2^(n-1) interconnect cycles. A new n is taken only when the
// counter restarts with the output low, so a change never produces a short
// pulse. The document's generator can also multiply the interconnect clock by
// 2^n; that needs a PLL or DLL and is not modelled: with 'mul' set the output
// stays at the interconnect clock (factor 1). A switch between n = 0 and
// n >= 1 is made at a rising interconnect edge with the divided output low,
// so the core clock sees that edge and then a shortened high phase; a
// glitch-free clock multiplexer cell would replace the multiplexer in silicon.
// Interface: 'clk_core' is the core clock; 'n_active' the factor in use.
module clock_ref_gen (
  input  logic       clk,       // interconnect clock
  input  logic       rst_n,
  input  logic       mul,
  input  logic [2:0] n,
  output logic       clk_core,
  output logic [2:0] n_active
);

  logic [6:0] cnt_q;
  logic       div_q;
  logic [2:0] n_req;

  assign n_req = mul ? 3'd0 : n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      div_q    <= 1'b0;
      n_active <= '0;
    end else if (n_active == 3'd0) begin
      div_q    <= 1'b0;
      cnt_q    <= '0;
      n_active <= n_req;
    end else if (cnt_q == 7'((1 << (n_active - 1)) - 1)) begin
      cnt_q <= '0;
      if (div_q) begin
        div_q    <= 1'b0;
        n_active <= n_req;  // restart point: output goes low
      end else begin
        div_q <= 1'b1;
      end
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign clk_core = (n_active == 3'd0) ? clk : div_q;

endmodule
