// async_switch: input port of the three-port router. It receives a flit
// over a 2-phase bundled-data link, holds it in a one-flit latch and steers
// it to one of the router's two other output ports.
//
// Structure as in the router's switch diagram: a 2-to-4 phase converter on
// the link handshake (lr/la), a 4-phase linear controller that loads the
// data latch, and a demultiplexer that routes the controller's request to
// rr1 or rr2 according to the most-significant route bit of the stored flit
// (0 -> rr1, 1 -> rr2; this polarity is this design's choice). The acknowledge
// of the chosen output is routed back to the controller. The outgoing flit
// carries its route rotated left by one bit, which places the next
// steering bit in the MSB.
//
// Timing in this clocked model: a link event is seen by the converter on the
// next edge, the latch loads one cycle later, and rr1/rr2 rises the cycle
// after that. rr1/rr2 and rd are stable until the output acknowledges.
module async_switch
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // 2-phase link input
  input  logic  lr,
  output logic  la,
  input  flit_t ld,
  // 4-phase outputs to the two merge modules
  output logic  rr1,
  input  logic  ra1,
  output logic  rr2,
  input  logic  ra2,
  output flit_t rd
);

  logic  req4, ack4;
  logic  rr_c, ra_c, le;
  flit_t dl;
  logic  sel;

  phase_conv_2to4 u_conv (
    .clk, .rst_n, .lr, .la, .r4(req4), .a4(ack4)
  );

  linear_ctrl u_ctrl (
    .clk, .rst_n, .lr(req4), .la(ack4), .rr(rr_c), .ra(ra_c), .le
  );

  // Data latch (D_L): loaded while the controller's enable is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dl <= '0;
    else if (le) dl <= ld;
  end

  assign sel  = dl.route[ROUTE_W-1];
  assign rr1  = rr_c && !sel;
  assign rr2  = rr_c && sel;
  assign ra_c = sel ? ra2 : ra1;
  assign rd   = '{route: swizzle(dl.route), data: dl.data};

endmodule
