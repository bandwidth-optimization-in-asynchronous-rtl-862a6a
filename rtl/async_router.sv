// async_router: the three-port "T" router of the asynchronous NoC, built
// from three switch modules (one per input port) and three merge modules
// (one per output port).
//
// Every port has a 2-phase bundled-data input channel (lr/la/ld) and
// output channel (rr/ra/rd). A flit entering on port i leaves on port
// (i+1)%3 when its route MSB is 0 and on port (i+2)%3 when it is 1; a flit
// never returns on the port it came in by. Inside the router the switches
// and merges talk 4-phase. Each switch and each merge holds one flit, so a
// router stores up to six flits.
//
// The composition (three switches, three merges, 2-phase links, 4-phase
// inside, MSB steering with route rotation) follows the router
// description; the bit-to-port polarity is this design's choice.
//
// Minimum latency through an idle router in this clocked model: 5 cycles
// from a link request transition on an input to the transition on the
// output link.
module async_router
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  lr,
  output logic [2:0]  la,
  input  flit_t [2:0] ld,
  output logic [2:0]  rr,
  input  logic [2:0]  ra,
  output flit_t [2:0] rd,
  output logic [2:0]  contended
);

  // Switch i: out1 goes to port (i+1)%3, out2 to port (i+2)%3.
  logic  [2:0] sw_r1, sw_a1, sw_r2, sw_a2;
  flit_t [2:0] sw_d;

  for (genvar i = 0; i < 3; i++) begin : g_port
    localparam int unsigned NXT = (i + 1) % 3;  // reached by bit 0
    localparam int unsigned PRV = (i + 2) % 3;  // reached by bit 1

    async_switch u_sw (
      .clk, .rst_n,
      .lr(lr[i]), .la(la[i]), .ld(ld[i]),
      .rr1(sw_r1[i]), .ra1(sw_a1[i]),
      .rr2(sw_r2[i]), .ra2(sw_a2[i]),
      .rd(sw_d[i])
    );

    // Merge i takes switch PRV's out1 (PRV+1 = i) and switch NXT's out2
    // (NXT+2 = i).
    async_merge u_mg (
      .clk, .rst_n,
      .lr1(sw_r1[PRV]), .la1(sw_a1[PRV]), .ld1(sw_d[PRV]),
      .lr2(sw_r2[NXT]), .la2(sw_a2[NXT]), .ld2(sw_d[NXT]),
      .rr(rr[i]), .ra(ra[i]), .rd(rd[i]),
      .contended(contended[i])
    );
  end

endmodule
