// pl_link: a router-to-router or router-to-core link carrying N_PL pipeline
// latches in series (2-phase bundled data throughout). N_PL = 0 is a plain
// wire connection. With the latches spread evenly along the wire, each
// handshake loop spans 1/(N_PL+1) of the link length.
//
// Latch counts per link are set by the network: 3 on the longest
// congested core links, 2 on the busiest internal links, 0 elsewhere. The
// default here is 3, the count of the long core links.
// Latency: N_PL clock cycles forward in this clocked model.
module pl_link
  import noc_pkg::*;
#(
  parameter int unsigned N_PL = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lr,
  output logic  la,
  input  flit_t ld,
  output logic  rr,
  input  logic  ra,
  output flit_t rd
);

  // Segment k runs from latch k-1 (or the link input) to latch k.
  logic  req [N_PL+1];
  logic  ack [N_PL+1];
  flit_t dat [N_PL+1];

  assign req[0] = lr;
  assign dat[0] = ld;
  assign la     = ack[0];

  for (genvar k = 0; k < N_PL; k++) begin : g_pl
    pipeline_latch u_pl (
      .clk, .rst_n,
      .lr(req[k]), .la(ack[k]), .ld(dat[k]),
      .rr(req[k+1]), .ra(ack[k+1]), .rd(dat[k+1])
    );
  end

  assign rr       = req[N_PL];
  assign rd       = dat[N_PL];
  assign ack[N_PL] = ra;

endmodule
