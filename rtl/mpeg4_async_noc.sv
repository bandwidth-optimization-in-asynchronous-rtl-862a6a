// mpeg4_async_noc: the bandwidth-optimised asynchronous NoC for the MPEG4
// decoder SoC. Ten three-port routers form a tree joining twelve IP cores;
// every link is a 2-phase bundled-data channel, and the busiest long links
// carry pipeline latches that shorten each handshake loop and so raise that
// link's bandwidth.
//
// Connectivity and latch placement come from mpeg4_topo_pkg. Each of the
// 42 unidirectional links is one pl_link: 30 leave a router port
// (PL_OUT[r][p] latches) and 12 leave a core (PL_CORE[c] latches). With the
// default latch counts 20 latches sit on 8 links: 3 on each direction of
// R1-sram2 and R1-risc, 2 on each direction of R0-R6 and R6-R1. Setting all
// counts to 0 gives the non-pipelined network.
//
// Core interface (index = mpeg4_topo_pkg::core_e): core_tx_* is the core's
// 2-phase sending channel into the network, core_rx_* the channel out of
// the network into the core. A core sends by placing a flit whose route was
// built with route_bits() on core_tx_data and toggling core_tx_req; the
// network toggles core_tx_ack when it has taken the flit. Delivery toggles
// core_rx_req; the core toggles core_rx_ack once it has taken the flit.
//
// The IP cores themselves are outside this block. All controllers are
// clocked by clk in this model; the wire delay of a link is not modelled
// inside the network.
module mpeg4_async_noc
  import noc_pkg::*;
  import mpeg4_topo_pkg::*;
#(
  parameter logic [0:NR-1][0:2][3:0] PL_OUT  = PL_OUT_DEFAULT,
  parameter logic [0:NC-1][3:0]      PL_CORE = PL_CORE_DEFAULT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic  [NC-1:0]  core_tx_req,
  output logic  [NC-1:0]  core_tx_ack,
  input  flit_t [NC-1:0]  core_tx_data,
  output logic  [NC-1:0]  core_rx_req,
  input  logic  [NC-1:0]  core_rx_ack,
  output flit_t [NC-1:0]  core_rx_data,
  output logic  [NR*3-1:0] contended      // per router port, r*3+p
);

  // Router port r*3+p: input channel (rin_*) and output channel (rout_*).
  logic  rin_req  [NR*3];
  logic  rin_ack  [NR*3];
  flit_t rin_dat  [NR*3];
  logic  rout_req [NR*3];
  logic  rout_ack [NR*3];
  flit_t rout_dat [NR*3];
  // Far end of the link leaving router port r*3+p.
  logic  lk_req   [NR*3];
  logic  lk_ack   [NR*3];
  flit_t lk_dat   [NR*3];
  // Far end of the link leaving core c.
  logic  cl_req   [NC];
  logic  cl_ack   [NC];
  flit_t cl_dat   [NC];

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    logic  [2:0] lr, la, rr, ra;
    flit_t [2:0] ld, rd;

    async_router u_router (
      .clk, .rst_n, .lr, .la, .ld, .rr, .ra, .rd,
      .contended(contended[r*3 +: 3])
    );

    for (genvar p = 0; p < 3; p++) begin : g_port
      localparam int unsigned ID = r * 3 + p;

      assign lr[p]         = rin_req[ID];
      assign ld[p]         = rin_dat[ID];
      assign rin_ack[ID]   = la[p];
      assign rout_req[ID]  = rr[p];
      assign rout_dat[ID]  = rd[p];
      assign ra[p]         = rout_ack[ID];

      pl_link #(.N_PL(32'(PL_OUT[r][p]))) u_link (
        .clk, .rst_n,
        .lr(rout_req[ID]), .la(rout_ack[ID]), .ld(rout_dat[ID]),
        .rr(lk_req[ID]),   .ra(lk_ack[ID]),   .rd(lk_dat[ID])
      );

      // What arrives at this port, and who acknowledges this port's output.
      if (NB_IS_CORE[r][p]) begin : g_core
        localparam int unsigned C = 32'(NB_ID[r][p]);
        assign rin_req[ID] = cl_req[C];
        assign rin_dat[ID] = cl_dat[C];
        assign lk_ack[ID]  = core_rx_ack[C];
      end else begin : g_nbr
        localparam int unsigned NID = 32'(NB_ID[r][p]) * 3 + 32'(NB_PORT[r][p]);
        assign rin_req[ID] = lk_req[NID];
        assign rin_dat[ID] = lk_dat[NID];
        assign lk_ack[ID]  = rin_ack[NID];
      end
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_core
    localparam int unsigned ID = 32'(CORE_R[c]) * 3 + 32'(CORE_P[c]);

    pl_link #(.N_PL(32'(PL_CORE[c]))) u_link (
      .clk, .rst_n,
      .lr(core_tx_req[c]), .la(core_tx_ack[c]), .ld(core_tx_data[c]),
      .rr(cl_req[c]),      .ra(cl_ack[c]),      .rd(cl_dat[c])
    );

    assign cl_ack[c]       = rin_ack[ID];
    assign core_rx_req[c]  = lk_req[ID];
    assign core_rx_data[c] = lk_dat[ID];
  end

endmodule
