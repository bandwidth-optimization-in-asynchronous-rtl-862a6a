// mpeg4_topo_pkg: the MPEG4 decoder network - 10 three-port routers in a
// tree joining 12 IP cores, and the number of pipeline latches on each link.
//
// Router adjacency follows the published topology: R0 {sdram, upsamp, R6},
// R1 {sram2, risc, R6}, R2 {sram1, rast, R7}, R3 {vu, mcpu, R7},
// R4 {dsp, idct, R8}, R5 {babcalc, au, R8}, R6 {R0, R1, R9},
// R7 {R9, R3, R2}, R8 {R9, R5, R4}, R9 {R6, R8, R7}. Which neighbour sits on
// which port number is this design's choice (listed in the tables below).
//
// Pipeline latches (optimised configuration): three latches on each
// direction of the sram2 and risc links of R1, two on each direction of the
// R0-R6 and R6-R1 links, 20 latches in all on 8 of the 42 links.
//
// The package also holds route_bits(), which a traffic source uses to build
// the source route of a flit: it walks the tree and emits one steering bit
// per router, most-significant first. At a router entered on port i, bit 0
// leaves on port (i+1)%3 and bit 1 on port (i+2)%3.
package mpeg4_topo_pkg;

  import noc_pkg::*;

  parameter int unsigned NR = 10;  // routers
  parameter int unsigned NC = 12;  // IP cores

  typedef enum int unsigned {
    SDRAM = 0, UPSAMP = 1, SRAM2 = 2, RISC = 3, SRAM1 = 4, RAST = 5,
    VU = 6, MCPU = 7, DSP = 8, IDCT = 9, BABCALC = 10, AU = 11
  } core_e;

  // Neighbour of router r on port p: a core (NB_IS_CORE=1, NB_ID = core
  // number, see core_e) or a router (NB_ID = router number, NB_PORT = the
  // neighbour's port on this link).
  localparam bit [0:NR-1][0:2] NB_IS_CORE = {
    3'b110, 3'b110, 3'b110, 3'b110, 3'b110,
    3'b110, 3'b000, 3'b000, 3'b000, 3'b000};
  localparam logic [0:NR-1][0:2][3:0] NB_ID = {
    4'd0, 4'd1,  4'd6,    // R0: sdram, upsamp, R6
    4'd2, 4'd3,  4'd6,    // R1: sram2, risc, R6
    4'd4, 4'd5,  4'd7,    // R2: sram1, rast, R7
    4'd6, 4'd7,  4'd7,    // R3: vu, mcpu, R7
    4'd8, 4'd9,  4'd8,    // R4: dsp, idct, R8
    4'd10, 4'd11, 4'd8,   // R5: babcalc, au, R8
    4'd0, 4'd1,  4'd9,    // R6: R0, R1, R9
    4'd9, 4'd3,  4'd2,    // R7: R9, R3, R2
    4'd9, 4'd5,  4'd4,    // R8: R9, R5, R4
    4'd6, 4'd8,  4'd7};   // R9: R6, R8, R7
  localparam logic [0:NR-1][0:2][1:0] NB_PORT = {
    2'd0, 2'd0, 2'd0,  2'd0, 2'd0, 2'd1,  2'd0, 2'd0, 2'd2,
    2'd0, 2'd0, 2'd1,  2'd0, 2'd0, 2'd2,  2'd0, 2'd0, 2'd1,
    2'd2, 2'd2, 2'd0,  2'd2, 2'd2, 2'd2,  2'd1, 2'd2, 2'd2,
    2'd2, 2'd0, 2'd0};

  // Router and port each core is attached to.
  localparam logic [0:NC-1][3:0] CORE_R = {
    4'd0, 4'd0, 4'd1, 4'd1, 4'd2, 4'd2, 4'd3, 4'd3, 4'd4, 4'd4, 4'd5, 4'd5};
  localparam logic [0:NC-1][1:0] CORE_P = {
    2'd0, 2'd1, 2'd0, 2'd1, 2'd0, 2'd1, 2'd0, 2'd1, 2'd0, 2'd1, 2'd0, 2'd1};

  // Pipeline latches on the link leaving router r by port p ...
  localparam logic [0:NR-1][0:2][3:0] PL_OUT_DEFAULT = {
    4'd0, 4'd0, 4'd2,     // R0 -> R6
    4'd3, 4'd3, 4'd2,     // R1 -> sram2, R1 -> risc, R1 -> R6
    4'd0, 4'd0, 4'd0,  4'd0, 4'd0, 4'd0,  4'd0, 4'd0, 4'd0,  4'd0, 4'd0, 4'd0,
    4'd2, 4'd2, 4'd0,     // R6 -> R0, R6 -> R1
    4'd0, 4'd0, 4'd0,  4'd0, 4'd0, 4'd0,  4'd0, 4'd0, 4'd0};
  // ... and on the link from core c into its router (sram2, risc).
  localparam logic [0:NC-1][3:0] PL_CORE_DEFAULT = {
    4'd0, 4'd0, 4'd3, 4'd3, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0, 4'd0};

  // Port of router r that leads towards core c (tree, so it is unique).
  function automatic int unsigned toward(int unsigned r, int unsigned c);
    int np [NR][NC];
    for (int unsigned i = 0; i < NR; i++)
      for (int unsigned j = 0; j < NC; j++) np[i][j] = -1;
    for (int unsigned j = 0; j < NC; j++) np[CORE_R[j]][j] = int'(CORE_P[j]);
    for (int unsigned it = 0; it < NR; it++)
      for (int unsigned i = 0; i < NR; i++)
        for (int unsigned p = 0; p < 3; p++)
          if (!NB_IS_CORE[i][p])
            for (int unsigned j = 0; j < NC; j++)
              if (np[i][j] < 0 && np[NB_ID[i][p]][j] >= 0 &&
                  np[NB_ID[i][p]][j] != int'(NB_PORT[i][p]))
                np[i][j] = int'(p);
    return (np[r][c] < 0) ? 0 : unsigned'(np[r][c]);
  endfunction

  // Number of routers a flit from core s to core d passes through.
  function automatic int unsigned hops(int unsigned s, int unsigned d);
    int unsigned r = CORE_R[s];
    int unsigned n = 0;
    for (int unsigned k = 0; k < NR; k++) begin
      int unsigned o = toward(r, d);
      n++;
      if (NB_IS_CORE[r][o]) break;
      r = NB_ID[r][o];
    end
    return n;
  endfunction

  // Source route from core s to core d, first steering bit in the MSB.
  function automatic route_t route_bits(int unsigned s, int unsigned d);
    route_t      rt = '0;
    int unsigned r  = CORE_R[s];
    int unsigned i  = CORE_P[s];
    for (int unsigned k = 0; k < ROUTE_W; k++) begin
      int unsigned o = toward(r, d);
      rt[ROUTE_W-1-k] = (o == (i + 1) % 3) ? 1'b0 : 1'b1;
      if (NB_IS_CORE[r][o]) break;
      i = NB_PORT[r][o];
      r = NB_ID[r][o];
    end
    return rt;
  endfunction

endpackage
