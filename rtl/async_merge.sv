// async_merge: output port of the three-port router. Two switches compete
// for it; the winner's flit is latched and sent over the 2-phase link.
//
// Structure as in the router's merge diagram: the arbitration circuit
// serialises the two 4-phase requests (lr1, lr2) into lr_m and controls the
// multiplexer that picks the winner's data; the merge controller loads the
// output latch and performs the 2-phase link handshake on rr/ra. The
// acknowledge la_m goes back through the arbiter to the winning switch.
//
// Timing in this clocked model: grant one cycle after a request, latch and
// link transition one cycle after the grant. A second flit can be latched as
// soon as the link has acknowledged the first (rr == ra).
module async_merge
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // 4-phase inputs from two switches
  input  logic  lr1,
  output logic  la1,
  input  flit_t ld1,
  input  logic  lr2,
  output logic  la2,
  input  flit_t ld2,
  // 2-phase link output
  output logic  rr,
  input  logic  ra,
  output flit_t rd,
  // both inputs requested at once (observability for statistics)
  output logic  contended
);

  logic lr_m, la_m, sel, le;

  merge_arbiter u_ar (
    .clk, .rst_n, .r1(lr1), .a1(la1), .r2(lr2), .a2(la2),
    .rm(lr_m), .am(la_m), .sel, .contended
  );

  merge_ctrl u_ctrl (
    .clk, .rst_n, .lr(lr_m), .la(la_m), .rr, .ra, .le
  );

  // Output data latch (D_L) behind the multiplexer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd <= '0;
    else if (le) rd <= sel ? ld2 : ld1;
  end

  // Bundled data: the link data may only change together with a new event.
  a_bundled: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(rd) |-> $changed(rr));

endmodule
