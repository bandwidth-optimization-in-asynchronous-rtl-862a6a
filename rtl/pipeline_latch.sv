// pipeline_latch: one-flit buffer placed on a long 2-phase bundled-data
// link. It splits the link into two shorter segments, so each handshake
// loop covers less wire and the link can cycle faster, and it adds one flit
// of buffering with link-level flow control.
//
// A transition on lr (lr != la) means a flit is waiting on ld. If the
// latch is empty (its own output was acknowledged: rr == ra) it stores the
// flit, toggles la to release the sender and toggles rr to offer the flit
// downstream, all on the same clock edge.
//
// The role of the latch follows the document; its insides are this
// design's. Forward latency is one clock cycle; with zero wire delay a chain
// of these latches passes one flit every two cycles.
module pipeline_latch
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lr,
  output logic  la,
  input  flit_t ld,
  output logic  rr,
  input  logic  ra,
  output flit_t rd
);

  logic take;

  assign take = (lr != la) && (rr == ra);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= 1'b0;
      rr <= 1'b0;
      rd <= '0;
    end else if (take) begin
      la <= ~la;
      rr <= ~rr;
      rd <= ld;
    end
  end

endmodule
