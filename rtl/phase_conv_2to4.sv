// phase_conv_2to4: turns one 2-phase (transition) handshake on the link
// input into one full 4-phase (return-to-zero) handshake towards the
// switch's linear controller.
//
// A link transfer is announced by a transition on lr (lr differs from la).
// The converter then raises r4; when the controller answers with a4 high the
// flit is stored, so the converter acknowledges the link by toggling la and
// drops r4. A new link event is only taken once a4 has returned to zero.
//
// Placing a 2-to-4 phase converter on the switch input is as described for
// the router. In the original the controllers are clockless; here every
// handshake signal is a flip-flop sampled on clk, so each controller step
// costs one clock cycle. That timing model is this design's choice.
//
// Interface: lr/la 2-phase link side, r4/a4 4-phase controller side.
// Reset: all handshake signals low.
module phase_conv_2to4 (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,   // 2-phase request from the link
  output logic la,   // 2-phase acknowledge to the link
  output logic r4,   // 4-phase request to the controller
  input  logic a4    // 4-phase acknowledge from the controller
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= 1'b0;
      r4 <= 1'b0;
    end else if (!r4 && !a4 && (lr != la)) begin
      r4 <= 1'b1;                 // new link event: start a 4-phase cycle
    end else if (r4 && a4) begin
      r4 <= 1'b0;                 // flit stored: return to zero ...
      la <= ~la;                  // ... and acknowledge the link
    end
  end

  // The link side may not issue a second event before the first is acked.
  a_one_event: assert property (@(posedge clk) disable iff (!rst_n)
    (r4 && lr != la) |=> (lr != la) || $changed(la));

endmodule
