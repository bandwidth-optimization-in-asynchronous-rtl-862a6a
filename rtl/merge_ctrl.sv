// merge_ctrl: the merge module's controller. It takes a 4-phase request
// from the arbiter, stores the selected flit in the output latch and sends
// it on the link with one 2-phase transition.
//
// The output latch is free when the link has acknowledged the last transfer
// (rr == ra). A 4-phase request (lr high) on a free latch pulses le, raises
// la and toggles rr. la returns to zero after lr does. A transfer is thus
// acknowledged to the arbiter as soon as the flit is latched, and the link
// handshake runs on its own.
//
// The 4-phase input and 2-phase link output follow the router description;
// the controller's insides are this design's, one clock cycle per step.
//
// Interface: lr/la 4-phase input, rr/ra 2-phase link output, le latch
// enable (combinational from registered state and lr).
module merge_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra,
  output logic le
);

  assign le = lr && !la && (rr == ra);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= 1'b0;
      rr <= 1'b0;
    end else if (le) begin
      la <= 1'b1;
      rr <= ~rr;
    end else if (la && !lr) begin
      la <= 1'b0;
    end
  end

endmodule
