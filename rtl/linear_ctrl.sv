// linear_ctrl: one-stage 4-phase pipeline controller with its data-latch
// enable (the switch's "linear controller").
//
// When a request arrives on the left (lr high) and the stage is empty, le
// pulses for one cycle to load the data latch, la is raised and the stage is
// marked full. The stored flit is then offered on the right (rr high) as
// soon as the right channel has returned to zero (ra low). The right
// acknowledge (ra high) frees the stage and rr returns to zero. Left and
// right handshakes run independently, so a new flit can be accepted while
// the right side finishes its return-to-zero phase.
//
// The document names this a burst-mode controller taken from earlier work
// and gives only its role; this is the simplest controller that does the
// same job, with one clock cycle per step.
//
// Interface: lr/la left 4-phase channel, rr/ra right 4-phase channel,
// le combinational latch enable (a function of registered state and lr).
module linear_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra,
  output logic le
);

  logic full;

  assign le = lr && !la && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la   <= 1'b0;
      rr   <= 1'b0;
      full <= 1'b0;
    end else begin
      if (le) begin
        la   <= 1'b1;
        full <= 1'b1;
      end else if (la && !lr) begin
        la <= 1'b0;
      end
      if (full && !rr && !ra) begin
        rr <= 1'b1;
      end else if (rr && ra) begin
        rr   <= 1'b0;
        full <= 1'b0;
      end
    end
  end

  // 4-phase rule: a request stays high until it is acknowledged.
  a_rr_held: assert property (@(posedge clk) disable iff (!rst_n)
    (rr && !ra) |=> rr);

endmodule
