// wire_delay: behavioural model of the wires of one link segment, used only
// by testbenches. Request and data travel forward and the acknowledge
// travels back, each taking D clock cycles of flight time (D = 0 is an
// ideal wire). Request and data are delayed together, so the bundled-data
// timing is preserved. This stands for the physical wire, which has no
// logic of its own; a longer wire is a larger D.
module wire_delay
  import noc_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic  clk,
  input  logic  lr,      // from the sender
  input  flit_t ld,
  output logic  la,
  output logic  rr,      // to the receiver
  output flit_t rd,
  input  logic  ra
);

  if (D == 0) begin : g_ideal
    assign rr = lr;
    assign rd = ld;
    assign la = ra;
  end else begin : g_wire
    logic  req_sr [D];
    flit_t dat_sr [D];
    logic  ack_sr [D];

    initial begin
      for (int k = 0; k < D; k++) begin
        req_sr[k] = 1'b0;
        ack_sr[k] = 1'b0;
        dat_sr[k] = '0;
      end
    end

    always @(posedge clk) begin
      req_sr[0] <= lr;
      dat_sr[0] <= ld;
      ack_sr[0] <= ra;
      for (int k = 1; k < D; k++) begin
        req_sr[k] <= req_sr[k-1];
        dat_sr[k] <= dat_sr[k-1];
        ack_sr[k] <= ack_sr[k-1];
      end
    end

    assign rr = req_sr[D-1];
    assign rd = dat_sr[D-1];
    assign la = ack_sr[D-1];
  end

endmodule
