// merge_arbiter: the merge module's arbitration circuit ("ar"). It
// serialises two 4-phase requests onto the one request lr_m of the merge
// controller and steers the controller's acknowledge back to the winner.
//
// The winner keeps the grant for one complete 4-phase cycle: request up,
// acknowledge up, request down, acknowledge down. Only then may the other
// input be granted. sel tells the data multiplexer which input to pass.
//
// The original grants the first request to arrive (a mutual-exclusion
// element). In this clocked model two requests can be seen in the same
// cycle; such a tie goes to the input that did not win last time. That
// tie-break is this design's choice.
//
// Interface: r1/a1 and r2/a2 4-phase inputs, rm/am 4-phase output,
// sel = 0 for input 1, 1 for input 2. rm, a1, a2 and sel are combinational
// functions of the registered grant. contended is high while both inputs
// request, i.e. while one of them is held back by the other.
module merge_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  output logic rm,
  input  logic am,
  output logic sel,
  output logic contended   // both inputs requesting: one of them waits
);

  typedef enum logic [1:0] {G_NONE, G_ONE, G_TWO} grant_e;

  grant_e grant;
  logic   last_two;          // input 2 won the previous grant

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant    <= G_NONE;
      last_two <= 1'b0;
    end else begin
      unique case (grant)
        G_NONE:
          if (r1 && r2) grant <= last_two ? G_ONE : G_TWO;
          else if (r1)  grant <= G_ONE;
          else if (r2)  grant <= G_TWO;
        G_ONE:
          if (!r1 && !am) begin
            grant    <= G_NONE;
            last_two <= 1'b0;
          end
        G_TWO:
          if (!r2 && !am) begin
            grant    <= G_NONE;
            last_two <= 1'b1;
          end
        default: grant <= G_NONE;
      endcase
    end
  end

  assign sel       = (grant == G_TWO);
  assign rm        = (grant == G_ONE) ? r1 : (grant == G_TWO) ? r2 : 1'b0;
  assign a1        = (grant == G_ONE) && am;
  assign a2        = (grant == G_TWO) && am;
  assign contended = r1 && r2;

  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) !(a1 && a2));

endmodule
