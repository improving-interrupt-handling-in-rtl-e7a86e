// event_sync: synchronises asynchronous event lines on the falling clock edge.
//
// One D flip-flop per line, clocked on the falling edge of the system clock,
// as the nMPRA sCPU-level scheduler does for INT_i to produce IntEv_i. The
// scheduler registers its decision on the next rising edge, so an event is
// seen by the scheduler between half a clock and one and a half clocks after
// it appears, which is the bound on the nMPRA response time.
//
// Interface: d (W lines) in, q out. Timing: q takes d at every falling edge.
// Reset (asynchronous, active low) clears q.
module event_sync #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
