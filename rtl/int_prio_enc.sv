// int_prio_enc: priority encoder for the interrupts attached to one sCPU.
//
// When several interrupts of the same task are pending, the encoder gives
// the number of the highest-priority one; interrupt 0 has the highest
// priority and priority falls with the index, a static order fixed by the
// wiring. For P = 4 the outputs reduce to
//   num[1] = ~r0 & ~r1,   num[0] = ~r0 & r1 | ~r0 & ~r2,
// with valid = r0 | r1 | r2 | r3. Because the encoder is a single
// combinational block, the decision takes the same time for every
// interrupt, unlike a software loop of tests.
//
// Interface: req (P lines, INT_0_i .. INT_{P-1}_i) in; num and valid out.
// As in the equations above, the lowest-priority number P-1 is produced when
// no request is present, so num is only meaningful while valid is 1.
// Timing: combinational.
module int_prio_enc #(
  parameter int unsigned P = 8
) (
  input  logic [P-1:0]         req,
  output logic [$clog2(P)-1:0] num,
  output logic                 valid
);

  always_comb begin
    num = $clog2(P)'(P - 1);
    for (int k = int'(P) - 1; k >= 0; k--) begin
      if (req[k]) num = k[$clog2(P)-1:0];
    end
    valid = |req;
  end

endmodule
