// hold_cin - carry-in generator of the optimized midpoint circuit.
//
// The midpoint of two counter readings taken at the rise of F1 and at the
// rise of NF is floor((a+b)/2) = a + floor((b-a)/2). Because the counter
// advances by one per cycle, (b-a)/2 is obtained by adding one every second
// cycle between the two events. This block makes that "every second cycle"
// pulse:
//   HOLD <= F1 & ~HOLD      (initial value false)
//   CIN   = HOLD & ~NF
// HOLD toggles while F1 is high and is cleared the cycle after F1 is low.
// CIN is high on alternate cycles after F1 rose and stops as soon as NF is
// high.
//
// Interface: clk, rst_n (synchronous, active low, sets HOLD to false),
// f1, nf in; hold (registered) and cin (combinational from hold and nf) out.
// The two equations are those of the optimized circuit; the synchronous
// reset that supplies the initial value is a choice of this design.
module hold_cin (
  input  logic clk,
  input  logic rst_n,
  input  logic f1,
  input  logic nf,
  output logic hold,
  output logic cin
);

  always_ff @(posedge clk) begin
    if (!rst_n) hold <= 1'b0;
    else        hold <= f1 & ~hold;
  end

  assign cin = hold & ~nf;

endmodule
