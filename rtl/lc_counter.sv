// lc_counter - local clock counter LC.
//
// LC counts clock cycles: it increments by one every cycle and is cleared
// to zero by CLR. Increment (INC) and clear (CLR) are the two inputs of the
// LC multiplexer that the design names; clear has priority. While clr is
// low the count meets the rule the midpoint circuit relies on: it
// increases by exactly one per cycle (modulo 2**WIDTH).
//
// Interface: clk, rst_n (synchronous, active low, clears), clr in; lc[WIDTH]
// out, registered. WIDTH and the reset are choices of this design.
module lc_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  output logic [WIDTH-1:0] lc
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) lc <= '0;
    else               lc <= lc + 1'b1;
  end

endmodule
