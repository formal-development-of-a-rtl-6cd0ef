// opt_reg - the OPT register of the optimized midpoint circuit.
//
//   OPT <= F1 ? OPT + CIN : RD      (initial value INIT)
// While F1 is low the register follows the running count RD. From the cycle
// F1 is seen high it stops following RD and instead adds the 1-bit carry
// CIN each cycle. Fed with CIN from hold_cin it ends up holding the
// midpoint of the RD values seen at the rise of F1 and of NF.
//
// Interface: clk, rst_n (synchronous, active low, loads INIT), f1, cin,
// rd[WIDTH] in; opt[WIDTH] out, registered, one cycle after its inputs.
// The equation is the one of the optimized circuit; WIDTH, INIT and the
// synchronous reset are choices of this design. The count wraps modulo
// 2**WIDTH.
module opt_reg #(
  parameter int unsigned        WIDTH = 16,
  parameter logic [WIDTH-1:0]   INIT  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             f1,
  input  logic             cin,
  input  logic [WIDTH-1:0] rd,
  output logic [WIDTH-1:0] opt
);

  always_ff @(posedge clk) begin
    if (!rst_n)  opt <= INIT;
    else if (f1) opt <= opt + WIDTH'(cin);
    else         opt <= rd;
  end

endmodule
