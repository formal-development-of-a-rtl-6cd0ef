// midpoint_opt - optimized fault-tolerant midpoint circuit.
//
// In a Welch-Lynch style synchronization round each clock timestamps the
// arrival of the other clocks' signals with a running count RD. F1 rises
// when the (F+1)-th reading has arrived and NF when the (N-F)-th has; the
// new clock value is the midpoint of the readings at those two instants,
// which discards the F earliest and F latest readings.
//
// The straightforward circuit keeps two registers (one frozen by F1, one by
// NF), adds them and halves the sum. This circuit computes the same value
// with one register and an incrementer: OPT is frozen at the F1 reading and
// then incremented every second cycle until NF rises (hold_cin supplies the
// carry). The two circuits give identical output streams provided
//   * F1 is low in the first cycle after reset,
//   * between resets F1 and NF never fall once risen, and NF implies F1,
//   * RD increments by one every cycle while no reset (R) is applied,
//   * RD does not wrap between the rise of F1 and the rise of NF.
// cfn is then floor((rd@F1 + rd@NF)/2), where rd@X is the RD value of the
// cycle before X is first seen high. cfn is valid one cycle after NF is
// first sampled high and stays until F1 falls.
//
// Interface: clk, rst_n (synchronous, active low), f1, nf, rd[WIDTH] in;
// cfn[WIDTH] out (registered). The structure and the equivalence
// conditions are those of the optimized circuit; widths, reset and the
// NF-implies-F1 assertion are choices of this design. The HOLD output of
// hold_cin is left unread here (a lint tool reports it); it stays on
// hold_cin's port list because it is the circuit's state bit.
module midpoint_opt #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             f1,
  input  logic             nf,
  input  logic [WIDTH-1:0] rd,
  output logic [WIDTH-1:0] cfn
);

  logic hold;
  logic cin;

  hold_cin u_hold_cin (
    .clk  (clk),
    .rst_n(rst_n),
    .f1   (f1),
    .nf   (nf),
    .hold (hold),
    .cin  (cin)
  );

  opt_reg #(.WIDTH(WIDTH), .INIT(INIT)) u_opt (
    .clk  (clk),
    .rst_n(rst_n),
    .f1   (f1),
    .cin  (cin),
    .rd   (rd),
    .opt  (cfn)
  );

  // Input constraint of the equivalence: NF may only be high with F1.
  a_nf_implies_f1: assert property (@(posedge clk) disable iff (!rst_n) nf |-> f1)
    else $error("midpoint_opt: NF high while F1 low");

endmodule
