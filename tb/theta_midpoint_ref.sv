// theta_midpoint_ref - reference model: the midpoint circuit in its
// straightforward two-register form, used to check the optimized one.
//
//   THETA_F1 <= F1 ? THETA_F1 : RD      (initial INIT)
//   THETA_NF <= NF ? THETA_NF : RD      (initial INIT)
//   CFN       = (THETA_F1 + THETA_NF) / 2, sum taken one bit wider
// Each register follows RD until its event signal is high and then keeps
// the reading. Under the input rules listed in midpoint_opt its output
// stream equals the optimized circuit's, cycle by cycle.
module theta_midpoint_ref #(
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

  logic [WIDTH-1:0] theta_f1, theta_nf;
  logic [WIDTH:0]   sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      theta_f1 <= INIT;
      theta_nf <= INIT;
    end else begin
      if (!f1) theta_f1 <= rd;
      if (!nf) theta_nf <= rd;
    end
  end

  assign sum = {1'b0, theta_f1} + {1'b0, theta_nf};
  assign cfn = sum[WIDTH:1];

endmodule
