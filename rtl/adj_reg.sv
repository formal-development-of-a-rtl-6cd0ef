// adj_reg - ADJ register holding the clock adjustment.
//
// ADJ captures the midpoint produced by the midpoint circuit when load is
// high and holds it otherwise; the multiplexer in front of it chooses
// between the new midpoint and its own value. The mode logic that decides
// when to load is outside this block.
//
// Interface: clk, rst_n (synchronous, active low, clears), load, d[WIDTH]
// in; adj[WIDTH] out, updated one cycle after load. The load-enable form,
// WIDTH and reset value are choices of this design.
module adj_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] adj
);

  always_ff @(posedge clk) begin
    if (!rst_n)    adj <= '0;
    else if (load) adj <= d;
  end

endmodule
