// clock_sync_opt - core of a fault-tolerant clock synchronization circuit,
// optimized form.
//
// N clocks, F of which may be faulty, periodically resynchronize: each clock
// timestamps the synchronization signals of all the others against its own
// local clock, throws away the F earliest and F latest readings and moves to
// the midpoint of the rest. Arrival order does the sorting, so only two
// readings matter: the one at which the (F+1)-th signal arrives (F1) and the
// one at which the (N-F)-th arrives (NF). The core is independent of N and F;
// the logic that counts arrivals and raises F1 and NF lies outside it.
//
// Datapath:
//   LC   local clock, counts cycles, cleared by lc_clr (lc_counter)
//   RD   = LC + (-Q), the reading against which arrivals are timed
//   CFN  midpoint of the RD values at the rise of F1 and of NF, computed
//        by the one-register optimized circuit (midpoint_opt)
//   ADJ  captures CFN when adj_load is high (adj_reg)
// RD changes in the same cycle as LC (combinational subtract). CFN is valid
// one cycle after NF is first sampled high; ADJ one cycle after adj_load.
//
// Assertions state the input rules the midpoint circuit relies on (see
// midpoint_opt): F1 low after reset or a clear, F1 and NF held until the
// next clear, Q changed only in the cycle after a clear.
//
// The mode logic that sequences clearing and loading (its STATUS signal) and
// the comparison that times the next round are not part of this block:
// lc_clr and adj_load are inputs, and LC and ADJ are outputs for them. The
// structure LC / -(Q) / midpoint / ADJ follows the design; the port list,
// taking Q as an input and WIDTH are choices of this design.
module clock_sync_opt #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lc_clr,
  input  logic [WIDTH-1:0] q,
  input  logic             f1,
  input  logic             nf,
  input  logic             adj_load,
  output logic [WIDTH-1:0] lc,
  output logic [WIDTH-1:0] rd,
  output logic [WIDTH-1:0] cfn,
  output logic [WIDTH-1:0] adj
);

  lc_counter #(.WIDTH(WIDTH)) u_lc (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (lc_clr),
    .lc   (lc)
  );

  assign rd = lc + (~q + 1'b1);

  midpoint_opt #(.WIDTH(WIDTH), .INIT(INIT)) u_mid (
    .clk  (clk),
    .rst_n(rst_n),
    .f1   (f1),
    .nf   (nf),
    .rd   (rd),
    .cfn  (cfn)
  );

  adj_reg #(.WIDTH(WIDTH)) u_adj (
    .clk  (clk),
    .rst_n(rst_n),
    .load (adj_load),
    .d    (cfn),
    .adj  (adj)
  );

  // Input rules under which the optimized midpoint equals the two-register
  // one. lc_clr plays the part of the round reset R: after R, F1 and NF
  // start low; otherwise they never fall, NF never comes without F1, and Q
  // stays put so that RD advances by exactly one per cycle.
  a_f1_low_after_reset: assert property (@(posedge clk) !rst_n |=> !f1)
    else $error("clock_sync_opt: F1 high in the first cycle after reset");
  a_f1_low_after_clr: assert property (@(posedge clk) disable iff (!rst_n) lc_clr |=> !f1)
    else $error("clock_sync_opt: F1 high after a clear");
  a_f1_stays: assert property (@(posedge clk) disable iff (!rst_n) (!lc_clr && f1) |=> f1)
    else $error("clock_sync_opt: F1 fell without a clear");
  a_nf_stays: assert property (@(posedge clk) disable iff (!rst_n) (!lc_clr && nf) |=> nf)
    else $error("clock_sync_opt: NF fell without a clear");
  a_q_stable: assert property (@(posedge clk) disable iff (!rst_n) !lc_clr |=> $stable(q))
    else $error("clock_sync_opt: Q changed outside the cycle after a clear");

endmodule
