// clock_sync_opt_tb - end-to-end test of clock_sync_opt at its default size.
//
// Plays the part of the surrounding mode logic and of the arrival counting:
// each round starts with a clear of LC (the round reset R), picks a new
// offset Q, raises F1 after a random delay and NF after a further random
// delay (zero included), keeps both high for a while, then ends with a cycle
// that clears LC and, for completed rounds, loads ADJ. Some rounds are
// aborted by the clear prev_cfn NF arrives.
//
// Checks every cycle: LC counts from 0 after each clear; RD = LC - Q; CFN
// equals the two-register reference circuit; from one cycle after NF is
// first sampled, CFN equals floor((a+b)/2) with a and b the RD values of
// the cycles prev_cfn F1 and NF rose; ADJ holds the last loaded midpoint.
// Counts each mechanism (clear, F1 and NF events, simultaneous events, odd
// and even spans, increments of the held value, aborted rounds, ADJ loads)
// and fails if one never happened.
module clock_sync_opt_tb;
  localparam int unsigned W = 16;
  localparam int ROUNDS = 300;

  logic clk = 1'b0;
  logic rst_n, lc_clr, f1, nf, adj_load;
  logic [W-1:0] q, lc, rd, cfn, adj, cfn_ref;
  logic [W-1:0] exp_lc, exp_adj;
  int checks = 0, failures = 0;
  int n_clr = 0, n_f1 = 0, n_nf = 0, n_same = 0, n_odd = 0, n_even = 0;
  int n_inc = 0, n_abort = 0, n_load = 0;

  clock_sync_opt dut (
    .clk(clk), .rst_n(rst_n), .lc_clr(lc_clr), .q(q), .f1(f1), .nf(nf),
    .adj_load(adj_load), .lc(lc), .rd(rd), .cfn(cfn), .adj(adj)
  );
  theta_midpoint_ref #(.WIDTH(W)) ref_i (
    .clk(clk), .rst_n(rst_n), .f1(f1), .nf(nf), .rd(rd), .cfn(cfn_ref)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s (lc=%0d rd=%0d cfn=%0d ref=%0d adj=%0d)",
                                  $time, what, lc, rd, cfn, cfn_ref, adj);
    end
  endtask

  // One cycle with the given controls; valid marks cycles after which CFN
  // must equal expv.
  task automatic cycle(input logic f, input logic g, input logic clr,
                       input logic ld, input bit valid, input int expv);
    logic [W-1:0] prev_cfn;
    f1 = f; nf = g; lc_clr = clr; adj_load = ld;
    #1;
    check(lc == exp_lc, "LC count");
    check(rd == W'(lc - q), "RD = LC - Q");
    prev_cfn = cfn;
    @(posedge clk); #1;
    check(cfn == cfn_ref, "CFN against reference");
    if (valid) check(cfn == W'(expv), "CFN midpoint");
    if (ld) begin exp_adj = prev_cfn; n_load++; end
    check(adj == exp_adj, "ADJ");
    if (f && !g && cfn == prev_cfn + 1'b1) n_inc++;
    if (clr) n_clr++;
    exp_lc = clr ? '0 : exp_lc + 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; lc_clr = 1'b0; f1 = 1'b0; nf = 1'b0; adj_load = 1'b0; q = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_lc = '0; exp_adj = '0;
    for (int r = 0; r < ROUNDS; r++) begin
      int pre, gap, post, a, b, expv;
      bit abort;
      // new offset, chosen so that RD does not wrap within the round
      q    = ($urandom_range(0, 3) == 0) ? '0 : W'($urandom_range(400, (1 << W) - 1));
      pre  = $urandom_range(1, 20);
      gap  = ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 60);
      post = $urandom_range(2, 10);
      abort = (gap > 1) && ($urandom_range(0, 7) == 0);
      for (int k = 0; k < pre; k++) cycle(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 0);
      a = int'(rd) - 1;
      n_f1++;
      if (abort) begin
        for (int k = 0; k < gap; k++) cycle(1'b1, 1'b0, k == gap - 1, 1'b0, 1'b0, 0);
        n_abort++;
        continue;
      end
      for (int k = 0; k < gap; k++) cycle(1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 0);
      b = int'(rd) - 1;
      expv = (a + b) / 2;
      n_nf++;
      if (gap == 0) n_same++;
      else if ((gap % 2) != 0) n_odd++;
      else n_even++;
      // the last cycle clears LC and loads ADJ with the midpoint
      for (int k = 0; k < post; k++)
        cycle(1'b1, 1'b1, k == post - 1, k == post - 1, 1'b1, expv);
      check(adj == W'(expv), "ADJ holds the round's midpoint");
    end
    $display("mechanisms: LC clear %0d, F1 %0d, NF %0d, F1=NF same cycle %0d, odd span %0d, even span %0d, increments %0d, aborted %0d, ADJ loads %0d",
             n_clr, n_f1, n_nf, n_same, n_odd, n_even, n_inc, n_abort, n_load);
    check(n_clr > 0 && n_f1 > 0 && n_nf > 0 && n_same > 0 && n_odd > 0 &&
          n_even > 0 && n_inc > 0 && n_abort > 0 && n_load > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
