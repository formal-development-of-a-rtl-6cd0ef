// midpoint_opt_tb - self-checking test of midpoint_opt.
//
// Generates synchronization rounds that obey the input rules of the
// optimized circuit: RD counts up by one per cycle except right after a
// round-reset cycle R, where it jumps to a random value; F1 and NF are low
// at the start of a round, rise once (NF not prev_cfn F1) and fall only after
// R. Each round has a random number of cycles prev_cfn F1, between F1 and NF
// (zero included) and after NF; some rounds are cut short by R prev_cfn NF.
//
// Checks, every cycle: the output equals that of the two-register
// reference circuit (theta_midpoint_ref). From one cycle after NF is first
// sampled high: the output equals floor((a+b)/2), with a and b the RD values
// of the cycles prev_cfn F1 and NF rose, worked out here from the schedule.
module midpoint_opt_tb;
  localparam int unsigned W = 16;
  localparam int ROUNDS = 400;

  logic clk = 1'b0;
  logic rst_n, f1, nf;
  logic [W-1:0] rd, cfn, cfn_ref;
  int checks = 0, failures = 0;
  int n_same = 0, n_odd = 0, n_even = 0, n_abort = 0, n_cin = 0;

  midpoint_opt dut (.clk(clk), .rst_n(rst_n), .f1(f1), .nf(nf), .rd(rd), .cfn(cfn));
  theta_midpoint_ref ref_i (.clk(clk), .rst_n(rst_n), .f1(f1), .nf(nf), .rd(rd), .cfn(cfn_ref));

  always #5 clk = ~clk;


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: apply inputs, clock, compare with the reference.
  // If valid, also compare with the expected midpoint.
  task automatic cycle(input logic f, input logic g, input bit valid, input int expv);
    logic [W-1:0] prev_cfn;
    f1 = f; nf = g;
    prev_cfn = cfn;
    @(posedge clk); #1;
    // an increment of the held value between the F1 and NF events
    if (f && !g && f1 && cfn == prev_cfn + 1'b1) n_cin++;
    checks++;
    if (cfn !== cfn_ref) begin
      failures++;
      if (failures < 10) $display("%0t: cfn=%0d reference=%0d", $time, cfn, cfn_ref);
    end
    if (valid) begin
      checks++;
      if (cfn !== W'(expv)) begin
        failures++;
        if (failures < 10) $display("%0t: cfn=%0d expected=%0d", $time, cfn, expv);
      end
    end
    rd = rd + 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; f1 = 1'b0; nf = 1'b0; rd = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int r = 0; r < ROUNDS; r++) begin
      int pre, gap, post, a, b, expv;
      bit abort;
      rd   = W'($urandom_range(0, (1 << W) - 400));
      pre  = $urandom_range(1, 20);
      gap  = ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 60);
      post = $urandom_range(1, 10);
      abort = (gap > 1) && ($urandom_range(0, 7) == 0);
      for (int k = 0; k < pre; k++) cycle(1'b0, 1'b0, 1'b0, 0);
      a = int'(rd) - 1;
      if (abort) begin
        // R arrives while waiting for NF
        for (int k = 0; k < gap; k++) cycle(1'b1, 1'b0, 1'b0, 0);
        n_abort++;
        continue;
      end
      for (int k = 0; k < gap; k++) cycle(1'b1, 1'b0, 1'b0, 0);
      b = int'(rd) - 1;
      expv = (a + b) / 2;
      if (gap == 0) n_same++;
      else if ((gap % 2) != 0) n_odd++;
      else n_even++;
      for (int k = 0; k < post; k++) cycle(1'b1, 1'b1, 1'b1, expv);
      // the last cycle above is the R cycle: the next round starts with
      // F1 and NF low and a new RD value
    end
    // every kind of round must have occurred
    checks++;
    if (n_same == 0 || n_odd == 0 || n_even == 0 || n_abort == 0 || n_cin == 0) begin
      failures++;
      $display("coverage: same=%0d odd=%0d even=%0d abort=%0d cin=%0d",
               n_same, n_odd, n_even, n_abort, n_cin);
    end
    $display("rounds: F1=NF same cycle %0d, odd span %0d, even span %0d, aborted %0d; CIN pulses %0d",
             n_same, n_odd, n_even, n_abort, n_cin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
