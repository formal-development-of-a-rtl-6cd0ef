// lc_counter_tb - self-checking test of lc_counter.
// Counts with random clears at an 8-bit width (to see the wrap) and checks
// the count every cycle against a model: +1 per cycle, 0 after a clear or
// a reset.
module lc_counter_tb;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic rst_n, clr;
  logic [W-1:0] lc, exp_lc;
  int checks = 0, failures = 0, wraps = 0;

  lc_counter #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .lc(lc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_lc = '0;
    for (int n = 0; n < 3000; n++) begin
      checks++;
      if (lc !== exp_lc) begin
        failures++;
        if (failures < 10) $display("cycle %0d: lc=%0d expected %0d", n, lc, exp_lc);
      end
      clr = ($urandom_range(0, 599) == 0);
      @(posedge clk); #1;
      if (!clr && exp_lc == 8'hFF) wraps++;
      exp_lc = clr ? '0 : exp_lc + 1'b1;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
