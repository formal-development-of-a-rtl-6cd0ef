// hold_cin_tb - self-checking test of hold_cin.
// Drives random F1/NF patterns (including long F1-high runs) and compares
// HOLD and CIN every cycle with a model kept in the testbench: HOLD starts
// false after reset, toggles while F1 is high, and CIN = HOLD & ~NF.
module hold_cin_tb;
  logic clk = 1'b0;
  logic rst_n, f1, nf, hold, cin;
  int checks = 0, failures = 0;
  bit exp_hold;

  hold_cin dut (.clk(clk), .rst_n(rst_n), .f1(f1), .nf(nf), .hold(hold), .cin(cin));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; f1 = 1'b1; nf = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_hold = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      // F1 stays in one state for runs of random length
      if ($urandom_range(0, 7) == 0) f1 = ~f1;
      nf = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (hold !== exp_hold || cin !== (exp_hold & ~nf)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: hold=%b cin=%b expected %b %b",
                                    n, hold, cin, exp_hold, exp_hold & ~nf);
      end
      @(posedge clk);
      exp_hold = f1 & ~exp_hold;
      #1;
    end
    // reset returns HOLD to false
    f1 = 1'b1; @(posedge clk); #1;
    rst_n = 1'b0; @(posedge clk); #1;
    checks++;
    if (hold !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
