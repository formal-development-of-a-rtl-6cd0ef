// opt_reg_tb - self-checking test of opt_reg.
// Random F1, CIN and RD each cycle; the expected register value is kept in
// the testbench: load RD while F1 is low, add CIN while F1 is high, reset
// to INIT. Runs with a non-zero INIT and an 8-bit width so wrap-around is
// exercised.
module opt_reg_tb;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] I0 = 8'h5A;
  logic clk = 1'b0;
  logic rst_n, f1, cin;
  logic [W-1:0] rd, opt;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_opt;

  opt_reg #(.WIDTH(W), .INIT(I0)) dut (.clk(clk), .rst_n(rst_n), .f1(f1), .cin(cin), .rd(rd), .opt(opt));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; f1 = 1'b0; cin = 1'b0; rd = '0;
    @(posedge clk); #1;
    checks++;
    if (opt !== I0) begin failures++; $display("reset value %h", opt); end
    rst_n = 1'b1;
    exp_opt = I0;
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 5) == 0) f1 = ~f1;
      cin = 1'($urandom_range(0, 1));
      rd  = W'($urandom);
      @(posedge clk);
      exp_opt = f1 ? exp_opt + W'(cin) : rd;
      #1;
      checks++;
      if (opt !== exp_opt) begin
        failures++;
        if (failures < 10) $display("cycle %0d: opt=%h expected %h", n, opt, exp_opt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
