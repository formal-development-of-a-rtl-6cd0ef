// adj_reg_tb - self-checking test of adj_reg.
// Random load strobes and data; ADJ must take d one cycle after load and
// keep its value otherwise.
module adj_reg_tb;
  localparam int unsigned W = 16;
  logic clk = 1'b0;
  logic rst_n, load;
  logic [W-1:0] d, adj, exp_adj;
  int checks = 0, failures = 0;

  adj_reg #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .adj(adj));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = '1;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_adj = '0;
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (adj !== exp_adj) begin
        failures++;
        if (failures < 10) $display("cycle %0d: adj=%h expected %h", n, adj, exp_adj);
      end
      load = ($urandom_range(0, 3) == 0);
      d    = W'($urandom);
      @(posedge clk); #1;
      if (load) exp_adj = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
