// tb_phit_reg: checks that the phit register clears to the idle phit on
// reset and delays random phits by exactly one clock.
module tb_phit_reg;
  localparam int unsigned W = 18;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  phit_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = W'($urandom);
    @(posedge clk); #1;   // clocked while in reset
    checks++; if (q !== '0) begin failures++; $display("reset value %h", q); end
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      d = W'($urandom);
      prev = d;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; $display("q=%h expected %h", q, prev); end
      // q must not follow d between edges
      d = ~prev; #1;
      checks++;
      if (q !== prev) begin failures++; $display("q changed without a clock edge"); end
    end
    rst_n = 0; #1;
    checks++; if (q !== '0) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
