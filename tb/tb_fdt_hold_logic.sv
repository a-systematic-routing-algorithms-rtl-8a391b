// tb_fdt_hold_logic: random grant / payload stimulus against a reference
// model of the hold rule: an input selected in the previous cycle stays
// selected while it presents payload phits, and the arbiter enable is low
// whenever any input is holding.
module tb_fdt_hold_logic;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] grant, payload, hold, select;
  logic         en;
  logic [N-1:0] m_last, exp_hold, exp_select;
  int checks = 0, failures = 0, holds_seen = 0;

  fdt_hold_logic #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .grant(grant), .payload(payload),
    .hold(hold), .select(select), .en(en)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grant = '0; payload = '0; m_last = '0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      payload = N'($urandom);
      exp_hold = m_last & payload;
      // the arbiter only grants when nothing holds; mimic that, one-hot
      grant = '0;
      if (exp_hold == '0 && ($urandom % 2) == 1) grant[$urandom % N] = 1'b1;
      exp_select = grant | exp_hold;
      #1;
      checks++;
      if (hold !== exp_hold || select !== exp_select || en !== (exp_hold == '0)) begin
        failures++;
        $display("cycle %0d: hold=%b/%b select=%b/%b en=%b", k, hold, exp_hold,
                 select, exp_select, en);
      end
      if (exp_hold != '0) holds_seen++;
      @(posedge clk);
      m_last = exp_select;
    end
    checks++;
    if (holds_seen == 0) begin failures++; $display("no hold exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
