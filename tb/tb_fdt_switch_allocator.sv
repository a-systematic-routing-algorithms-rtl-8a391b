// tb_fdt_switch_allocator: directed sequences for the East allocator of the
// router at (1,1) of a 4 x 4 X-Y mesh.
//  1. one packet (head + 2 payloads) from West: selected, then held, then
//     released at the first idle phit;
//  2. PE and South heads for East in the same cycle: PE wins, keeps the
//     output for its payloads, South's payloads are never selected;
//  3. a head arriving while another packet holds the output is not selected;
//  4. a head for West never requests East;
//  5. a packet directly followed by a new head on the same input: the new
//     head is arbitrated again (and loses to a lower-numbered input).
module tb_fdt_switch_allocator;
  import fdt_pkg::*;
  localparam int unsigned XW = 2, YW = 2;
  logic clk = 0, rst_n = 0;
  logic [1:0]        pt  [NPORTS];
  logic [XW+YW-1:0]  fda [NPORTS];
  logic [NPORTS-1:0] select, request, hold;
  int checks = 0, failures = 0;

  localparam logic [3:0] EAST_DST = 4'b11_01;  // (3,1)
  localparam logic [3:0] WEST_DST = 4'b00_01;  // (0,1)

  fdt_switch_allocator #(.XW(XW), .YW(YW), .OUT_PORT(PORT_EAST), .ROUTING(RA_XY)) dut (
    .clk(clk), .rst_n(rst_n), .pt(pt), .fda(fda), .xlocal(2'd1), .ylocal(2'd1),
    .select(select), .request(request), .hold(hold)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_all();
    for (int i = 0; i < 5; i++) begin pt[i] = PT_IDLE; fda[i] = '0; end
  endtask

  // apply the current inputs for one cycle and check select before the edge
  task automatic step(logic [4:0] exp_sel, string what);
    #1;
    checks++;
    if (select !== exp_sel) begin
      failures++;
      $display("%s: select=%b expected %b", what, select, exp_sel);
    end
    @(negedge clk);
  endtask

  initial begin
    idle_all();
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    // 1
    pt[3] = PT_HEAD; fda[3] = EAST_DST;    step(5'b01000, "1 head");
    pt[3] = PT_PAYLOAD; fda[3] = 4'hA;     step(5'b01000, "1 payload 1");
    checks++; if (hold !== 5'b01000) begin failures++; $display("1 hold=%b", hold); end
    pt[3] = PT_PAYLOAD; fda[3] = 4'h5;     step(5'b01000, "1 payload 2");
    idle_all();                            step(5'b00000, "1 released");
    // 2
    pt[0] = PT_HEAD; fda[0] = EAST_DST;
    pt[4] = PT_HEAD; fda[4] = EAST_DST;    step(5'b00001, "2 contention");
    pt[0] = PT_PAYLOAD; pt[4] = PT_PAYLOAD; step(5'b00001, "2 winner payload 1");
    step(5'b00001, "2 winner payload 2");
    pt[0] = PT_IDLE;                       step(5'b00000, "2 loser payload ignored");
    idle_all();                            step(5'b00000, "2 idle");
    // 3
    pt[2] = PT_HEAD; fda[2] = EAST_DST;    step(5'b00100, "3 head");
    pt[2] = PT_PAYLOAD;
    pt[1] = PT_HEAD; fda[1] = EAST_DST;    step(5'b00100, "3 blocked head");
    checks++; if (request !== 5'b00010) begin failures++; $display("3 request=%b", request); end
    pt[1] = PT_PAYLOAD;                    step(5'b00100, "3 held");
    idle_all();
    pt[1] = PT_HEAD; fda[1] = EAST_DST;    step(5'b00010, "3 granted after release");
    idle_all();                            step(5'b00000, "3 idle");
    // 4
    pt[0] = PT_HEAD; fda[0] = WEST_DST;    step(5'b00000, "4 west head");
    checks++; if (request !== '0) begin failures++; $display("4 request=%b", request); end
    idle_all();                            step(5'b00000, "4 idle");
    // 5
    pt[3] = PT_HEAD; fda[3] = EAST_DST;    step(5'b01000, "5 head");
    pt[3] = PT_PAYLOAD;                    step(5'b01000, "5 payload");
    pt[3] = PT_HEAD; fda[3] = EAST_DST;
    pt[2] = PT_HEAD; fda[2] = EAST_DST;    step(5'b00100, "5 re-arbitrated");
    pt[2] = PT_PAYLOAD; pt[3] = PT_PAYLOAD; step(5'b00100, "5 new winner held");
    idle_all();                            step(5'b00000, "5 idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
