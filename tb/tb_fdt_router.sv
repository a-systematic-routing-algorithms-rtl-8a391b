// tb_fdt_router: the X-Y router at (1,1) of a 4 x 4 mesh, 18-bit phits.
//  1. From every input to every destination of the mesh, one packet (head +
//     one payload) at a time: it must leave on the X-Y direction exactly two
//     cycles after it was presented, payload one cycle later, and nothing
//     may appear on any other output.
//  2. Five packets entering together, bound for five different outputs, all
//     pass in parallel.
//  3. Two heads for the same output in the same cycle: the lower-numbered
//     input wins and its payloads follow; the loser, payloads included,
//     leaves on no output.
//  4. A 3-port corner router at (0,0) (PE, East, South only): every
//     destination reachable from its inputs leaves on the right port two
//     cycles later; heads driven onto its missing North and West inputs are
//     ignored, and its missing outputs stay idle.
module tb_fdt_router;
  import fdt_pkg::*;
  localparam int unsigned W = 18;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in [NPORTS];
  logic [W-1:0] out [NPORTS];
  int checks = 0, failures = 0;

  fdt_router #(.W(W), .XW(2), .YW(2), .ROUTING(RA_XY)) dut (
    .clk(clk), .rst_n(rst_n), .xlocal(2'd1), .ylocal(2'd1), .in(in), .out(out)
  );

  logic [W-1:0] cin [NPORTS];
  logic [W-1:0] cout [NPORTS];

  fdt_router #(.W(W), .XW(2), .YW(2), .ROUTING(RA_XY), .PORTS(5'b10011)) dut_corner (
    .clk(clk), .rst_n(rst_n), .xlocal(2'd0), .ylocal(2'd0), .in(cin), .out(cout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy_dir(int xd, int yd);
    if (xd > 1) return 1;
    if (xd < 1) return 3;
    if (yd < 1) return 2;
    if (yd > 1) return 4;
    return 0;
  endfunction

  function automatic logic [W-1:0] head(int xd, int yd, logic [11:0] tag);
    return {2'b10, 2'(xd), 2'(yd), tag};
  endfunction

  function automatic logic [W-1:0] pay(logic [15:0] data);
    return {2'b11, data};
  endfunction

  task automatic idle_all();
    for (int i = 0; i < 5; i++) in[i] = '0;
  endtask

  // compare all five outputs with the expected phits (idle elsewhere)
  task automatic check_outs(logic [W-1:0] exp_o [NPORTS], string what);
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (out[j] !== exp_o[j]) begin
        failures++;
        $display("%s: out[%0d]=%h expected %h", what, j, out[j], exp_o[j]);
      end
    end
  endtask

  logic [W-1:0] e0 [NPORTS];
  logic [W-1:0] e1 [NPORTS];
  logic [W-1:0] ez [NPORTS];

  initial begin
    idle_all();
    for (int j = 0; j < 5; j++) begin ez[j] = '0; cin[j] = '0; end
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    // 1
    for (int i = 0; i < 5; i++)
      for (int xd = 0; xd < 4; xd++)
        for (int yd = 0; yd < 4; yd++) begin
          logic [W-1:0] h, p;
          int d;
          h = head(xd, yd, 12'($urandom));
          p = pay(16'($urandom));
          d = xy_dir(xd, yd);
          e0 = ez; e0[d] = h;
          e1 = ez; e1[d] = p;
          in[i] = h;  @(negedge clk);
          in[i] = p;  @(negedge clk);
          in[i] = '0; check_outs(e0, "1 head");
          @(negedge clk); check_outs(e1, "1 payload");
          @(negedge clk); check_outs(ez, "1 idle");
        end
    // 2: PE->West, East->PE, North->South, West->East, South->North
    in[0] = head(0, 1, 12'h001);
    in[1] = head(1, 1, 12'h002);
    in[2] = head(1, 3, 12'h003);
    in[3] = head(3, 1, 12'h004);
    in[4] = head(1, 0, 12'h005);
    e0[3] = in[0]; e0[0] = in[1]; e0[4] = in[2]; e0[1] = in[3]; e0[2] = in[4];
    @(negedge clk);
    for (int i = 0; i < 5; i++) in[i] = pay(16'(i * 4369));
    e1[3] = in[0]; e1[0] = in[1]; e1[4] = in[2]; e1[1] = in[3]; e1[2] = in[4];
    @(negedge clk); idle_all(); check_outs(e0, "2 heads");
    @(negedge clk); check_outs(e1, "2 payloads");
    @(negedge clk); check_outs(ez, "2 idle");
    // 3: West input and South input both for East, then two payloads each
    in[3] = head(3, 1, 12'h0AA);
    in[4] = head(2, 1, 12'h0BB);
    e0 = ez; e0[1] = in[3];
    @(negedge clk);
    in[3] = pay(16'h1111); in[4] = pay(16'h2222);
    @(negedge clk);
    e1 = ez; e1[1] = pay(16'h1111);
    in[3] = pay(16'h3333); in[4] = pay(16'h4444);
    check_outs(e0, "3 winner head");
    @(negedge clk);
    idle_all();
    check_outs(e1, "3 winner payload 1");
    e1[1] = pay(16'h3333);
    @(negedge clk); check_outs(e1, "3 winner payload 2");
    @(negedge clk); check_outs(ez, "3 loser dropped");
    @(negedge clk); check_outs(ez, "3 idle");

    // 4: corner router; X-Y from (0,0) goes East if x > 0, else South
    for (int i = 0; i < 5; i++)
      for (int xd = 0; xd < 4; xd++)
        for (int yd = 0; yd < 4; yd++) begin
          logic [W-1:0] h;
          int d;
          h = head(xd, yd, 12'($urandom));
          d = (xd > 0) ? 1 : (yd > 0) ? 4 : 0;
          e0 = ez;
          if (i == 0 || i == 1 || i == 4) e0[d] = h;
          cin[i] = h; @(negedge clk);
          cin[i] = '0; @(negedge clk);
          for (int j = 0; j < 5; j++) begin
            checks++;
            if (cout[j] !== e0[j]) begin
              failures++;
              $display("4 corner in %0d dest (%0d,%0d): out[%0d]=%h expected %h", i, xd, yd,
                       j, cout[j], e0[j]);
            end
          end
          @(negedge clk);
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
