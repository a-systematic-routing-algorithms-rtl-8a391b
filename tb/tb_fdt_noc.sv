// tb_fdt_noc: end-to-end test of the default mesh (4 x 4, 18-bit phits, X-Y
// routing), instantiated with its default parameters.
//  1. All-to-all: every node sends one packet (head + 1..4 payloads) to
//     every node, one packet at a time. The head must reach the destination
//     PE exactly 2*(H+1) cycles after injection (H = Manhattan distance),
//     the payloads on the following cycles, unchanged, and no other PE may
//     see anything.
//  2. Back-to-back: two packets from one node with no gap between them.
//  3. Parallel: every node of columns 0..2 sends to its East neighbour in
//     the same cycle; all packets arrive together.
//  4. Contention: a packet from (0,1) and one injected by (1,1) itself meet
//     at router (1,1) in the same cycle, both bound for (1,1)'s PE. The PE
//     input has priority: its packet arrives, the other is dropped.
//  5. Blocked: a head reaching a router while another packet holds the
//     output it needs is dropped; the holding packet arrives intact.
// Monitors on every switch allocator count how often each mechanism
// happened (heads routed in each direction, payloads held, contention,
// blocked heads); one that never happened counts as a failure.
module tb_fdt_noc;
  import fdt_pkg::*;
  localparam int unsigned COLS = 4, ROWS = 4, NN = COLS * ROWS, W = 18;
  localparam int unsigned XW = 2, YW = 2, TAGW = W - 2 - XW - YW;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] pe_in  [NN];
  logic [W-1:0] pe_out [NN];
  int checks = 0, failures = 0;

  fdt_noc u_noc (.clk(clk), .rst_n(rst_n), .pe_in(pe_in), .pe_out(pe_out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  logic [NN*NPORTS-1:0] ev_hold, ev_contention, ev_blocked;
  logic [NN-1:0]        ev_dir [NPORTS];
  int n_dir [NPORTS];
  int n_hold = 0, n_contention = 0, n_blocked = 0, n_back_to_back = 0;

  for (genvar y = 0; y < ROWS; y++) begin : g_my
    for (genvar x = 0; x < COLS; x++) begin : g_mx
      localparam logic [4:0] PRESENT = {(y + 1 < ROWS), (x > 0), (y > 0), (x + 1 < COLS), 1'b1};
      for (genvar j = 0; j < NPORTS; j++) begin : g_mj
        localparam int K = (y * COLS + x) * NPORTS + j;
        if (PRESENT[j]) begin : g_on
          wire [NPORTS-1:0] req = u_noc.g_row[y].g_col[x].u_router.g_out[j].g_on.u_sa.request;
          wire [NPORTS-1:0] hld = u_noc.g_row[y].g_col[x].u_router.g_out[j].g_on.u_sa.hold;
          wire [NPORTS-1:0] sel = u_noc.g_row[y].g_col[x].u_router.g_out[j].g_on.u_sa.select;
          assign ev_hold[K]       = |hld;
          assign ev_contention[K] = (hld == '0) && ($countones(req) > 1);
          assign ev_blocked[K]    = (hld != '0) && (req != '0);
          assign ev_dir[j][y * COLS + x] = |(sel & ~hld);
        end else begin : g_off
          assign ev_hold[K]       = 1'b0;
          assign ev_contention[K] = 1'b0;
          assign ev_blocked[K]    = 1'b0;
          assign ev_dir[j][y * COLS + x] = 1'b0;
        end
      end
    end
  end

  initial for (int j = 0; j < NPORTS; j++) n_dir[j] = 0;

  always @(posedge clk) if (rst_n) begin
    n_hold       <= n_hold + $countones(ev_hold);
    n_contention <= n_contention + $countones(ev_contention);
    n_blocked    <= n_blocked + $countones(ev_blocked);
    for (int j = 0; j < NPORTS; j++) n_dir[j] <= n_dir[j] + $countones(ev_dir[j]);
  end

  // ------------------------------------------------------------------ helpers
  function automatic logic [W-1:0] head(int d, int tag);
    return {2'b10, XW'(d % COLS), YW'(d / COLS), TAGW'(tag)};
  endfunction

  function automatic logic [W-1:0] pay(int data);
    return {2'b11, 16'(data)};
  endfunction

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % COLS) - (d % COLS);
    dy = (s / COLS) - (d / COLS);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  // expected phit at every PE output, per negedge offset, filled per scenario
  logic [W-1:0] exp_q [NN][$];

  task automatic clear_expect();
    for (int n = 0; n < NN; n++) exp_q[n].delete();
  endtask

  // schedule phit p to appear at PE n at negedge offset t (0 = now)
  task automatic expect_at(int n, int t, logic [W-1:0] p);
    while (exp_q[n].size() <= t) exp_q[n].push_back('0);
    exp_q[n][t] = p;
  endtask

  // compare all PE outputs at each of the next `cycles` negedges
  task automatic check_window(int cycles, string what);
    for (int c = 0; c < cycles; c++) begin
      bit bad;
      @(negedge clk);
      bad = 0;
      for (int n = 0; n < NN; n++) begin
        logic [W-1:0] e;
        e = (exp_q[n].size() > 0) ? exp_q[n].pop_front() : '0;
        if (pe_out[n] !== e) begin
          bad = 1;
          $display("%s: cycle %0d PE %0d got %h expected %h", what, c + 1, n, pe_out[n], e);
        end
      end
      checks++;
      if (bad) failures++;
    end
  endtask

  // drive packet phits on pe_in[s], one per negedge starting now
  task automatic drive(int s, logic [W-1:0] ph [$]);
    foreach (ph[k]) begin
      pe_in[s] = ph[k];
      @(negedge clk);
    end
    pe_in[s] = '0;
  endtask

  // ----------------------------------------------------------------- scenario
  initial begin
    for (int n = 0; n < NN; n++) pe_in[n] = '0;
    clear_expect();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. all-to-all, one packet at a time
    for (int s = 0; s < NN; s++)
      for (int d = 0; d < NN; d++) begin
        automatic logic [W-1:0] ph [$];
        automatic int len, lat;
        len = 1 + (s * 7 + d) % 4;
        ph.push_back(head(d, s * NN + d));
        for (int k = 0; k < len; k++) ph.push_back(pay($urandom));
        lat = 2 * (hops(s, d) + 1);
        clear_expect();
        foreach (ph[k]) expect_at(d, lat + k - 1, ph[k]);
        fork
          drive(s, ph);
          check_window(lat + len + 2, "all-to-all");
        join
      end

    // 2. back-to-back packets from node 5 to nodes 15 and 0
    begin
      logic [W-1:0] ph [$];
      clear_expect();
      ph.push_back(head(15, 1)); ph.push_back(pay('h0101)); ph.push_back(pay('h0202));
      ph.push_back(head(0, 2));  ph.push_back(pay('h0303));
      for (int k = 0; k < 3; k++) expect_at(15, 2 * (hops(5, 15) + 1) + k - 1, ph[k]);
      for (int k = 3; k < 5; k++) expect_at(0, 2 * (hops(5, 0) + 1) + k - 1, ph[k]);
      n_back_to_back++;
      fork
        drive(5, ph);
        check_window(16, "back-to-back");
      join
    end

    // 3. parallel: columns 0..2 send East one hop, all in the same cycle.
    //    Expectations count from the second negedge after injection.
    clear_expect();
    for (int n = 0; n < NN; n++)
      if (n % COLS != COLS - 1) begin
        expect_at(n + 1, 1, head(n + 1, n));
        expect_at(n + 1, 2, pay(n * 3));
      end
    for (int n = 0; n < NN; n++) if (n % COLS != COLS - 1) pe_in[n] = head(n + 1, n);
    @(negedge clk);
    for (int n = 0; n < NN; n++) if (n % COLS != COLS - 1) pe_in[n] = pay(n * 3);
    @(negedge clk);
    for (int n = 0; n < NN; n++) pe_in[n] = '0;
    check_window(6, "parallel");

    // 4. contention at router (1,1) = node 5: packet A from node 4 (one hop
    //    West) injected two cycles before packet B from node 5 itself
    begin
      logic [W-1:0] pa [$];
      logic [W-1:0] pb [$];
      clear_expect();
      pa.push_back(head(5, 16'h0AA)); pa.push_back(pay('hA1)); pa.push_back(pay('hA2));
      pb.push_back(head(5, 16'h0BB)); pb.push_back(pay('hB1)); pb.push_back(pay('hB2));
      // B (PE input, port 0) wins: it appears 2 cycles after its injection
      for (int k = 0; k < 3; k++) expect_at(5, 2 + 2 + k - 1, pb[k]);
      fork
        drive(4, pa);
        begin repeat (2) @(negedge clk); drive(5, pb); end
        check_window(14, "contention");
      join
    end

    // 5. blocked: A from node 0 to node 3 (4 payloads) holds router 1's East
    //    output; B from node 1 to node 2 arrives there meanwhile and is lost
    begin
      logic [W-1:0] pa [$];
      logic [W-1:0] pb [$];
      clear_expect();
      pa.push_back(head(3, 16'h0CC));
      for (int k = 0; k < 4; k++) pa.push_back(pay('hC0 + k));
      pb.push_back(head(2, 16'h0DD)); pb.push_back(pay('hD1));
      foreach (pa[k]) expect_at(3, 2 * (hops(0, 3) + 1) + k - 1, pa[k]);
      fork
        drive(0, pa);
        begin repeat (3) @(negedge clk); drive(1, pb); end
        check_window(20, "blocked");
      join
    end

    // mechanism coverage
    for (int j = 0; j < NPORTS; j++) begin
      checks++;
      if (n_dir[j] == 0) begin failures++; $display("no head routed to port %0d", j); end
    end
    checks++; if (n_hold == 0)         begin failures++; $display("hold never happened"); end
    checks++; if (n_contention == 0)   begin failures++; $display("contention never happened"); end
    checks++; if (n_blocked == 0)      begin failures++; $display("blocking never happened"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("no back-to-back packets"); end
    $display("heads routed PE/E/N/W/S: %0d/%0d/%0d/%0d/%0d", n_dir[0], n_dir[1], n_dir[2],
             n_dir[3], n_dir[4]);
    $display("held payload cycles %0d, contention %0d, blocked heads %0d, back-to-back %0d",
             n_hold, n_contention, n_blocked, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
