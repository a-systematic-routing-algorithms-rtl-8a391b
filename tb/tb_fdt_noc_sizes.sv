// tb_fdt_noc_sizes: X-Y meshes of 3x3, 5x5, 6x6 and 7x7 nodes, each driven by
// noc_traffic: all-to-all (every packet must arrive, intact, with latency
// 2*(H+1)), then 10000 random packets of 1..4 payload phits at an injection
// rate of 0.02 packets per node per cycle (arrivals checked, drops counted).
// All instances share one clock; the test ends when all are done.
module tb_fdt_noc_sizes;
  import fdt_pkg::*;
  localparam int NCFG = 4;
  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] done;
  int ck [NCFG];
  int fl [NCFG];
  int checks, failures;

  always #5 clk = ~clk;

  noc_traffic #(.COLS(3), .ROWS(3),  .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t0 (clk, rst_n, done[0], ck[0], fl[0]);
  noc_traffic #(.COLS(5), .ROWS(5),  .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t1 (clk, rst_n, done[1], ck[1], fl[1]);
  noc_traffic #(.COLS(6), .ROWS(6),  .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t2 (clk, rst_n, done[2], ck[2], fl[2]);
  noc_traffic #(.COLS(7), .ROWS(7),  .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t3 (clk, rst_n, done[3], ck[3], fl[3]);

  initial begin
    repeat (400000) @(posedge clk);
    failures = 1;
    for (int i = 0; i < NCFG; i++) if (!done[i]) $display("configuration %0d not done", i);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
