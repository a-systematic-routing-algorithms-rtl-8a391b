// tb_fdt_noc_algos: 4x4 and 8x8 meshes with X-Y (8x8 only), West-First and
// North-Last routing, each driven by noc_traffic: all-to-all (every packet
// must arrive, intact, with the minimal latency 2*(H+1)), then 10000 random
// packets of 1..4 payload phits at 0.02 packets per node per cycle
// (arrivals checked, drops counted). The instances share one clock.
module tb_fdt_noc_algos;
  import fdt_pkg::*;
  localparam int NCFG = 5;
  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] done;
  int ck [NCFG];
  int fl [NCFG];
  int checks, failures;

  always #5 clk = ~clk;

  noc_traffic #(.COLS(4), .ROWS(4),  .ROUTING(RA_WF), .NPKT(10000), .RATE_PERMIL(20)) t0 (clk, rst_n, done[0], ck[0], fl[0]);
  noc_traffic #(.COLS(4), .ROWS(4),  .ROUTING(RA_NL), .NPKT(10000), .RATE_PERMIL(20)) t1 (clk, rst_n, done[1], ck[1], fl[1]);
  noc_traffic #(.COLS(8), .ROWS(8),  .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t2 (clk, rst_n, done[2], ck[2], fl[2]);
  noc_traffic #(.COLS(8), .ROWS(8),  .ROUTING(RA_WF), .NPKT(10000), .RATE_PERMIL(20)) t3 (clk, rst_n, done[3], ck[3], fl[3]);
  noc_traffic #(.COLS(8), .ROWS(8),  .ROUTING(RA_NL), .NPKT(10000), .RATE_PERMIL(20)) t4 (clk, rst_n, done[4], ck[4], fl[4]);

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
