// tb_fdt_noc_sweep: the default-sized 4x4 mesh with X-Y and with North-Last
// routing, under uniform random traffic at injection rates of 0.01, 0.03,
// 0.05 and 0.08 packets per node per cycle (2000 packets of 1..4 payload
// phits each, after an all-to-all pass). Every delivered packet must be
// intact, at the right PE and exactly 2*(H+1) cycles late; the share of
// dropped packets at each rate is reported.
module tb_fdt_noc_sweep;
  import fdt_pkg::*;
  localparam int NCFG = 8;
  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] done;
  int ck [NCFG];
  int fl [NCFG];
  int checks, failures;

  always #5 clk = ~clk;

  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_XY), .NPKT(2000), .RATE_PERMIL(10)) t0 (clk, rst_n, done[0], ck[0], fl[0]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_XY), .NPKT(2000), .RATE_PERMIL(30)) t1 (clk, rst_n, done[1], ck[1], fl[1]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_XY), .NPKT(2000), .RATE_PERMIL(50)) t2 (clk, rst_n, done[2], ck[2], fl[2]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_XY), .NPKT(2000), .RATE_PERMIL(80)) t3 (clk, rst_n, done[3], ck[3], fl[3]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_NL), .NPKT(2000), .RATE_PERMIL(10)) t4 (clk, rst_n, done[4], ck[4], fl[4]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_NL), .NPKT(2000), .RATE_PERMIL(30)) t5 (clk, rst_n, done[5], ck[5], fl[5]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_NL), .NPKT(2000), .RATE_PERMIL(50)) t6 (clk, rst_n, done[6], ck[6], fl[6]);
  noc_traffic #(.COLS(4), .ROWS(4), .ROUTING(RA_NL), .NPKT(2000), .RATE_PERMIL(80)) t7 (clk, rst_n, done[7], ck[7], fl[7]);

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
