// tb_fdt_noc_80tile: an 8-column x 10-row X-Y mesh (80 nodes, 3+4 address
// bits) driven by noc_traffic: all-to-all (all 6400 packets must arrive,
// intact, with latency 2*(H+1)), then 10000 random packets of 1..4 payload
// phits at 0.02 packets per node per cycle (arrivals checked, drops counted).
module tb_fdt_noc_80tile;
  import fdt_pkg::*;
  localparam int NCFG = 1;
  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] done;
  int ck [NCFG];
  int fl [NCFG];
  int checks, failures;

  always #5 clk = ~clk;

  noc_traffic #(.COLS(8), .ROWS(10), .ROUTING(RA_XY), .NPKT(10000), .RATE_PERMIL(20)) t0 (clk, rst_n, done[0], ck[0], fl[0]);

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
