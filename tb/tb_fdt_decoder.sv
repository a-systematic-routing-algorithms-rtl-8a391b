// tb_fdt_decoder: five X-Y decoders (one per output) and one N-L East
// decoder see random phit types and destinations on all inputs. payload must
// follow PT == 2'b11, request must be a head whose destination lies in the
// decoder's direction, worked out here independently.
module tb_fdt_decoder;
  import fdt_pkg::*;
  localparam int unsigned XW = 2, YW = 2;
  logic [1:0]       pt  [NPORTS];
  logic [XW+YW-1:0] fda [NPORTS];
  logic [XW-1:0]    xlocal;
  logic [YW-1:0]    ylocal;
  logic [NPORTS-1:0] req [NPORTS];
  logic [NPORTS-1:0] pay [NPORTS];
  logic [NPORTS-1:0] nl_req, nl_pay;
  int checks = 0, failures = 0, requests_seen = 0;

  for (genvar j = 0; j < NPORTS; j++) begin : g_dec
    fdt_decoder #(.XW(XW), .YW(YW), .OUT_PORT(j), .ROUTING(RA_XY)) dut (
      .pt(pt), .fda(fda), .xlocal(xlocal), .ylocal(ylocal),
      .request(req[j]), .payload(pay[j])
    );
  end

  fdt_decoder #(.XW(XW), .YW(YW), .OUT_PORT(1), .ROUTING(RA_NL)) dut_nl (
    .pt(pt), .fda(fda), .xlocal(xlocal), .ylocal(ylocal),
    .request(nl_req), .payload(nl_pay)
  );

  function automatic int xy_dir(int xd, int yd, int xl, int yl);
    if (xd > xl) return 1;
    if (xd < xl) return 3;
    if (yd < yl) return 2;
    if (yd > yl) return 4;
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      xlocal = XW'($urandom);
      ylocal = YW'($urandom);
      for (int i = 0; i < 5; i++) begin
        pt[i]  = 2'($urandom);
        fda[i] = 4'($urandom);
      end
      #1;
      for (int j = 0; j < 5; j++) begin
        for (int i = 0; i < 5; i++) begin
          bit e_req, e_pay;
          e_pay = (pt[i] == 2'b11);
          e_req = (pt[i] == 2'b10) &&
                  (xy_dir(int'(fda[i][3:2]), int'(fda[i][1:0]), int'(xlocal), int'(ylocal)) == j);
          checks++;
          if (req[j][i] !== e_req || pay[j][i] !== e_pay) begin
            failures++;
            $display("out %0d in %0d pt=%b fda=%b local=(%0d,%0d): req=%b pay=%b",
                     j, i, pt[i], fda[i], xlocal, ylocal, req[j][i], pay[j][i]);
          end
          if (e_req) requests_seen++;
        end
      end
      // N-L East: input 2 (from North) needs only xFDA > xlocal, the others
      // also yFDA <= ylocal
      for (int i = 0; i < 5; i++) begin
        bit e_req;
        e_req = (pt[i] == 2'b10) && (fda[i][3:2] > xlocal) &&
                (i == 2 || fda[i][1:0] <= ylocal);
        checks++;
        if (nl_req[i] !== e_req) begin
          failures++;
          $display("N-L east in %0d fda=%b local=(%0d,%0d): req=%b", i, fda[i], xlocal, ylocal, nl_req[i]);
        end
      end
    end
    checks++;
    if (requests_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
