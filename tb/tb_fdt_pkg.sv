// tb_fdt_pkg: checks the routing functions f_ij.
//  * X-Y: every input port, output port, destination and local address of an
//    8 x 8 range against an independent "X first, then Y" direction rule.
//  * W-F and N-L: from every source to every destination of an 8 x 8 mesh
//    the packet is walked hop by hop; at each router exactly one output must
//    match, the walk must reach the destination in the Manhattan distance,
//    W-F may take no West hop after a non-West hop and N-L may take no other
//    hop after a North hop.
//  * A few functions are checked directly where W-F and N-L differ per input.
module tb_fdt_pkg;
  import fdt_pkg::*;
  int checks = 0, failures = 0;

  function automatic int xy_dir(int xd, int yd, int xl, int yl);
    if (xd > xl) return 1;
    if (xd < xl) return 3;
    if (yd < yl) return 2;
    if (yd > yl) return 4;
    return 0;
  endfunction

  function automatic int opposite(int d);
    case (d)
      1: return 3;
      3: return 1;
      2: return 4;
      4: return 2;
      default: return 0;
    endcase
  endfunction

  task automatic expect_match(routing_e ra, int i, int j, int xd, int yd, int xl, int yl, bit e);
    checks++;
    if (route_match(ra, i, j, xd, yd, xl, yl) !== e) begin
      failures++;
      $display("ra=%0d f_%0d%0d dest(%0d,%0d) local(%0d,%0d) gave %b", ra, i, j, xd, yd, xl, yl, !e);
    end
  endtask

  task automatic walk(routing_e ra, int sx, int sy, int dx, int dy);
    int x, y, in_p, hops, nmatch, dir;
    bit turned, bad;
    x = sx; y = sy; in_p = 0; hops = 0; turned = 0; bad = 0;
    while (1) begin
      nmatch = 0; dir = -1;
      for (int j = 0; j < 5; j++)
        if (route_match(ra, in_p, j, dx, dy, x, y)) begin nmatch++; dir = j; end
      if (nmatch != 1) begin
        bad = 1;
        $display("ra=%0d (%0d,%0d)->(%0d,%0d) at (%0d,%0d) in %0d: %0d outputs match",
                 ra, sx, sy, dx, dy, x, y, in_p, nmatch);
        break;
      end
      if (dir == 0) break;
      if (ra == RA_WF && dir == 3 && turned) bad = 1;
      if (ra == RA_WF && dir != 3) turned = 1;
      if (ra == RA_NL && dir != 2 && turned) bad = 1;
      if (ra == RA_NL && dir == 2) turned = 1;
      case (dir)
        1: x++;
        3: x--;
        2: y--;
        default: y++;
      endcase
      in_p = opposite(dir);
      hops++;
      if (hops > 64 || x < 0 || y < 0 || x > 7 || y > 7) begin bad = 1; break; end
    end
    checks++;
    if (bad || x != dx || y != dy ||
        hops != ((sx > dx ? sx - dx : dx - sx) + (sy > dy ? sy - dy : dy - sy))) begin
      failures++;
      $display("ra=%0d walk (%0d,%0d)->(%0d,%0d) ended at (%0d,%0d) after %0d hops",
               ra, sx, sy, dx, dy, x, y, hops);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int xd = 0; xd < 8; xd++)
          for (int yd = 0; yd < 8; yd++)
            for (int xl = 0; xl < 8; xl += 3)
              for (int yl = 0; yl < 8; yl += 3)
                expect_match(RA_XY, i, j, xd, yd, xl, yl, xy_dir(xd, yd, xl, yl) == j);

    for (int sx = 0; sx < 8; sx++)
      for (int sy = 0; sy < 8; sy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            walk(RA_WF, sx, sy, dx, dy);
            walk(RA_NL, sx, sy, dx, dy);
          end

    // W-F East: from North y >= ylocal, from South y <= ylocal, else y == ylocal
    expect_match(RA_WF, 2, 1, 3, 3, 1, 2, 1);
    expect_match(RA_WF, 4, 1, 3, 3, 1, 2, 0);
    expect_match(RA_WF, 4, 1, 3, 1, 1, 2, 1);
    expect_match(RA_WF, 0, 1, 3, 1, 1, 2, 0);
    expect_match(RA_WF, 0, 2, 3, 1, 1, 2, 1);
    expect_match(RA_WF, 4, 2, 3, 1, 1, 2, 0);
    // N-L East: from North any y, else y <= ylocal
    expect_match(RA_NL, 2, 1, 3, 3, 1, 2, 1);
    expect_match(RA_NL, 0, 1, 3, 3, 1, 2, 0);
    expect_match(RA_NL, 0, 4, 3, 3, 1, 2, 1);
    expect_match(RA_NL, 2, 4, 3, 3, 1, 2, 0);
    expect_match(RA_NL, 3, 3, 0, 3, 1, 2, 0);
    expect_match(RA_NL, 2, 3, 0, 3, 1, 2, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
