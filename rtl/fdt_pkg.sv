// fdt_pkg: types, constants and the routing functions shared by the
// Final-Destination-Tag (FDT) router and mesh.
//
// In the FDT scheme a packet header carries only the final destination
// address (FDA = {x, y}) instead of a list of per-hop port numbers. Every
// switch allocator j of a router evaluates a function f_ij of (FDA, local
// address) for each input port i; a head phit requests output j when f_ij is
// true. This package holds those functions for the three routing algorithms
// the scheme is given for: X-Y, West-First (W-F) and North-Last (N-L).
//
// Coordinates: x grows towards East, y grows towards South (a phit whose
// yFDA < ylocal goes North). Port numbering follows the router: 0 = PE,
// 1 = East, 2 = North, 3 = West, 4 = South.
//
// Phit type (PT, two bits at the top of each phit): 2'b10 head, 2'b11
// payload. The head and payload codes are the ones the decoder compares
// against; 2'b00 (idle) and 2'b01 (unused) are this design's choice and both
// mean "no phit".
//
// The X-Y, W-F and N-L functions follow the FDT method, with one exception.
// In the usual statement of N-L for this scheme, f_04, f_14, f_34 and f_44
// also require xFDA <= xlocal. That leaves a destination to the south-east
// of a node matched by no allocator. Here those four functions are
// (yFDA > ylocal) alone, so every destination matches exactly one output.
package fdt_pkg;

  localparam int unsigned NPORTS = 5;

  localparam int unsigned PORT_PE    = 0;
  localparam int unsigned PORT_EAST  = 1;
  localparam int unsigned PORT_NORTH = 2;
  localparam int unsigned PORT_WEST  = 3;
  localparam int unsigned PORT_SOUTH = 4;

  typedef enum logic [1:0] {
    PT_IDLE    = 2'b00,
    PT_UNUSED  = 2'b01,
    PT_HEAD    = 2'b10,
    PT_PAYLOAD = 2'b11
  } pt_e;

  typedef enum logic [1:0] {
    RA_XY = 2'd0,   // dimension-ordered X then Y
    RA_WF = 2'd1,   // West-First
    RA_NL = 2'd2    // North-Last
  } routing_e;

  // f_ij: true when a head phit that entered on port `in_port` and is bound
  // for (xfda, yfda) may leave router (xl, yl) on output `out_port`.
  function automatic logic route_match(routing_e ra, int unsigned in_port,
                                       int unsigned out_port,
                                       int unsigned xfda, int unsigned yfda,
                                       int unsigned xl, int unsigned yl);
    logic xeq, xgt, xlt, yeq, ygt, ylt;
    logic r;
    xeq = (xfda == xl);
    xgt = (xfda >  xl);
    xlt = (xfda <  xl);
    yeq = (yfda == yl);
    ygt = (yfda >  yl);
    ylt = (yfda <  yl);
    r = 1'b0;
    if (out_port == PORT_PE) begin
      r = xeq && yeq;
    end else begin
      unique case (ra)
        RA_WF: begin
          unique case (out_port)
            PORT_EAST:
              if (in_port == PORT_NORTH)      r = xgt && (ygt || yeq);
              else if (in_port == PORT_SOUTH) r = xgt && (ylt || yeq);
              else                            r = xgt && yeq;
            PORT_NORTH:
              if (in_port == PORT_SOUTH)      r = xeq && ylt;
              else                            r = (xgt || xeq) && ylt;
            PORT_WEST:                        r = xlt;
            default: // South
              if (in_port == PORT_NORTH)      r = xeq && ygt;
              else                            r = (xgt || xeq) && ygt;
          endcase
        end
        RA_NL: begin
          unique case (out_port)
            PORT_EAST:
              if (in_port == PORT_NORTH)      r = xgt;
              else                            r = xgt && (ylt || yeq);
            PORT_NORTH:                       r = xeq && ylt;
            PORT_WEST:
              if (in_port == PORT_NORTH)      r = xlt;
              else                            r = xlt && (ylt || yeq);
            default: // South
              if (in_port == PORT_NORTH)      r = xeq && ygt;
              else                            r = ygt;
          endcase
        end
        default: begin // X-Y
          unique case (out_port)
            PORT_EAST:  r = xgt;
            PORT_NORTH: r = xeq && ylt;
            PORT_WEST:  r = xlt;
            default:    r = xeq && ygt;
          endcase
        end
      endcase
    end
    return r;
  endfunction

endpackage
