// fdt_noc: COLS x ROWS mesh of Final-Destination-Tag (FDT) routers.
//
// Node n = y*COLS + x sits at column x (growing towards East) and row y
// (growing towards South). Each node has one fdt_router; its port 0 is the
// node's processing element (PE), brought out as pe_in[n] / pe_out[n]. The
// routers' East/West and North/South ports are wired to their neighbours:
//   out[East]  of (x,y) -> in[West]  of (x+1,y)
//   out[North] of (x,y) -> in[South] of (x,y-1)
// and likewise in the other two directions. Routers on the mesh edge are
// built with only the ports they use (PORTS parameter of fdt_router): 4-port
// routers on the edges, 3-port routers in the corners. The inputs of their
// missing ports are tied to the idle phit; no routing function sends a
// packet towards a missing port because destinations lie inside the mesh.
//
// A packet is injected at pe_in[src] as a head phit, PT = 2'b10 and FDA =
// {x_dest, y_dest} in the bits right below PT, followed by zero or more
// back-to-back payload phits (PT = 2'b11); idle is all zeros. The FDA has
// clog2(COLS) + clog2(ROWS) bits, 4 bits for the default 4 x 4 mesh. A head
// that is not blocked reaches pe_out[dst] 2*(H+1) cycles after injection,
// H being the number of links crossed; its payloads follow one per cycle.
// There is no flow control: a packet that loses arbitration at some router,
// or finds its output held by another packet, is dropped there.
// The mesh of five-port FDT routers and the address width follow the FDT
// method; the node numbering, the edge-port handling and the 4 x 4 default
// are this design's choices.
module fdt_noc
  import fdt_pkg::*;
#(
  parameter int unsigned COLS    = 4,
  parameter int unsigned ROWS    = 4,
  parameter int unsigned W       = 18,
  parameter routing_e    ROUTING = RA_XY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] pe_in  [COLS*ROWS],
  output logic [W-1:0] pe_out [COLS*ROWS]
);

  localparam int unsigned XW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned YW = (ROWS > 1) ? $clog2(ROWS) : 1;

  // r_in[n][p] / r_out[n][p]: phit entering / leaving router n on port p
  logic [W-1:0] r_in  [COLS*ROWS][NPORTS];
  logic [W-1:0] r_out [COLS*ROWS][NPORTS];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned N = y * COLS + x;

      assign r_in[N][PORT_PE] = pe_in[N];
      assign pe_out[N]        = r_out[N][PORT_PE];

      if (x + 1 < COLS) begin : g_e
        assign r_in[N][PORT_EAST] = r_out[N+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in[N][PORT_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[N][PORT_WEST] = r_out[N-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in[N][PORT_WEST] = '0;
      end
      if (y > 0) begin : g_n
        assign r_in[N][PORT_NORTH] = r_out[N-COLS][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in[N][PORT_NORTH] = '0;
      end
      if (y + 1 < ROWS) begin : g_s
        assign r_in[N][PORT_SOUTH] = r_out[N+COLS][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in[N][PORT_SOUTH] = '0;
      end

      localparam logic [4:0] PORTS = {(y + 1 < ROWS), (x > 0), (y > 0), (x + 1 < COLS), 1'b1};

      fdt_router #(.W(W), .XW(XW), .YW(YW), .ROUTING(ROUTING), .PORTS(PORTS)) u_router (
        .clk(clk), .rst_n(rst_n),
        .xlocal(XW'(x)), .ylocal(YW'(y)),
        .in(r_in[N]), .out(r_out[N])
      );
    end
  end

endmodule
