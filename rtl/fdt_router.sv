// fdt_router: five-port Final-Destination-Tag (FDT) mesh router.
//
// Ports: 0 = local PE, 1 = East, 2 = North, 3 = West, 4 = South; in[i] is
// the phit arriving from that side, out[j] the phit leaving towards it.
// Structure (one phit per port per cycle, no buffers):
//   in[i] -> input register -> five 5-1 MUXs -> output register -> out[j]
// Switch allocator j looks at PT and FDA of all five input registers and
// drives the select of MUX j (see fdt_switch_allocator). Unlike a
// destination-tag router there is no shifter: the header is forwarded
// unchanged, because every router decides from the final destination.
//
// Timing: a phit presented on in[i] in cycle t appears on out[j] in cycle
// t+2 (one cycle per register). A packet is a head phit followed by
// back-to-back payload phits; the output stays connected while payloads
// follow. There is no flow control between routers: a head that loses
// arbitration, or meets an output already held by another packet, is not
// forwarded, and neither are its payload phits.
//
// PORTS (bit p = port p present) turns the same description into the 3-port
// and 4-port routers of the mesh corners and edges: an absent port has no
// input register, allocator, MUX or output register; its input is ignored
// and its output is held idle.
//
// Phit layout (W bits): [W-1:W-2] PT, and in a head [W-3 -: XW+YW] the FDA,
// x in the upper XW bits. Payload phits carry W-2 data bits.
// The register / allocator / MUX structure and the 18-bit width follow the
// FDT router; the bit positions, the address inputs and the absence of flow
// control are this design's choices.
module fdt_router
  import fdt_pkg::*;
#(
  parameter int unsigned W       = 18,
  parameter int unsigned XW      = 2,
  parameter int unsigned YW      = 2,
  parameter routing_e    ROUTING = RA_XY,
  parameter logic [4:0]  PORTS   = 5'b11111
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] xlocal,
  input  logic [YW-1:0] ylocal,
  input  logic [W-1:0]  in  [NPORTS],
  output logic [W-1:0]  out [NPORTS]
);

  localparam int unsigned FW = XW + YW;

  logic [W-1:0]      in_q   [NPORTS];
  logic [W-1:0]      mux_o  [NPORTS];
  logic [1:0]        pt     [NPORTS];
  logic [FW-1:0]     fda    [NPORTS];
  logic [NPORTS-1:0] select [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    if (PORTS[i]) begin : g_on
      phit_reg #(.W(W)) u_in_reg (.clk(clk), .rst_n(rst_n), .d(in[i]), .q(in_q[i]));
    end else begin : g_off
      assign in_q[i] = '0;
    end
    assign pt[i]  = in_q[i][W-1 -: 2];
    assign fda[i] = in_q[i][W-3 -: FW];
  end

  for (genvar j = 0; j < NPORTS; j++) begin : g_out
    if (PORTS[j]) begin : g_on
      fdt_switch_allocator #(.XW(XW), .YW(YW), .OUT_PORT(j), .ROUTING(ROUTING)) u_sa (
        .clk(clk), .rst_n(rst_n), .pt(pt), .fda(fda),
        .xlocal(xlocal), .ylocal(ylocal),
        .select(select[j]), .request(), .hold()
      );
      phit_mux #(.W(W), .N(NPORTS)) u_mux (.in(in_q), .select(select[j]), .out(mux_o[j]));
      phit_reg #(.W(W)) u_out_reg (.clk(clk), .rst_n(rst_n), .d(mux_o[j]), .q(out[j]));
    end else begin : g_off
      assign select[j] = '0;
      assign mux_o[j]  = '0;
      assign out[j]    = '0;
    end
  end

  // With a deterministic routing function a head matches exactly one output,
  // so no input is ever switched to two outputs at once.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] used_by;
    for (genvar j = 0; j < NPORTS; j++) begin : g_col
      assign used_by[j] = select[j][i];
    end
    a_input_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(used_by))
      else $error("router (%0d,%0d): input %0d switched to several outputs", xlocal, ylocal, i);
  end

endmodule
