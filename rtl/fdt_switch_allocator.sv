// fdt_switch_allocator: switch allocator j of the FDT router, controlling the
// 5-1 MUX of output OUT_PORT.
//
// decoder -> arbiter -> hold logic. Every cycle the decoder marks the inputs
// holding a head phit whose destination satisfies f_ij (request) and the
// inputs holding a payload phit (payload). If no input is holding the output,
// the arbiter grants one request; the hold logic then keeps that input
// selected while its payload phits follow. select is one-hot or zero and is
// valid in the same cycle as the phits in the input registers (combinational
// from the input registers and the allocator's own hold registers).
// The five allocators of a router are identical except for OUT_PORT, which
// picks the functions f_ij. The decoder / arbiter / hold-logic structure is
// the FDT method's; request and hold are extra outputs for observation.
module fdt_switch_allocator
  import fdt_pkg::*;
#(
  parameter int unsigned XW       = 2,
  parameter int unsigned YW       = 2,
  parameter int unsigned OUT_PORT = 0,
  parameter routing_e    ROUTING  = RA_XY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        pt     [NPORTS],
  input  logic [XW+YW-1:0]  fda    [NPORTS],
  input  logic [XW-1:0]     xlocal,
  input  logic [YW-1:0]     ylocal,
  output logic [NPORTS-1:0] select,
  output logic [NPORTS-1:0] request,
  output logic [NPORTS-1:0] hold
);

  logic [NPORTS-1:0] payload, grant;
  logic              en;

  fdt_decoder #(.XW(XW), .YW(YW), .OUT_PORT(OUT_PORT), .ROUTING(ROUTING)) u_dec (
    .pt(pt), .fda(fda), .xlocal(xlocal), .ylocal(ylocal),
    .request(request), .payload(payload)
  );

  fdt_arbiter #(.N(NPORTS)) u_arb (
    .en(en), .request(request), .grant(grant)
  );

  fdt_hold_logic #(.N(NPORTS)) u_hold (
    .clk(clk), .rst_n(rst_n), .grant(grant), .payload(payload),
    .hold(hold), .select(select), .en(en)
  );

  a_select_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(select))
    else $error("allocator %0d selects more than one input", OUT_PORT);

endmodule
