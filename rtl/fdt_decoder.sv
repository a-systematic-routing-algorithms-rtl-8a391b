// fdt_decoder: the decoder of switch allocator OUT_PORT.
//
// For each of the five inputs it looks at the 2-bit phit type (PT) and the
// final destination address (FDA = {x, y}) at the top of the phit held in
// that input register:
//   payload[i] = (PT == 2'b11)
//   request[i] = (PT == 2'b10) && f_i,OUT_PORT(FDA, local address)
// The functions f_ij come from fdt_pkg::route_match for the chosen routing
// algorithm. Purely combinational; the local address is an input so one
// description serves every node of a mesh. The head/payload comparisons and
// the use of f_ij are the FDT method's; the idle code 2'b00 and the
// position of PT and FDA in the phit are this design's choice.
module fdt_decoder
  import fdt_pkg::*;
#(
  parameter int unsigned XW       = 2,
  parameter int unsigned YW       = 2,
  parameter int unsigned OUT_PORT = 0,
  parameter routing_e    ROUTING  = RA_XY
) (
  input  logic [1:0]       pt      [NPORTS],
  input  logic [XW+YW-1:0] fda     [NPORTS],
  input  logic [XW-1:0]    xlocal,
  input  logic [YW-1:0]    ylocal,
  output logic [NPORTS-1:0] request,
  output logic [NPORTS-1:0] payload
);

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      payload[i] = (pt[i] == PT_PAYLOAD);
      request[i] = (pt[i] == PT_HEAD) &&
                   route_match(ROUTING, i, OUT_PORT,
                               int'(fda[i][XW+YW-1:YW]), int'(fda[i][YW-1:0]),
                               int'(xlocal), int'(ylocal));
    end
  end

endmodule
