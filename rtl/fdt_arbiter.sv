// fdt_arbiter: the arbiter of a switch allocator.
//
// When enabled (no input is holding the output), it grants the lowest-
// numbered requesting input: port 0 (PE) has the highest priority, port 4
// (South) the lowest, following the top-to-bottom chain of the allocator
// diagram. The fixed-priority order is this design's reading of that chain.
// With en low no grant is given. Purely combinational.
module fdt_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         en,
  input  logic [N-1:0] request,
  output logic [N-1:0] grant
);

  // isolate the lowest set request bit
  assign grant = en ? (request & (~request + 1'b1)) : '0;

endmodule
