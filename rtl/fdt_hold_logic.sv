// fdt_hold_logic: the hold logic of a switch allocator.
//
// A head phit that won arbitration must keep its output until the payload
// phits behind it have passed (wormhole switching without a tail code). For
// each input i:
//   select[i] = grant[i] | hold[i]
//   last[i]   <= select[i]            (one register per input)
//   hold[i]   = last[i] & payload[i]
//   en        = ~|hold                (arbiter enable)
// So the input that was selected last cycle stays selected for as long as it
// keeps presenting payload phits; the packet ends at the first phit that is
// not a payload (idle, or the next head). The registers reset to zero
// (asynchronous, active low), which is this design's choice.
module fdt_hold_logic #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] grant,
  input  logic [N-1:0] payload,
  output logic [N-1:0] hold,
  output logic [N-1:0] select,
  output logic         en
);

  logic [N-1:0] last;

  assign hold   = last & payload;
  assign en     = ~|hold;
  assign select = grant | hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= '0;
    else        last <= select;
  end

endmodule
