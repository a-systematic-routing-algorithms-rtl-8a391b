// phit_mux: the 5-1 MUX in front of each router output. It passes the phit of
// the input whose select bit is set; with no bit set it outputs the idle phit
// (all zeros), so an unused output carries PT = 2'b00. select comes from the
// output's switch allocator and is one-hot or zero. Combinational.
// One such MUX per output is part of the FDT router; the idle output for an
// empty select is this design's choice.
module phit_mux #(
  parameter int unsigned W = 18,
  parameter int unsigned N = 5
) (
  input  logic [W-1:0] in  [N],
  input  logic [N-1:0] select,
  output logic [W-1:0] out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++)
      if (select[i]) out = out | in[i];
  end

endmodule
