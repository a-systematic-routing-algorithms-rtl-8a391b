// phit_reg: the W-bit phit register that sits on every router input and
// output. It captures the phit on each rising clock edge, so a phit spends
// one cycle in the input register and one in the output register of each
// router it crosses. An asynchronous active-low reset clears it to all
// zeros, which is the idle phit type (PT = 2'b00); the reset style is this
// design's choice.
module phit_reg #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
