// tb_phit_mux: random phits on five inputs; for every one-hot select the
// output must equal the chosen input, and with no select the idle phit.
module tb_phit_mux;
  localparam int unsigned W = 18, N = 5;
  logic [W-1:0] in [N];
  logic [N-1:0] select;
  logic [W-1:0] out, exp_out;
  int checks = 0, failures = 0;

  phit_mux #(.W(W), .N(N)) dut (.in(in), .select(select), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < N; i++) in[i] = W'($urandom);
      for (int s = -1; s < int'(N); s++) begin
        select = (s < 0) ? '0 : N'(1 << s);
        exp_out = (s < 0) ? '0 : in[s];
        #1;
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("select=%b out=%h expected %h", select, out, exp_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
