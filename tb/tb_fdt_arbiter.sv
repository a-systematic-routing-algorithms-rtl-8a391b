// tb_fdt_arbiter: all request patterns with the enable high and low; the
// grant must be the lowest-numbered request (port 0 first) or nothing.
module tb_fdt_arbiter;
  localparam int unsigned N = 5;
  logic en;
  logic [N-1:0] request, grant, exp_grant;
  int checks = 0, failures = 0;

  fdt_arbiter #(.N(N)) dut (.en(en), .request(request), .grant(grant));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < (1 << N); r++) begin
        en = e[0];
        request = N'(r);
        exp_grant = '0;
        if (en) begin
          for (int i = 0; i < int'(N); i++)
            if (request[i] && exp_grant == '0) exp_grant[i] = 1'b1;
        end
        #1;
        checks++;
        if (grant !== exp_grant) begin
          failures++;
          $display("en=%b request=%b grant=%b expected %b", en, request, grant, exp_grant);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
