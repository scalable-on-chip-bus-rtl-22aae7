// tb_ocp_resp_mux: random response bundles on four inputs; the output must be
// the bundle of the one selected slave, or a null response with no select.
module tb_ocp_resp_mux;
  import ocp_pkg::*;
  ocp_resp_t in [4];
  ocp_resp_t out;
  logic [3:0] grant;
  int checks = 0, failures = 0;
  ocp_resp_mux #(.N(4)) dut (.resp_i(in), .sel_i(grant), .resp_o(out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int m = 0; m < 4; m++) begin
        logic [$bits(ocp_resp_t)-1:0] v;
        for (int b = 0; b < $bits(ocp_resp_t); b += 32) v[b +: 32] = $urandom;
        in[m] = ocp_resp_t'(v);
      end
      grant = (i % 5 == 4) ? 4'b0 : 4'(1 << (i % 4));
      #1;
      checks++;
      if (out != ((grant == 0) ? RESP_NULL : in[i % 4])) begin
        failures++;
        $display("FAIL grant=%b", grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
