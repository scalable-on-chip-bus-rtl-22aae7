// tb_ocp_req_mux: random request bundles on four inputs; the output must be
// the bundle of the one granted master, or an idle request with no grant.
module tb_ocp_req_mux;
  import ocp_pkg::*;
  ocp_req_t in [4];
  ocp_req_t out;
  logic [3:0] grant;
  int checks = 0, failures = 0;
  ocp_req_mux #(.N(4)) dut (.req_i(in), .grant_i(grant), .req_o(out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int m = 0; m < 4; m++) begin
        logic [$bits(ocp_req_t)-1:0] v;
        for (int b = 0; b < $bits(ocp_req_t); b += 32) v[b +: 32] = $urandom;
        in[m] = ocp_req_t'(v);
      end
      grant = (i % 5 == 4) ? 4'b0 : 4'(1 << (i % 4));
      #1;
      checks++;
      if (out != ((grant == 0) ? REQ_IDLE : in[i % 4])) begin
        failures++;
        $display("FAIL grant=%b", grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
