// ocp_req_mux: request mux of the shared OCP bus.
//
// Puts the whole request bundle (required and optional OCP master signals)
// of the granted master on the bus. With no grant the bus carries an idle
// request (MCmd IDLE, everything zero). Combinational, AND-OR structure
// selected by the arbiter's one-hot grant.
module ocp_req_mux #(
  parameter int unsigned N = 4
) (
  input  ocp_pkg::ocp_req_t req_i [N],
  input  logic [N-1:0]      grant_i,
  output ocp_pkg::ocp_req_t req_o
);

  always_comb begin
    req_o = ocp_pkg::REQ_IDLE;
    for (int unsigned i = 0; i < N; i++)
      if (grant_i[i]) req_o = req_o | req_i[i];
  end

endmodule
