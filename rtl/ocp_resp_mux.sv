// ocp_resp_mux: response mux of the shared OCP bus.
//
// Returns the response bundle (accepts, SResp, SData and the optional slave
// signals) of the slave picked by the decoder to the masters. With no slave
// selected the masters see a null response. Combinational, AND-OR structure
// selected by the decoder's one-hot select.
module ocp_resp_mux #(
  parameter int unsigned N = 4
) (
  input  ocp_pkg::ocp_resp_t resp_i [N],
  input  logic [N-1:0]       sel_i,
  output ocp_pkg::ocp_resp_t resp_o
);

  always_comb begin
    resp_o = ocp_pkg::RESP_NULL;
    for (int unsigned i = 0; i < N; i++)
      if (sel_i[i]) resp_o = resp_o | resp_i[i];
  end

endmodule
