// ocp_decoder: slave select decoder of the shared OCP bus.
//
// The two least significant bits of MAddr name the slave; the remaining bits
// are the word address inside that slave. While the bus is owned (valid_i,
// any grant) the decoder turns those bits into a one-hot select for the
// slaves and for the response mux. It is purely combinational.
//
// The use of the MAddr lsbs as slave number follows the design description;
// decoding on bus ownership rather than on MCmd (so that a master can see
// the target slave's SThreadBusy before it issues a command) is this
// design's choice.
module ocp_decoder #(
  parameter int unsigned N = 4
) (
  input  logic                      valid_i,
  input  logic [ocp_pkg::ADDR_W-1:0] addr_i,
  output logic [N-1:0]              sel_o
);

  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1;

  always_comb begin
    sel_o = '0;
    if (valid_i && (int'(addr_i[SEL_W-1:0]) < N)) sel_o[addr_i[SEL_W-1:0]] = 1'b1;
  end

endmodule
