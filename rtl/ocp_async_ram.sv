// ocp_async_ram: the memory core behind each OCP slave.
//
// DEPTH words of WIDTH bits (64 x 16 by default) with an asynchronous
// (combinational) read port and a synchronous write port with one enable per
// byte. The contents are not reset. Written as an array so that synthesis
// can map it to distributed or block RAM.
//
// The size and the asynchronous read follow the design description; the
// byte enables are this design's choice, so that MByteEn can reach the core.
module ocp_async_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     we,
  input  logic [WIDTH/8-1:0]       be,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < WIDTH / 8; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
  end

  assign rdata = mem[addr];

endmodule
