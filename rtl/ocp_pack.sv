// ocp_pack: packs narrow core read data into a 32-bit OCP data word.
//
// The slave's core bus is CORE_W bits wide (8, 16 or 32). A read of one
// 32-bit OCP word takes 32/CORE_W core reads; each one is stored with
// load_i into lane lane_i (lane 0 is the least significant). clear_i empties
// the word before a new one is gathered; clear_i and load_i in the same
// cycle leave only the new lane set. word_o is the registered result.
//
// Packing 8-to-32 and 16-to-32 bits follows the design description; the
// little-endian lane order is this design's choice.
module ocp_pack #(
  parameter  int unsigned CORE_W = 16,
  localparam int unsigned RATIO  = ocp_pkg::DATA_W / CORE_W,
  localparam int unsigned LANE_W = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear_i,
  input  logic                          load_i,
  input  logic [LANE_W-1:0]             lane_i,
  input  logic [CORE_W-1:0]             lane_data_i,
  output logic [ocp_pkg::DATA_W-1:0]    word_o
);

  logic [ocp_pkg::DATA_W-1:0] word_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_q <= '0;
    end else begin
      if (clear_i) word_q <= '0;
      if (load_i)  word_q[CORE_W*lane_i +: CORE_W] <= lane_data_i;
    end
  end

  assign word_o = word_q;

endmodule
