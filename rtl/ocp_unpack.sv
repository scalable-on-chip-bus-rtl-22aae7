// ocp_unpack: unpacks a 32-bit OCP write word onto a narrow core bus.
//
// Lane lane_i (CORE_W bits, lane 0 least significant) of MData is put on the
// core data bus together with the MByteEn bits that cover it, so the core
// writes only the bytes the master enabled. A 32-bit word needs 32/CORE_W
// core writes, one per lane. Combinational.
//
// Unpacking 32-to-16 and 32-to-8 bits and byte enabling by MByteEn follow
// the design description; the lane order is this design's choice.
module ocp_unpack #(
  parameter  int unsigned CORE_W = 16,
  localparam int unsigned RATIO  = ocp_pkg::DATA_W / CORE_W,
  localparam int unsigned LANE_W = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic [ocp_pkg::DATA_W-1:0] word_i,
  input  logic [ocp_pkg::BE_W-1:0]   byte_en_i,
  input  logic [LANE_W-1:0]          lane_i,
  output logic [CORE_W-1:0]          lane_data_o,
  output logic [CORE_W/8-1:0]        lane_be_o
);

  assign lane_data_o = word_i[CORE_W*lane_i +: CORE_W];
  assign lane_be_o   = byte_en_i[(CORE_W/8)*lane_i +: (CORE_W/8)];

endmodule
