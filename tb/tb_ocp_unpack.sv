// tb_ocp_unpack: splits random 32-bit words and byte enables into 16-bit and
// 8-bit lanes (two instances) and compares every lane and its enables with
// the expected slice.
module tb_ocp_unpack;
  logic [31:0] w;
  logic [3:0] be;
  logic [0:0] l16;
  logic [1:0] l8;
  logic [15:0] d16;
  logic [1:0] be16;
  logic [7:0] d8;
  logic [0:0] be8;
  int checks = 0, failures = 0;
  ocp_unpack #(.CORE_W(16)) dut16 (.word_i(w), .byte_en_i(be), .lane_i(l16), .lane_data_o(d16), .lane_be_o(be16));
  ocp_unpack #(.CORE_W(8))  dut8  (.word_i(w), .byte_en_i(be), .lane_i(l8),  .lane_data_o(d8),  .lane_be_o(be8));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      w = $urandom; be = 4'($urandom); l8 = 2'(i); l16 = 1'(i);
      #1;
      checks += 2;
      if (d16 != (l16 ? w[31:16] : w[15:0]) || be16 != (l16 ? be[3:2] : be[1:0])) begin
        failures++; $display("FAIL 32-to-16 lane %0d", l16);
      end
      if (d8 != (w >> (8 * l8)) % 256 || be8 != be[l8]) begin
        failures++; $display("FAIL 32-to-8 lane %0d", l8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
