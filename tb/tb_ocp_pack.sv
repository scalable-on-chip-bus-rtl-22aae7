// tb_ocp_pack: gathers random 32-bit words from 16-bit and 8-bit lanes (two
// instances) in random lane order and checks the packed word, and that
// clear empties it.
module tb_ocp_pack;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr16 = 0, ld16 = 0, clr8 = 0, ld8 = 0;
  logic [0:0] lane16 = 0;
  logic [1:0] lane8 = 0;
  logic [15:0] d16 = 0;
  logic [7:0] d8 = 0;
  logic [31:0] w16, w8;
  int checks = 0, failures = 0;
  ocp_pack #(.CORE_W(16)) dut16 (.clk, .rst_n, .clear_i(clr16), .load_i(ld16), .lane_i(lane16), .lane_data_i(d16), .word_o(w16));
  ocp_pack #(.CORE_W(8))  dut8  (.clk, .rst_n, .clear_i(clr8),  .load_i(ld8),  .lane_i(lane8),  .lane_data_i(d8),  .word_o(w8));
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s w16=%h w8=%h", what, w16, w8); end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      v = $urandom;
      @(negedge clk); clr16 = 1; clr8 = 1;
      @(negedge clk); clr16 = 0; clr8 = 0;
      check(w16 == 0 && w8 == 0, "clear");
      for (int k = 0; k < 4; k++) begin
        int l8;
        l8 = (i[0]) ? 3 - k : k;
        ld8 = 1; lane8 = 2'(l8); d8 = v[8*l8 +: 8];
        if (k < 2) begin ld16 = 1; lane16 = 1'(l8 % 2); d16 = v[16*(l8 % 2) +: 16]; end
        else ld16 = 0;
        @(negedge clk);
      end
      ld8 = 0; ld16 = 0;
      check(w8 == v, "8-to-32 pack");
      check(w16 == v, "16-to-32 pack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
