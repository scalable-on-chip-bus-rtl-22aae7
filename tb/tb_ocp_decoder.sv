// tb_ocp_decoder: exhaustive check of the slave select decoder: MAddr[1:0]
// picks one of four slaves, the upper address bits do not matter, and no
// slave is selected while the bus is not owned.
module tb_ocp_decoder;
  logic valid;
  logic [31:0] addr;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  ocp_decoder #(.N(4)) dut (.valid_i(valid), .addr_i(addr), .sel_o(sel));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 400; i++) begin
      valid = i[0];
      addr  = $urandom;
      #1;
      checks++;
      if (sel != (valid ? 4'(1 << addr[1:0]) : 4'b0)) begin
        failures++;
        $display("FAIL valid=%0b addr=%h sel=%b", valid, addr, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
