// tb_ocp_async_ram: random byte-enabled writes to the 64 x 16 RAM against a
// model; reads are combinational (data valid in the same cycle as the
// address).
module tb_ocp_async_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic we = 0;
  logic [1:0] be = 0;
  logic [15:0] model [64];
  int checks = 0, failures = 0;
  ocp_async_ram #(.DEPTH(64), .WIDTH(16)) dut (.clk, .addr, .wdata, .we, .be, .rdata);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); addr = 6'(a); wdata = 16'(a * 301); we = 1; be = 2'b11; model[a] = 16'(a * 301);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 6'($urandom); we = $urandom_range(0, 1); be = 2'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata != model[addr]) begin failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, model[addr]); end
      if (we) for (int b = 0; b < 2; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
