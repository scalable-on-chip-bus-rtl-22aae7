// tb_ocp_thread_arbiter: in-order transfers must use Thread0 and
// out-of-order ones Thread1; go is low while that thread's SThreadBusy bit
// is set; with both threads busy the watched thread alternates every cycle.
module tb_ocp_thread_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_order = 1;
  logic [1:0] busy = 0;
  logic tid, go, watch;
  int checks = 0, failures = 0;
  ocp_thread_arbiter dut (.clk, .rst_n, .tag_in_order_i(in_order), .sthreadbusy_i(busy),
                          .thread_id_o(tid), .go_o(go), .watch_o(watch));
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s io=%0b busy=%b tid=%0b go=%0b", what, in_order, busy, tid, go); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic w0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int io = 0; io < 2; io++)
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        in_order = io[0]; busy = b[1:0];
        #1;
        check(tid == !in_order, "thread mapping");
        check(go == !busy[!in_order], "wait on busy thread");
        if (b != 3) check(watch == tid, "watch follows own thread");
      end
    busy = 2'b11;
    @(negedge clk);
    w0 = watch;
    for (int c = 0; c < 6; c++) begin
      @(negedge clk);
      check(watch == !w0, "both busy: thread switches between cycles");
      w0 = watch;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
