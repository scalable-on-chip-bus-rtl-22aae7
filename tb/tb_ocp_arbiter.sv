// tb_ocp_arbiter: checks the rotating-priority arbiter against a reference
// model of the priority rule (first requester upward from the one-hot
// priority register, grant held until done, priority rotated once per
// completed transaction). Covers the reset order of Table-1 style rows, the
// Table-2 case (highest priority idle, a lower level wins) and random
// traffic, and that a grant appears exactly one cycle after the request.
module tb_ocp_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, done = '0, grant, seq;
  int checks = 0, failures = 0;

  ocp_arbiter #(.N(N)) dut (.clk, .rst_n, .req_i(req), .done_i(done), .grant_o(grant), .seq_o(seq));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t grant=%b seq=%b", what, $time, grant, seq); end
  endtask

  // Reference model.
  int top_m = 0;            // index of the highest-priority master
  int gnt_m = -1;           // granted master, -1 for none
  function automatic int pick_m(logic [N-1:0] r, int top);
    for (int k = 0; k < N; k++) if (r[(top + k) % N]) return (top + k) % N;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (gnt_m < 0) gnt_m = pick_m(req, top_m);
    else if (done[gnt_m]) begin gnt_m = -1; top_m = (top_m + 1) % N; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what);
    check(seq == N'(1 << top_m), {what, " seq"});
    check(grant == ((gnt_m < 0) ? '0 : N'(1 << gnt_m)), {what, " grant"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Reset: master 1 first.
    @(negedge clk); cmp("reset");
    // All request: order M1, M2, M3, M4 with one transaction each.
    req = 4'b1111;
    @(negedge clk); cmp("all request");
    check(grant == 4'b0001, "grant one cycle after request goes to M1");
    for (int i = 0; i < 4; i++) begin
      wait (grant != 0);
      @(negedge clk);
      check(grant == N'(1 << i), $sformatf("rotation order %0d", i));
      done = grant; req[i] = 1'b0;
      @(negedge clk); done = 0; cmp("after done");
    end
    req = 0;
    // Table 2: priority at M3 (index 2), requests from M1 and M2 -> M1.
    while (seq != 4'b0100) begin
      req = 4'b1000; @(negedge clk); @(negedge clk); done = grant; @(negedge clk); done = 0; req = 0;
    end
    @(negedge clk);
    req = 4'b0011;
    @(negedge clk); cmp("table 2");
    check(grant == 4'b0001, "table 2: M1 gets grant");
    done = grant; req = 0; @(negedge clk); done = 0;
    // Random traffic against the model.
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      cmp("random");
      req = N'($urandom);
      done = ($urandom_range(0, 3) == 0) ? grant : N'($urandom) & ~grant;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
