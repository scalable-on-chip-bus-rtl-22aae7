// tb_ocp_tag_order: the in-order and out-of-order sequences of five
// requests. Tags 0..4 are issued in order; in-order responses are accepted
// only in issue order, out-of-order responses 2,1,0,4,3 are all accepted, a
// tag that is not outstanding never is, and the tag space wraps.
module tb_ocp_tag_order;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic issue = 0, in_order = 1, retire = 0, acc, full;
  logic [2:0] tag, stag = 0, rtag = 0, expect_tag;
  int checks = 0, failures = 0;
  ocp_tag_order #(.TAG_W(3)) dut (.clk, .rst_n, .issue_i(issue), .tag_o(tag), .full_o(full),
    .stag_i(stag), .in_order_i(in_order), .accept_o(acc), .expect_o(expect_tag),
    .retire_i(retire), .retire_tag_i(rtag));
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s stag=%0d acc=%0b tag=%0d", what, stag, acc, tag); end
  endtask
  task automatic issue5(int first);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      check(tag == 3'(first + i), "MTagID sequence");
      issue = 1;
      @(negedge clk);
      issue = 0;
    end
  endtask
  task automatic respond(int t, bit expect_ok);
    @(negedge clk);
    stag = 3'(t);
    #1;
    check(acc == expect_ok, $sformatf("response tag %0d", t));
    if (acc) begin rtag = 3'(t); retire = 1; @(negedge clk); retire = 0; end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // In-order: 0..4 issued; response 1 before 0 is rejected.
    in_order = 1;
    issue5(0);
    respond(1, 0);
    respond(0, 1);
    respond(2, 0);
    respond(1, 1);
    respond(2, 1); respond(3, 1); respond(4, 1);
    respond(4, 0);  // no longer outstanding
    // Out-of-order: tags 5,6,7,0,1; responses in the order 2,1,0,4,3 of the
    // requests.
    in_order = 0;
    issue5(5);
    respond(7, 1); respond(6, 1); respond(5, 1); respond(1, 1); respond(0, 1);
    respond(3, 0);
    // Full: eight outstanding tags block a ninth.
    in_order = 1;
    for (int i = 0; i < 8; i++) begin @(negedge clk); issue = 1; @(negedge clk); issue = 0; end
    @(negedge clk);
    check(full, "tag space full");
    check(expect_tag == 3'd2, "oldest outstanding tag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
