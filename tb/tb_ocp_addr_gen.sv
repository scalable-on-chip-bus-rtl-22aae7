// tb_ocp_addr_gen: burst address generation. INCR bursts count up from
// MAddr[31:2]; precise WRAP bursts of 4 and 8 stay inside the aligned block
// (e.g. start 6, length 4: 6, 7, 4, 5); imprecise bursts end on MReqLast;
// MAddrSpace adds its region (lowest set bit times 32 words); the result
// appears one cycle after the beat.
module tb_ocp_addr_gen;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic beat = 0, precise = 1, last = 0;
  logic [31:0] addr = 0;
  logic [7:0] space = 0, blen = 1;
  bseq_e seq = BSEQ_INCR;
  logic [7:0] word;
  logic first;
  int checks = 0, failures = 0;
  ocp_addr_gen #(.WORD_AW(8), .SPACE_WORDS(32)) dut (.clk, .rst_n, .beat_i(beat), .addr_i(addr),
    .addr_space_i(space), .burst_len_i(blen), .burst_precise_i(precise), .burst_seq_i(seq),
    .req_last_i(last), .word_o(word), .first_o(first));
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s word=%0d", what, word); end
  endtask
  // One burst: n beats starting at word w; the master sends its own address
  // on each beat but the generator only looks at the first.
  task automatic burst(int w, int n, bit p, bseq_e s, logic [7:0] sp, int expw [$]);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      beat = 1; addr = {30'(w + 17 * k), 2'b10}; precise = p; seq = s; space = sp;
      blen = p ? 8'(n) : 8'(n - k); last = (k == n - 1);
      @(negedge clk);
      beat = 0;
      check(word == 8'(expw[k]), $sformatf("beat %0d of burst at %0d", k, w));
      check(first == (k == 0), "first beat flag");
    end
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
    burst(10, 1, 1, BSEQ_INCR, 8'h00, '{10});
    burst(20, 5, 1, BSEQ_INCR, 8'h00, '{20, 21, 22, 23, 24});
    burst(6, 4, 1, BSEQ_WRAP, 8'h00, '{6, 7, 4, 5});
    burst(13, 8, 1, BSEQ_WRAP, 8'h00, '{13, 14, 15, 8, 9, 10, 11, 12});
    burst(30, 5, 0, BSEQ_INCR, 8'h00, '{30, 31, 32, 33, 34});
    burst(3, 2, 1, BSEQ_INCR, 8'h02, '{35, 36});
    burst(3, 1, 1, BSEQ_INCR, 8'h0C, '{67});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
