// tb_ocp_master: one OCP master against a behavioural slave and arbiter.
//
// The testbench slave accepts each beat after a programmable delay, records
// it, answers after another delay with STagID/SThreadID copied from the
// beat, and can corrupt the tag or the SData parity, answer ERR, or hold
// SThreadBusy. Checked: the request beats (MCmd, INCR and WRAP addresses,
// MData with parity in MDataInfo, MBurstLength precise and imprecise,
// MReqLast, MTagID sequence, MThreadID from MTagInOrder, MConnID), read data
// to the core, the error flag for a rejected tag, bad parity and ERR, the
// wait while the chosen thread is busy, the bus request/done handshake, and
// the cycle count of a single transfer with a zero-delay slave (start edge
// to done: 5 cycles).
module tb_ocp_master;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, precise = 1, in_order = 1;
  mcmd_e cmd = MCMD_IDLE;
  logic [31:0] addr = 0, wdata = 0;
  logic [3:0] be = 4'hF;
  logic [7:0] space = 0, blen = 1;
  bseq_e seq = BSEQ_INCR;
  logic beat_o, rvalid, busy, done, err, tag_rej, twait, bus_req, bus_done;
  logic [31:0] rdata;
  sresp_e rresp;
  logic grant = 0;
  ocp_req_t req;
  ocp_resp_t resp = RESP_NULL;

  ocp_master #(.MASTER_ID(2)) dut (
    .clk, .rst_n, .core_start_i(start), .core_cmd_i(cmd), .core_addr_i(addr), .core_be_i(be),
    .core_space_i(space), .core_blen_i(blen), .core_precise_i(precise), .core_seq_i(seq),
    .core_in_order_i(in_order), .core_wdata_i(wdata), .core_beat_o(beat_o), .core_rvalid_o(rvalid),
    .core_rdata_o(rdata), .core_rresp_o(rresp), .core_busy_o(busy), .core_done_o(done),
    .core_err_o(err), .tag_reject_o(tag_rej), .thread_wait_o(twait), .bus_req_o(bus_req),
    .bus_grant_i(grant), .bus_done_o(bus_done), .req_o(req), .resp_i(resp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // Arbiter stand-in: registered grant, dropped on done.
  always_ff @(posedge clk) grant <= rst_n && bus_req && !bus_done;

  // Behavioural slave.
  int acc_dly = 0, rsp_dly = 0, busy_cycles = 0;
  bit bad_tag = 0, bad_par = 0, give_err = 0;
  ocp_req_t beats [$];
  logic [31:0] mem [256];
  initial begin
    ocp_req_t b;
    bit skip;
    skip = 0;
    forever begin
      if (!skip) @(negedge clk);
      skip = 0;
      if (busy_cycles > 0) begin
        resp.thread_busy = 2'b11; busy_cycles--;
        continue;
      end
      resp.thread_busy = 2'b00;
      if (req.cmd == MCMD_IDLE) continue;
      repeat (acc_dly) @(negedge clk);
      resp.cmd_accept = 1; resp.data_accept = is_write(req.cmd);
      @(posedge clk);
      b = req;
      beats.push_back(b);
      @(negedge clk);
      resp.cmd_accept = 0; resp.data_accept = 0;
      if (is_write(b.cmd)) mem[b.addr[9:2]] = b.data;
      repeat (rsp_dly) @(negedge clk);
      resp.resp = give_err ? SRESP_ERR : SRESP_DVA;
      resp.data = is_read(b.cmd) ? mem[b.addr[9:2]] : '0;
      resp.data_info = parity_info(resp.data) ^ (bad_par ? 16'h1 : 16'h0);
      resp.tag_id = b.tag_id + (bad_tag ? 3'd1 : 3'd0);
      resp.thread_id = b.thread_id;
      resp.resp_last = b.req_last;
      resp.byte_en = b.byte_en;
      forever begin
        @(posedge clk);
        if (req.resp_accept) break;
      end
      @(negedge clk);
      resp.resp = SRESP_NULL;
      skip = 1;
    end
  end

  // Start one transaction and wait for done; collect read data and count
  // cycles from the start edge to the done cycle.
  logic [31:0] rd [$];
  int cycles;
  task automatic run(mcmd_e c, int word, int len, bit p, bseq_e s, bit io, logic [31:0] wd [$], int lens [$]);
    int beat;
    bit adv;
    beat = 0; adv = 0;
    rd.delete(); beats.delete();
    @(negedge clk);
    start = 1; cmd = c; addr = {22'd0, 8'(word), 2'd3}; precise = p; seq = s; in_order = io;
    blen = p ? 8'(len) : 8'(lens[0]); wdata = (wd.size() > 0) ? wd[0] : 0;
    @(negedge clk);
    start = 0;
    cycles = 0;
    #1;
    while (!done) begin
      if (adv) begin
        if (beat < wd.size()) wdata = wd[beat];
        if (!p && beat < lens.size()) blen = 8'(lens[beat]);
        adv = 0;
      end
      if (rvalid) rd.push_back(rdata);
      if (beat_o) begin beat++; adv = 1; end
      check(!(req.resp_accept && resp.resp == SRESP_NULL), "MRespAccept only with a response");
      @(negedge clk);
      #1;
      cycles++;
    end
    check(bus_done, "bus_done with core_done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [$];
    int twaits;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) mem[i] = 32'h5000_0000 + i;

    // Single read, zero-delay slave: latency and fields.
    run(MCMD_RD, 7, 1, 1, BSEQ_INCR, 1, '{}, '{1});
    check(cycles == 5, $sformatf("single read takes 5 cycles (took %0d)", cycles));
    check(rd.size() == 1 && rd[0] == 32'h5000_0007, "single read data");
    check(!err, "single read no error");
    check(beats.size() == 1 && beats[0].cmd == MCMD_RD && beats[0].addr == {22'd0, 8'd7, 2'd3}, "read beat");
    check(beats[0].tag_id == 0 && beats[0].thread_id == 0 && beats[0].conn_id == 2 && beats[0].req_last,
          "tag 0, Thread0, MConnID, MReqLast");

    // Precise INCR write of 4 with delays.
    acc_dly = 2; rsp_dly = 1;
    w = '{32'hA0, 32'hA1, 32'hA2, 32'hA3};
    run(MCMD_WR, 20, 4, 1, BSEQ_INCR, 0, w, '{4});
    check(beats.size() == 4, "four write beats");
    foreach (beats[k]) begin
      check(beats[k].addr[9:2] == 8'(20 + k) && beats[k].data == w[k] && beats[k].data_valid, $sformatf("INCR beat %0d", k));
      check(beats[k].data_info == parity_info(w[k]) && beats[k].burst_len == 4 && beats[k].burst_precise, "beat info");
      check(beats[k].req_last == (k == 3) && beats[k].tag_id == 1 && beats[k].thread_id == 1, "last/tag/thread");
    end
    check(mem[22] == 32'hA2, "write data landed");

    // Precise WRAP read of 4 starting at 22: 22, 23, 20, 21.
    acc_dly = 0; rsp_dly = 0;
    run(MCMD_RD, 22, 4, 1, BSEQ_WRAP, 1, '{}, '{4});
    check(rd.size() == 4 && rd[0] == 32'hA2 && rd[1] == 32'hA3 && rd[2] == 32'hA0 && rd[3] == 32'hA1, "WRAP read order");
    check(beats.size() == 4 && beats[2].addr[9:2] == 20, "WRAP address");
    check(cycles == 5 + 3 * 2, $sformatf("4-beat burst takes 11 cycles (took %0d)", cycles));

    // Imprecise write, lengths 3,3,2,2,1.
    w = '{32'hB0, 32'hB1, 32'hB2, 32'hB3, 32'hB4};
    run(MCMD_WR, 40, 5, 0, BSEQ_INCR, 1, w, '{3, 3, 2, 2, 1});
    check(beats.size() == 5, "imprecise: five beats");
    foreach (beats[k]) begin
      check(beats[k].burst_len == 8'(k < 2 ? 3 : (k < 4 ? 2 : 1)) && !beats[k].burst_precise, "imprecise MBurstLength");
      check(beats[k].req_last == (k == 4), "imprecise MReqLast");
    end

    // Wrong STagID: response rejected, not passed to the core, error flagged.
    bad_tag = 1;
    run(MCMD_RD, 7, 1, 1, BSEQ_INCR, 1, '{}, '{1});
    check(err && rd.size() == 0, "in-order tag mismatch rejected");
    bad_tag = 0;
    // Bad SData parity.
    bad_par = 1;
    run(MCMD_RD, 7, 1, 1, BSEQ_INCR, 0, '{}, '{1});
    check(err, "read parity error flagged");
    bad_par = 0;
    // ERR response.
    give_err = 1;
    run(MCMD_WR, 9, 1, 1, BSEQ_INCR, 1, '{32'h1}, '{1});
    check(err, "ERR response flagged");
    give_err = 0;

    // Thread busy: the master waits in thread arbitration.
    fork
      begin
        @(negedge clk); busy_cycles = 6;
      end
      run(MCMD_RD, 8, 1, 1, BSEQ_INCR, 1, '{}, '{1});
    join
    check(cycles >= 5 + 4, $sformatf("waited for busy thread (took %0d)", cycles));
    check(rd.size() == 1 && rd[0] == 32'h5000_0008 && !err, "read after thread wait");
    check(beats.size() == 1 && beats[0].tag_id == 3'(7), "tags keep counting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
