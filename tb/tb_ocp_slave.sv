// tb_ocp_slave: OCP slave with its 64 x 16 RAM, plus a second slave with an
// 8-bit core (64 x 8 RAM) to exercise 32-to-8 packing.
//
// Request beats are driven directly. Checked: SCmdAccept/SDataAccept in the
// cycle the beat is offered and only when selected; response after
// 3 + 32/CORE_W cycles; response held until MRespAccept; write unpacking
// into the RAM lanes (word w at locations 2w and 2w+1, low half first) with
// MByteEn; read packing; INCR and WRAP bursts with SRespLast; STagID,
// SThreadID and SThreadBusy; SDataInfo parity; ERR for a write with bad
// MDataInfo parity (nothing written); ReadEx locking and WriteConditional
// failure.
module tb_ocp_slave;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_req_t  req = REQ_IDLE;
  logic      sel16 = 0, sel8 = 0;
  ocp_resp_t r16, r8;

  logic [5:0]  a16;  logic [15:0] wd16, rd16; logic we16; logic [1:0] be16;
  logic [5:0]  a8;   logic [7:0]  wd8, rd8;   logic we8;  logic [0:0] be8;

  ocp_slave #(.CORE_W(16), .RAM_AW(6)) dut (.clk, .rst_n, .req_i(req), .sel_i(sel16), .resp_o(r16),
    .core_addr_o(a16), .core_wdata_o(wd16), .core_we_o(we16), .core_be_o(be16), .core_rdata_i(rd16));
  ocp_async_ram #(.DEPTH(64), .WIDTH(16)) ram16 (.clk, .addr(a16), .wdata(wd16), .we(we16), .be(be16), .rdata(rd16));
  ocp_slave #(.CORE_W(8), .RAM_AW(6)) dut8 (.clk, .rst_n, .req_i(req), .sel_i(sel8), .resp_o(r8),
    .core_addr_o(a8), .core_wdata_o(wd8), .core_we_o(we8), .core_be_o(be8), .core_rdata_i(rd8));
  ocp_async_ram #(.DEPTH(64), .WIDTH(8)) ram8 (.clk, .addr(a8), .wdata(wd8), .we(we8), .be(be8), .rdata(rd8));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // One beat on the 16-bit slave (or the 8-bit one with s8). Returns the
  // response and the cycles from the accepting edge to the first cycle
  // with a response.
  ocp_resp_t got;
  int lat;
  task automatic beat(bit s8, mcmd_e c, int word, logic [31:0] d, logic [3:0] be, bit last,
                      int tag, bit thr, int conn, int len, bit precise, bseq_e sq,
                      bit bad_par = 0, int hold = 0);
    ocp_resp_t rr;
    @(negedge clk);
    req = REQ_IDLE;
    req.cmd = c; req.addr = {22'd0, 8'(word), 2'd1}; req.data = is_write(c) ? d : '0;
    req.data_valid = is_write(c); req.byte_en = be;
    req.data_info = parity_info(d) ^ (bad_par ? 16'h2 : 16'h0);
    req.burst_len = 8'(len); req.burst_precise = precise; req.burst_seq = sq; req.req_last = last;
    req.tag_id = 3'(tag); req.thread_id = thr; req.conn_id = 2'(conn);
    sel16 = !s8; sel8 = s8;
    #1;
    rr = s8 ? r8 : r16;
    check(rr.cmd_accept && rr.data_accept == is_write(c), "SCmdAccept/SDataAccept in the offered cycle");
    @(negedge clk);
    req.cmd = MCMD_IDLE; req.data_valid = 0;
    lat = 1;
    #1;
    rr = s8 ? r8 : r16;
    check(rr.thread_busy == (thr ? 2'b10 : 2'b01), "SThreadBusy marks the running thread");
    while (rr.resp == SRESP_NULL && lat < 50) begin
      @(negedge clk); #1; lat++;
      rr = s8 ? r8 : r16;
    end
    got = rr;
    repeat (hold) begin
      @(negedge clk); #1;
      rr = s8 ? r8 : r16;
      check(rr.resp == got.resp && rr.data == got.data, "response held until MRespAccept");
    end
    req.resp_accept = 1;
    @(negedge clk);
    req.resp_accept = 0;
    sel16 = 0; sel8 = 0;
    #1;
    rr = s8 ? r8 : r16;
    check(rr.resp == SRESP_NULL && rr.thread_busy == 0, "response ends after MRespAccept");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Not selected: no accept.
    @(negedge clk);
    req.cmd = MCMD_RD; sel16 = 0; #1;
    check(!r16.cmd_accept, "no accept without select");
    req = REQ_IDLE;

    // Single write and read, 16-bit core.
    beat(0, MCMD_WR, 5, 32'hCAFE_1234, 4'hF, 1, 3, 0, 1, 1, 1, BSEQ_INCR, 0, 2);
    check(got.resp == SRESP_DVA && got.tag_id == 3 && got.thread_id == 0 && got.resp_last, "write response fields");
    check(lat == 4, $sformatf("16-bit beat: response 4 cycles after accept (got %0d)", lat));
    check(ram16.mem[10] == 16'h1234 && ram16.mem[11] == 16'hCAFE, "unpack into RAM lanes");
    beat(0, MCMD_RD, 5, 0, 4'hF, 1, 4, 1, 1, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_DVA && got.data == 32'hCAFE_1234 && got.thread_id == 1, "pack read");
    check(got.data_info[3:0] == parity_info(got.data)[3:0], "SDataInfo parity");
    // Byte-enabled write.
    beat(0, MCMD_WR, 5, 32'h0000_0000, 4'b1001, 1, 0, 0, 1, 1, 1, BSEQ_INCR);
    beat(0, MCMD_RD, 5, 0, 4'hF, 1, 0, 0, 1, 1, 1, BSEQ_INCR);
    check(got.data == 32'h00FE_1200, "MByteEn write");
    // Bad parity: ERR, nothing written.
    beat(0, MCMD_WR, 5, 32'h1111_1111, 4'hF, 1, 0, 0, 1, 1, 1, BSEQ_INCR, 1);
    check(got.resp == SRESP_ERR, "parity error answers ERR");
    beat(0, MCMD_RD, 5, 0, 4'hF, 1, 0, 0, 1, 1, 1, BSEQ_INCR);
    check(got.data == 32'h00FE_1200, "no write on parity error");

    // INCR burst write of 3 at word 20, WRAP burst read of 4 at 22.
    for (int k = 0; k < 3; k++)
      beat(0, MCMD_WR, 20 + k, 32'hD000_0000 + k, 4'hF, k == 2, 5, 0, 2, 3, 1, BSEQ_INCR);
    beat(0, MCMD_WR, 23, 32'hD000_0003, 4'hF, 1, 5, 0, 2, 1, 1, BSEQ_INCR);
    for (int k = 0; k < 4; k++) begin
      // The slave uses its own address generator: MAddr of later beats is
      // deliberately wrong.
      beat(0, MCMD_RD, (k == 0) ? 22 : 99, 0, 4'hF, k == 3, 6, 1, 2, 4, 1, BSEQ_WRAP);
      check(got.data == 32'hD000_0000 + ((22 + k) & 3), $sformatf("WRAP beat %0d", k));
      check(got.resp_last == (k == 3), "SRespLast");
    end

    // ReadEx by master 0, read by master 1 answers ERR, owner write unlocks.
    beat(0, MCMD_RDEX, 7, 0, 4'hF, 1, 0, 0, 0, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_DVA, "ReadEx");
    beat(0, MCMD_RD, 7, 0, 4'hF, 1, 0, 0, 1, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_ERR && got.data == 0, "locked location ERR");
    beat(0, MCMD_WR, 7, 32'h7777, 4'hF, 1, 0, 0, 0, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_DVA, "owner write");
    beat(0, MCMD_RD, 7, 0, 4'hF, 1, 0, 0, 1, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_DVA && got.data == 32'h7777, "unlocked");
    // WriteConditional without reservation fails and writes nothing.
    beat(0, MCMD_WRC, 7, 32'h8888, 4'hF, 1, 0, 0, 3, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_FAIL, "WRC FAIL");
    check(ram16.mem[14] == 16'h7777, "failed WRC wrote nothing");
    beat(0, MCMD_RDL, 7, 0, 4'hF, 1, 0, 0, 3, 1, 1, BSEQ_INCR);
    beat(0, MCMD_WRC, 7, 32'h8888, 4'hF, 1, 0, 0, 3, 1, 1, BSEQ_INCR);
    check(got.resp == SRESP_DVA && ram16.mem[14] == 16'h8888, "WRC with reservation");

    // 8-bit core: 32-to-8 unpack and 8-to-32 pack.
    beat(1, MCMD_WR, 3, 32'hD4C3_B2A1, 4'hF, 1, 1, 0, 0, 1, 1, BSEQ_INCR);
    check(lat == 6, $sformatf("8-bit beat: response 6 cycles after accept (got %0d)", lat));
    check(ram8.mem[12] == 8'hA1 && ram8.mem[13] == 8'hB2 && ram8.mem[14] == 8'hC3 && ram8.mem[15] == 8'hD4, "32-to-8 unpack");
    beat(1, MCMD_RD, 3, 0, 4'hF, 1, 1, 0, 0, 1, 1, BSEQ_INCR);
    check(got.data == 32'hD4C3_B2A1, "8-to-32 pack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
