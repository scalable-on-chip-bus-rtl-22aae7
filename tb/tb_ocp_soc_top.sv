// tb_ocp_soc_top: end-to-end test of the four-master, four-slave OCP bus at
// its default size.
//
// Four driver processes play the system initiators, one per master. A
// reference model of the memories (32 OCP words per slave, byte-enabled
// writes) gives every expected read value; the lock and reservation cases
// are directed with the expected SResp written out. Phases:
//   1. all four masters start a write together: the grants must come in the
//      rotating priority order M1, M2, M3, M4;
//   2. the priority is stepped to M3, then M1 and M2 request together: M1
//      must win (no request from M3 and M4);
//   3. bursts: precise INCR write, precise WRAP read, imprecise write with
//      per-beat lengths 3,3,2,2,1, and their read-back;
//   4. a byte-enabled partial write;
//   5. ReadEx lock: another master's read and write of the location answer
//      ERR, the owner's write unlocks it;
//   6. ReadLinked / WriteConditional: success, failure after another
//      master's write, failure without reservation;
//   7. random single and burst traffic from all masters at once, each master
//      in its own address range, in-order and out-of-order (Thread0/1).
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ocp_soc_top;
  import ocp_pkg::*;

  localparam int NM = 4;
  localparam int NS = 4;
  localparam int WORDS = 32;   // 64 x 16-bit RAM = 32 OCP words per slave

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  core_start_i   [NM];
  mcmd_e                 core_cmd_i     [NM];
  logic [ADDR_W-1:0]     core_addr_i    [NM];
  logic [BE_W-1:0]       core_be_i      [NM];
  logic [SPACE_W-1:0]    core_space_i   [NM];
  logic [BLEN_W-1:0]     core_blen_i    [NM];
  logic                  core_precise_i [NM];
  bseq_e                 core_seq_i     [NM];
  logic                  core_in_order_i[NM];
  logic [DATA_W-1:0]     core_wdata_i   [NM];
  logic                  core_beat_o    [NM];
  logic                  core_rvalid_o  [NM];
  logic [DATA_W-1:0]     core_rdata_o   [NM];
  sresp_e                core_rresp_o   [NM];
  logic                  core_busy_o    [NM];
  logic                  core_done_o    [NM];
  logic                  core_err_o     [NM];
  logic                  tag_reject_o   [NM];
  logic                  thread_wait_o  [NM];
  logic [NM-1:0]         grant_o, seq_o;

  ocp_soc_top dut (.*);

  int checks = 0, failures = 0;
  int n_contend = 0, n_rotate = 0, n_thread0 = 0, n_thread1 = 0, n_pack = 0, n_unpack = 0;
  int n_precise = 0, n_wrap = 0, n_imprecise = 0, n_be = 0, n_lock_err = 0, n_unlock = 0;
  int n_wrc_ok = 0, n_wrc_fail = 0, n_table2 = 0, n_order = 0;

  logic [31:0] model [NS][WORDS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  function automatic logic [31:0] mk_addr(int slave, int word);
    return {word[29:0], slave[1:0]};
  endfunction

  function automatic void model_write(int s, int w, logic [31:0] d, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) model[s][w % WORDS][8*b +: 8] = d[8*b +: 8];
  endfunction

  // Word index of beat n of a burst (same rule as the design description:
  // INCR counts up, WRAP stays in the length-aligned block).
  function automatic int beat_word(int base, int n, int len, bit wrap);
    if (wrap) return (base & ~(len - 1)) | ((base + n) & (len - 1));
    return base + n;
  endfunction

  // Run one transaction on master m. wdata holds one word per beat; for an
  // imprecise burst lens holds the per-beat MBurstLength.
  task automatic do_txn(input int m, input mcmd_e cmd, input logic [31:0] addr,
                        input int len, input bit precise, input bseq_e seq,
                        input bit in_order, input logic [3:0] be,
                        input logic [31:0] wdata [$], input int lens [$],
                        output logic [31:0] rdata [$], output sresp_e resps [$],
                        output bit err);
    int beat;
    bit adv;
    beat = 0;
    adv  = 1'b0;
    rdata.delete();
    resps.delete();
    @(negedge clk);
    core_start_i[m]    = 1'b1;
    core_cmd_i[m]      = cmd;
    core_addr_i[m]     = addr;
    core_be_i[m]       = be;
    core_space_i[m]    = 8'h01;
    core_blen_i[m]     = precise ? BLEN_W'(len) : BLEN_W'(lens[0]);
    core_precise_i[m]  = precise;
    core_seq_i[m]      = seq;
    core_in_order_i[m] = in_order;
    core_wdata_i[m]    = (wdata.size() > 0) ? wdata[0] : '0;
    @(negedge clk);
    core_start_i[m] = 1'b0;
    forever begin
      // The beat seen last cycle was taken at the clock edge since: now the
      // core presents the next one.
      if (adv) begin
        if (beat < wdata.size()) core_wdata_i[m] = wdata[beat];
        if (!precise && beat < lens.size()) core_blen_i[m] = BLEN_W'(lens[beat]);
        adv = 1'b0;
      end
      if (core_rvalid_o[m]) rdata.push_back(core_rdata_o[m]);
      if (core_busy_o[m] && core_rresp_o[m] != SRESP_NULL) resps.push_back(core_rresp_o[m]);
      if (core_beat_o[m]) begin
        beat++;
        adv = 1'b1;
      end
      if (core_done_o[m]) begin
        err = core_err_o[m];
        break;
      end
      @(negedge clk);
    end
  endtask

  // Shorthands for single transfers.
  task automatic wr1(int m, mcmd_e cmd, int s, int w, logic [31:0] d, logic [3:0] be,
                     bit in_order, output sresp_e r);
    logic [31:0] rd [$];
    sresp_e rs [$];
    bit e;
    do_txn(m, cmd, mk_addr(s, w), 1, 1'b1, BSEQ_INCR, in_order, be, '{d}, '{1}, rd, rs, e);
    r = rs[0];
    if (r == SRESP_DVA) model_write(s, w, d, be);
  endtask

  task automatic rd1(int m, mcmd_e cmd, int s, int w, bit in_order,
                     output logic [31:0] d, output sresp_e r);
    logic [31:0] rd [$];
    sresp_e rs [$];
    bit e;
    do_txn(m, cmd, mk_addr(s, w), 1, 1'b1, BSEQ_INCR, in_order, 4'hF, '{}, '{1}, rd, rs, e);
    r = rs[0];
    d = (rd.size() > 0) ? rd[0] : 'x;
  endtask

  // Monitors: mechanism counters.
  logic [NM-1:0] seq_prev;
  always @(negedge clk) if (rst_n) begin
    if (grant_o == '0 && $countones(dut.m_bus_req) > 1) n_contend++;
    if (seq_o != seq_prev) n_rotate++;
    seq_prev <= seq_o;
    if (dut.bus_req.cmd != MCMD_IDLE && dut.bus_resp.cmd_accept) begin
      if (dut.bus_req.thread_id) n_thread1++; else n_thread0++;
      if (is_write(dut.bus_req.cmd) && dut.bus_req.byte_en != 4'hF) n_be++;
    end
  end
  for (genvar gs = 0; gs < NS; gs++) begin : g_probe
    always @(negedge clk) if (rst_n) begin
      if (dut.g_slave[gs].u_slave.u_pack.load_i) n_pack++;
      if (dut.g_slave[gs].ram_we) n_unpack++;
    end
  end

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Grant order recorder for the arbitration phases.
  int grant_log [$];
  logic [NM-1:0] grant_prev = '0;
  always @(negedge clk) begin
    if (grant_o != '0 && grant_o != grant_prev)
      for (int i = 0; i < NM; i++) if (grant_o[i]) grant_log.push_back(i);
    grant_prev <= grant_o;
  end

  initial begin
    logic [31:0] d, rd [$];
    sresp_e r, rs [$];
    bit e;
    for (int m = 0; m < NM; m++) begin
      core_start_i[m] = 0; core_cmd_i[m] = MCMD_IDLE; core_addr_i[m] = 0; core_be_i[m] = 0;
      core_space_i[m] = 0; core_blen_i[m] = 1; core_precise_i[m] = 1; core_seq_i[m] = BSEQ_INCR;
      core_in_order_i[m] = 1; core_wdata_i[m] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    seq_prev = seq_o;

    // Give every model word a known value through the bus.
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < WORDS; w++) begin
        wr1(w % NM, MCMD_WR, s, w, {8'(s), 8'(w), 16'hA5C3 ^ 16'(w * 77)}, 4'hF, 1'b1, r);
        check(r == SRESP_DVA, "init write");
      end
    for (int s = 0; s < NS; s++) begin
      rd1(s, MCMD_RD, s, s + 3, 1'b1, d, r);
      check(r == SRESP_DVA && d == model[s][s + 3], "init read");
    end

    // Phase 1: rotating priority with all four requesting.
    wait (seq_o == 4'b0001);
    grant_log.delete();
    fork
      begin sresp_e q; wr1(0, MCMD_WR, 0, 1, 32'h1111_0001, 4'hF, 1'b1, q); end
      begin sresp_e q; wr1(1, MCMD_WR, 1, 1, 32'h2222_0002, 4'hF, 1'b1, q); end
      begin sresp_e q; wr1(2, MCMD_WR, 2, 1, 32'h3333_0003, 4'hF, 1'b1, q); end
      begin sresp_e q; wr1(3, MCMD_WR, 3, 1, 32'h4444_0004, 4'hF, 1'b1, q); end
    join
    check(grant_log.size() == 4 && grant_log[0] == 0 && grant_log[1] == 1 &&
          grant_log[2] == 2 && grant_log[3] == 3, "phase 1 grant order M1..M4");
    if (grant_log.size() == 4 && grant_log[0] == 0 && grant_log[3] == 3) n_order++;
    for (int s = 0; s < NS; s++) begin
      rd1(3 - s, MCMD_RD, s, 1, 1'b0, d, r);
      check(r == SRESP_DVA && d == model[s][1], "phase 1 read back");
    end

    // Phase 2: Table 2 case. Step the priority to M3, then M1 and M2 request.
    while (seq_o != 4'b0100) begin
      rd1(3, MCMD_RD, 0, 0, 1'b1, d, r);
    end
    grant_log.delete();
    fork
      begin logic [31:0] q; sresp_e qr; rd1(0, MCMD_RD, 1, 2, 1'b1, q, qr); end
      begin logic [31:0] q; sresp_e qr; rd1(1, MCMD_RD, 2, 2, 1'b1, q, qr); end
    join
    check(grant_log.size() == 2 && grant_log[0] == 0 && grant_log[1] == 1, "phase 2 M1 wins");
    if (grant_log.size() == 2 && grant_log[0] == 0) n_table2++;

    // Phase 3: bursts.
    begin
      logic [31:0] wd [$];
      wd = '{32'hB0000000, 32'hB1111111, 32'hB2222222, 32'hB3333333};
      do_txn(1, MCMD_WR, mk_addr(2, 8), 4, 1'b1, BSEQ_INCR, 1'b1, 4'hF, wd, '{4}, rd, rs, e);
      check(!e && rs.size() == 4, "precise INCR write");
      for (int n = 0; n < 4; n++) model_write(2, 8 + n, wd[n], 4'hF);
      if (!e) n_precise++;
      // WRAP read of 4 starting at word 10: words 10, 11, 8, 9.
      do_txn(2, MCMD_RD, mk_addr(2, 10), 4, 1'b1, BSEQ_WRAP, 1'b0, 4'hF, '{}, '{4}, rd, rs, e);
      check(!e && rd.size() == 4, "precise WRAP read beats");
      for (int n = 0; n < 4 && n < rd.size(); n++)
        check(rd[n] == model[2][beat_word(10, n, 4, 1'b1)], $sformatf("WRAP beat %0d", n));
      if (!e && rd.size() == 4 && rd[2] == model[2][8]) n_wrap++;
      // Imprecise write of five beats with lengths 3,3,2,2,1.
      wd = '{32'hC0C0C0C0, 32'hC1C1C1C1, 32'hC2C2C2C2, 32'hC3C3C3C3, 32'hC4C4C4C4};
      do_txn(3, MCMD_WR, mk_addr(1, 20), 5, 1'b0, BSEQ_INCR, 1'b1, 4'hF, wd, '{3, 3, 2, 2, 1}, rd, rs, e);
      check(!e && rs.size() == 5, "imprecise write five beats");
      for (int n = 0; n < 5; n++) model_write(1, 20 + n, wd[n], 4'hF);
      if (!e && rs.size() == 5) n_imprecise++;
      do_txn(0, MCMD_RD, mk_addr(1, 19), 7, 1'b1, BSEQ_INCR, 1'b1, 4'hF, '{}, '{7}, rd, rs, e);
      check(!e && rd.size() == 7, "burst read back");
      for (int n = 0; n < 7 && n < rd.size(); n++)
        check(rd[n] == model[1][19 + n], $sformatf("burst read beat %0d", n));
    end

    // Phase 4: byte-enabled partial write.
    wr1(2, MCMD_WR, 3, 5, 32'hDEAD_BEEF, 4'b0101, 1'b1, r);
    check(r == SRESP_DVA, "partial write");
    rd1(1, MCMD_RD, 3, 5, 1'b1, d, r);
    check(r == SRESP_DVA && d == model[3][5], "partial write read back");

    // Phase 5: ReadEx lock.
    rd1(0, MCMD_RDEX, 2, 12, 1'b1, d, r);
    check(r == SRESP_DVA && d == model[2][12], "ReadEx");
    rd1(1, MCMD_RD, 2, 12, 1'b1, d, r);
    check(r == SRESP_ERR, "read of locked location by other master");
    if (r == SRESP_ERR) n_lock_err++;
    wr1(2, MCMD_WR, 2, 12, 32'h0BAD_0BAD, 4'hF, 1'b1, r);
    check(r == SRESP_ERR, "write of locked location by other master");
    rd1(0, MCMD_RD, 2, 12, 1'b1, d, r);
    check(r == SRESP_DVA && d == model[2][12], "owner still reads");
    wr1(0, MCMD_WR, 2, 12, 32'h600D_600D, 4'hF, 1'b1, r);
    check(r == SRESP_DVA, "owner write unlocks");
    rd1(1, MCMD_RD, 2, 12, 1'b1, d, r);
    check(r == SRESP_DVA && d == 32'h600D_600D, "unlocked read");
    if (r == SRESP_DVA) n_unlock++;

    // Phase 6: ReadLinked / WriteConditional.
    rd1(0, MCMD_RDL, 0, 30, 1'b1, d, r);
    check(r == SRESP_DVA && d == model[0][30], "M1 ReadLinked");
    rd1(2, MCMD_RDL, 0, 30, 1'b1, d, r);
    check(r == SRESP_DVA, "M3 ReadLinked");
    wr1(2, MCMD_WRC, 0, 30, 32'h3C3C_0030, 4'hF, 1'b1, r);
    check(r == SRESP_DVA, "M3 WriteConditional succeeds");
    if (r == SRESP_DVA) n_wrc_ok++;
    wr1(0, MCMD_WRC, 0, 30, 32'h1C1C_0030, 4'hF, 1'b1, r);
    check(r == SRESP_FAIL, "M1 WriteConditional fails after M3 write");
    if (r == SRESP_FAIL) n_wrc_fail++;
    rd1(3, MCMD_RD, 0, 30, 1'b1, d, r);
    check(d == 32'h3C3C_0030, "failed WRC wrote nothing");
    wr1(1, MCMD_WRC, 0, 31, 32'h1, 4'hF, 1'b1, r);
    check(r == SRESP_FAIL, "WriteConditional without reservation fails");
    rd1(1, MCMD_RDL, 0, 31, 1'b1, d, r);
    wr1(3, MCMD_WR, 0, 31, 32'h4444_4444, 4'hF, 1'b1, r);
    wr1(1, MCMD_WRC, 0, 31, 32'h1111_1111, 4'hF, 1'b1, r);
    check(r == SRESP_FAIL, "plain write cleared the reservation");
    rd1(1, MCMD_RDL, 0, 31, 1'b1, d, r);
    wr1(1, MCMD_WRC, 0, 31, 32'h1111_2222, 4'hF, 1'b0, r);
    check(r == SRESP_DVA, "WriteConditional after fresh reservation");
    rd1(0, MCMD_RD, 0, 31, 1'b1, d, r);
    check(d == 32'h1111_2222, "WRC data");

    // Phase 7: random traffic, all masters at once, disjoint ranges.
    begin
      for (int m = 0; m < NM; m++) begin
        automatic int mm = m;
        fork
          for (int k = 0; k < 40; k++) begin
            automatic int s = $urandom_range(0, NS - 1);
            automatic int len = $urandom_range(1, 4);
            automatic int w0 = 8 * mm + $urandom_range(0, 8 - len);
            automatic bit inord = $urandom_range(0, 1);
            automatic logic [31:0] wdl [$], rdl [$];
            automatic sresp_e rsl [$];
            automatic bit el;
            wdl.delete();
            if ($urandom_range(0, 1)) begin
              for (int n = 0; n < len; n++) wdl.push_back($urandom);
              do_txn(mm, MCMD_WR, mk_addr(s, w0), len, 1'b1, BSEQ_INCR, inord, 4'hF, wdl, '{len}, rdl, rsl, el);
              check(!el && rsl.size() == len, "random write");
              for (int n = 0; n < len; n++) model_write(s, w0 + n, wdl[n], 4'hF);
            end else begin
              do_txn(mm, MCMD_RD, mk_addr(s, w0), len, 1'b1, BSEQ_INCR, inord, 4'hF, wdl, '{len}, rdl, rsl, el);
              check(!el && rdl.size() == len, "random read beats");
              for (int n = 0; n < len && n < rdl.size(); n++)
                check(rdl[n] == model[s][w0 + n], "random read data");
            end
          end
        join_none
      end
      wait fork;
    end

    // Every mechanism must have happened.
    check(n_order > 0,     "mechanism: rotating priority order");
    check(n_table2 > 0,    "mechanism: lower level wins when higher levels idle");
    check(n_contend > 0,   "mechanism: contention");
    check(n_rotate > 0,    "mechanism: priority rotation");
    check(n_thread0 > 0,   "mechanism: Thread0 (in-order)");
    check(n_thread1 > 0,   "mechanism: Thread1 (out-of-order)");
    check(n_pack > 0,      "mechanism: pack");
    check(n_unpack > 0,    "mechanism: unpack");
    check(n_precise > 0,   "mechanism: precise burst");
    check(n_wrap > 0,      "mechanism: WRAP burst");
    check(n_imprecise > 0, "mechanism: imprecise burst");
    check(n_be > 0,        "mechanism: byte enables");
    check(n_lock_err > 0,  "mechanism: lock error");
    check(n_unlock > 0,    "mechanism: unlock");
    check(n_wrc_ok > 0,    "mechanism: WRC success");
    check(n_wrc_fail > 0,  "mechanism: WRC failure");
    $display("mechanisms: contend=%0d rotate=%0d thread0=%0d thread1=%0d pack=%0d unpack=%0d precise=%0d wrap=%0d imprecise=%0d be=%0d lockerr=%0d unlock=%0d wrc_ok=%0d wrc_fail=%0d",
             n_contend, n_rotate, n_thread0, n_thread1, n_pack, n_unpack, n_precise, n_wrap,
             n_imprecise, n_be, n_lock_err, n_unlock, n_wrc_ok, n_wrc_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
