// tb_ocp_soc_top_core8: the four-master, four-slave bus with 8-bit slave
// cores, so that every 32-bit OCP word is unpacked into four core writes and
// packed from four core reads.
//
// With CORE_W = 8 and 64 core locations each slave holds 16 OCP words. A
// shadow copy of every slave memory is compared byte by byte with a
// reference model after each write, so the lane order (lane 0 = byte 0 of
// MData at core address 4*word) and the byte enables are checked where they
// land, not only through read-back. Steps:
//   1. one single write and read per slave, timed: counted from the cycle
//      after the start strobe to done, a single transfer through the bus
//      takes 9 cycles with 16-bit cores; four lanes instead of two add two
//      core cycles, so 11 here;
//   2. byte-enabled writes: only the enabled core bytes may change;
//   3. a precise INCR write burst and a WRAP read burst of 4 words;
//   4. random traffic from all four masters at once, each in its own words.
// Unpack and pack core cycles are counted; none seen counts as a failure.
module tb_ocp_soc_top_core8;
  import ocp_pkg::*;

  localparam int NM    = 4;
  localparam int NS    = 4;
  localparam int DEPTH = 64;
  localparam int WORDS = DEPTH / 4;

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

  ocp_soc_top #(.CORE_W(8), .RAM_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_pack = 0, n_unpack = 0;

  logic [31:0] model  [NS][WORDS];
  logic [7:0]  shadow [NS][DEPTH];

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

  // Every core byte of slave s must equal the model's byte of its word.
  task automatic check_core(int s, string what);
    bit ok = 1'b1;
    for (int a = 0; a < DEPTH; a++)
      if (shadow[s][a] !== model[s][a / 4][8*(a % 4) +: 8]) ok = 1'b0;
    check(ok, what);
  endtask

  // One transaction on master m; returns read data, responses and the
  // number of cycles from the cycle after the start strobe to done.
  task automatic do_txn(input int m, input mcmd_e cmd, input logic [31:0] addr,
                        input int len, input bseq_e seq, input logic [3:0] be,
                        input logic [31:0] wdata [$],
                        output logic [31:0] rdata [$], output sresp_e resps [$],
                        output int cycles);
    int beat;
    bit adv;
    beat = 0;
    adv  = 1'b0;
    cycles = 0;
    rdata.delete();
    resps.delete();
    @(negedge clk);
    core_start_i[m]    = 1'b1;
    core_cmd_i[m]      = cmd;
    core_addr_i[m]     = addr;
    core_be_i[m]       = be;
    core_space_i[m]    = 8'h01;
    core_blen_i[m]     = BLEN_W'(len);
    core_precise_i[m]  = 1'b1;
    core_seq_i[m]      = seq;
    core_in_order_i[m] = 1'b1;
    core_wdata_i[m]    = (wdata.size() > 0) ? wdata[0] : '0;
    @(negedge clk);
    core_start_i[m] = 1'b0;
    forever begin
      cycles++;
      if (adv) begin
        if (beat < wdata.size()) core_wdata_i[m] = wdata[beat];
        adv = 1'b0;
      end
      if (core_rvalid_o[m]) rdata.push_back(core_rdata_o[m]);
      if (core_busy_o[m] && core_rresp_o[m] != SRESP_NULL) resps.push_back(core_rresp_o[m]);
      if (core_beat_o[m]) begin
        beat++;
        adv = 1'b1;
      end
      if (core_done_o[m]) break;
      @(negedge clk);
    end
  endtask

  for (genvar gs = 0; gs < NS; gs++) begin : g_probe
    always @(negedge clk) begin
      for (int a = 0; a < DEPTH; a++) shadow[gs][a] = dut.g_slave[gs].u_ram.mem[a];
      if (rst_n && dut.g_slave[gs].u_slave.u_pack.load_i) n_pack++;
      if (rst_n && dut.g_slave[gs].ram_we) n_unpack++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd [$], d;
    sresp_e rs [$];
    int cyc, w;
    logic [3:0] be;
    for (int m = 0; m < NM; m++) begin
      core_start_i[m] = 0; core_cmd_i[m] = MCMD_IDLE; core_addr_i[m] = 0; core_be_i[m] = 0;
      core_space_i[m] = 0; core_blen_i[m] = 1; core_precise_i[m] = 1; core_seq_i[m] = BSEQ_INCR;
      core_in_order_i[m] = 1; core_wdata_i[m] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // Step 1: fill every word (the memories start random), then a timed
    // single write and read per slave.
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < WORDS; i++) begin
        d = $urandom;
        do_txn(s, MCMD_WR, mk_addr(s, i), 1, BSEQ_INCR, 4'hF, '{d}, rd, rs, cyc);
        model_write(s, i, d, 4'hF);
      end
    @(negedge clk);
    for (int s = 0; s < NS; s++) check_core(s, $sformatf("fill slave %0d", s));
    for (int s = 0; s < NS; s++) begin
      d = 32'hA1B2_C3D4 ^ s;
      do_txn((s + 1) % NM, MCMD_WR, mk_addr(s, 3), 1, BSEQ_INCR, 4'hF, '{d}, rd, rs, cyc);
      check(rs.size() == 1 && rs[0] == SRESP_DVA, "single write DVA");
      check(cyc == 11, $sformatf("single write takes 11 cycles (got %0d)", cyc));
      model_write(s, 3, d, 4'hF);
      @(negedge clk);
      check(shadow[s][12] == d[7:0] && shadow[s][13] == d[15:8] &&
            shadow[s][14] == d[23:16] && shadow[s][15] == d[31:24],
            "unpacked lanes in byte order");
      do_txn((s + 2) % NM, MCMD_RD, mk_addr(s, 3), 1, BSEQ_INCR, 4'hF, '{}, rd, rs, cyc);
      check(rd.size() == 1 && rd[0] == d, "packed read");
      check(cyc == 11, $sformatf("single read takes 11 cycles (got %0d)", cyc));
    end

    // Step 2: byte-enabled writes.
    for (int k = 0; k < 16; k++) begin
      int s;
      s  = k % NS;
      w  = $urandom_range(0, WORDS - 1);
      be = 4'($urandom_range(1, 15));
      d  = $urandom;
      do_txn(k % NM, MCMD_WR, mk_addr(s, w), 1, BSEQ_INCR, be, '{d}, rd, rs, cyc);
      model_write(s, w, d, be);
      @(negedge clk);
      check_core(s, $sformatf("byte enable %b", be));
    end

    // Step 3: bursts of four words.
    begin
      logic [31:0] wd [$];
      wd = '{32'h0102_0304, 32'h1112_1314, 32'h2122_2324, 32'h3132_3334};
      do_txn(0, MCMD_WR, mk_addr(2, 8), 4, BSEQ_INCR, 4'hF, wd, rd, rs, cyc);
      check(rs.size() == 4, "burst write four responses");
      for (int n = 0; n < 4; n++) model_write(2, 8 + n, wd[n], 4'hF);
      @(negedge clk);
      check_core(2, "burst write");
      do_txn(1, MCMD_RD, mk_addr(2, 10), 4, BSEQ_WRAP, 4'hF, '{}, rd, rs, cyc);
      check(rd.size() == 4, "WRAP read four words");
      for (int n = 0; n < 4 && n < rd.size(); n++)
        check(rd[n] == model[2][8 + ((10 + n) % 4)], $sformatf("WRAP word %0d", n));
    end

    // Step 4: all masters at once; master m uses words 4m..4m+3 of each slave.
    fork
      for (int mm = 0; mm < NM; mm++) begin
        automatic int m = mm;
        fork
          begin
            logic [31:0] rdl [$], dl;
            sresp_e rsl [$];
            int cl, sl, wl;
            for (int k = 0; k < 12; k++) begin
              sl = $urandom_range(0, NS - 1);
              wl = 4 * m + $urandom_range(0, 3);
              if ($urandom_range(0, 1)) begin
                dl = $urandom;
                do_txn(m, MCMD_WR, mk_addr(sl, wl), 1, BSEQ_INCR, 4'hF, '{dl}, rdl, rsl, cl);
                model_write(sl, wl, dl, 4'hF);
              end else begin
                do_txn(m, MCMD_RD, mk_addr(sl, wl), 1, BSEQ_INCR, 4'hF, '{}, rdl, rsl, cl);
                check(rdl.size() == 1 && rdl[0] == model[sl][wl],
                      $sformatf("M%0d concurrent read", m + 1));
              end
            end
          end
        join_none
      end
    join
    wait fork;
    @(negedge clk);
    for (int s = 0; s < NS; s++) check_core(s, $sformatf("final contents slave %0d", s));

    check(n_unpack > 0, "unpack happened");
    check(n_pack > 0, "pack happened");
    $display("mechanisms: unpack core writes=%0d pack core reads=%0d", n_unpack, n_pack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
