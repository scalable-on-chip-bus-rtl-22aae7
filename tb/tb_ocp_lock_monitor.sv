// tb_ocp_lock_monitor: directed ReadEx / ReadLinked / WriteConditional
// sequences with the SResp each beat must earn: lock blocks other masters
// and other threads with ERR until the owner's write; WRC needs the
// master's own reservation, and any write to the location clears it.
module tb_ocp_lock_monitor;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chk = 0, thr = 0;
  mcmd_e cmd = MCMD_IDLE;
  logic [4:0] addr = 0;
  logic [1:0] conn = 0;
  sresp_e v;
  logic wok, lo;
  int checks = 0, failures = 0;
  ocp_lock_monitor #(.N_CONN(4), .AW(5)) dut (.clk, .rst_n, .check_i(chk), .cmd_i(cmd), .addr_i(addr),
    .conn_i(conn), .thread_i(thr), .verdict_o(v), .write_ok_o(wok), .locked_other_o(lo));
  task automatic beat(mcmd_e c, int a, int m, bit t, sresp_e exp, string what);
    @(negedge clk);
    cmd = c; addr = 5'(a); conn = 2'(m); thr = t; chk = 1;
    #1;
    checks++;
    if (v != exp || wok != (is_write(c) && exp == SRESP_DVA)) begin
      failures++; $display("FAIL %s: got %s", what, v.name());
    end
    @(negedge clk);
    chk = 0;
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
    beat(MCMD_RD,   5, 0, 0, SRESP_DVA,  "plain read");
    beat(MCMD_RDEX, 5, 0, 0, SRESP_DVA,  "M1 ReadEx");
    beat(MCMD_RD,   5, 1, 0, SRESP_ERR,  "M2 read locked");
    beat(MCMD_WR,   5, 2, 1, SRESP_ERR,  "M3 write locked");
    beat(MCMD_RDEX, 5, 3, 0, SRESP_ERR,  "M4 ReadEx locked");
    beat(MCMD_RD,   5, 0, 1, SRESP_ERR,  "M1 other thread locked");
    beat(MCMD_RD,   6, 1, 0, SRESP_DVA,  "M2 other location");
    beat(MCMD_RD,   5, 0, 0, SRESP_DVA,  "owner read");
    beat(MCMD_WR,   5, 0, 0, SRESP_DVA,  "owner write unlocks");
    beat(MCMD_RD,   5, 1, 0, SRESP_DVA,  "M2 read after unlock");
    beat(MCMD_WRC,  9, 0, 0, SRESP_FAIL, "WRC without reservation");
    beat(MCMD_RDL,  9, 0, 0, SRESP_DVA,  "M1 ReadLinked");
    beat(MCMD_RDL,  9, 1, 0, SRESP_DVA,  "M2 ReadLinked");
    beat(MCMD_WRC,  9, 2, 0, SRESP_FAIL, "M3 cannot use others' reservation");
    beat(MCMD_WRC,  9, 1, 1, SRESP_DVA,  "M2 WRC succeeds");
    beat(MCMD_WRC,  9, 0, 0, SRESP_FAIL, "M1 reservation cleared by M2 WRC");
    beat(MCMD_RDL,  9, 0, 0, SRESP_DVA,  "M1 ReadLinked again");
    beat(MCMD_WR,   9, 3, 0, SRESP_DVA,  "M4 plain write");
    beat(MCMD_WRC,  9, 0, 0, SRESP_FAIL, "M1 reservation cleared by write");
    beat(MCMD_RDL, 10, 2, 0, SRESP_DVA,  "M3 ReadLinked 10");
    beat(MCMD_RDL, 11, 2, 0, SRESP_DVA,  "M3 new reservation replaces old");
    beat(MCMD_WRC, 10, 2, 0, SRESP_FAIL, "M3 old reservation gone");
    beat(MCMD_WRC, 11, 2, 0, SRESP_DVA,  "M3 WRC new reservation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
