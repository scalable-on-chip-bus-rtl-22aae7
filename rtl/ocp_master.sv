// ocp_master: OCP master interface between a system initiator core and the
// shared OCP bus.
//
// The core starts a transaction with core_start_i, giving MCmd, the byte
// address (core_addr_i[1:0] name the slave), MByteEn, MAddrSpace, the burst
// parameters and whether the transaction is in-order (MTagInOrder). The
// master then steps through:
//   REQ    - request the bus from the arbiter and wait for the grant;
//   THREAD - drive MAddr so the decoder selects the slave, and let the thread
//            arbiter pick Thread0 (in-order) or Thread1 (out-of-order); wait
//            while the slave's SThreadBusy marks that thread busy, and while
//            the next tag is still outstanding; then take a new MTagID;
//   SEND   - drive one request beat (MCmd, MAddr, MData with MDataValid and
//            parity in MDataInfo for writes, MBurstLength, MReqLast, ...)
//            until SCmdAccept; core_beat_o then tells the core to present
//            the next beat's data (and, for imprecise bursts, length);
//   RESP   - wait for SResp, check STagID with the tag order unit and the
//            SData parity, answer MRespAccept in the same cycle and hand
//            read data to the core (core_rvalid_o). A response whose tag is
//            not acceptable is not passed on and marks the transaction as
//            failed. More beats return to SEND at the next word address;
//   DONE   - one cycle: core_done_o and bus_done_o (the arbiter releases the
//            bus and rotates its priority).
// A precise burst sends MBurstLength = core_blen_i (taken at start) on every
// beat and ends after that many beats. An imprecise burst sends the length
// the core presents for each beat and ends on the beat whose length is 1.
// INCR bursts step the address by one word (4 bytes); precise WRAP bursts
// with a power-of-two length wrap inside the length-aligned block.
// core_err_o, valid with core_done_o, is set if any beat answered FAIL or
// ERR, a tag was rejected or read parity was wrong.
//
// The transaction sequence, thread selection, tag check and burst signalling
// follow the design description. Not pipelined: one beat is outstanding at a
// time. Acknowledging a rejected response (and dropping it) instead of
// holding back MRespAccept is this design's choice, so a bad response cannot
// hold the shared bus for ever.
//
// Lint may report a combinational loop through resp_seen: MRespAccept
// (req_o) depends on SResp (resp_i), and the slave's SCmdAccept (resp_i)
// depends on MCmd (req_o). These are different fields of the two bundles and
// no field feeds back into itself; the loop exists only at the granularity
// of whole structs.
module ocp_master #(
  parameter int unsigned MASTER_ID = 0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // core interface
  input  logic                        core_start_i,
  input  ocp_pkg::mcmd_e              core_cmd_i,
  input  logic [ocp_pkg::ADDR_W-1:0]  core_addr_i,
  input  logic [ocp_pkg::BE_W-1:0]    core_be_i,
  input  logic [ocp_pkg::SPACE_W-1:0] core_space_i,
  input  logic [ocp_pkg::BLEN_W-1:0]  core_blen_i,
  input  logic                        core_precise_i,
  input  ocp_pkg::bseq_e              core_seq_i,
  input  logic                        core_in_order_i,
  input  logic [ocp_pkg::DATA_W-1:0]  core_wdata_i,
  output logic                        core_beat_o,
  output logic                        core_rvalid_o,
  output logic [ocp_pkg::DATA_W-1:0]  core_rdata_o,
  output ocp_pkg::sresp_e             core_rresp_o,
  output logic                        core_busy_o,
  output logic                        core_done_o,
  output logic                        core_err_o,
  output logic                        tag_reject_o,
  output logic                        thread_wait_o,
  // arbiter
  output logic                        bus_req_o,
  input  logic                        bus_grant_i,
  output logic                        bus_done_o,
  // OCP bus
  output ocp_pkg::ocp_req_t           req_o,
  input  ocp_pkg::ocp_resp_t          resp_i
);

  import ocp_pkg::*;

  typedef enum logic [2:0] {M_IDLE, M_REQ, M_THREAD, M_SEND, M_RESP, M_DONE} state_e;

  localparam int unsigned W = ADDR_W - 2;

  state_e            state_q;
  mcmd_e             t_cmd;
  logic [1:0]        t_slave;
  logic [W-1:0]      t_base, t_cnt;
  logic [BE_W-1:0]   t_be;
  logic [SPACE_W-1:0] t_space;
  logic [BLEN_W-1:0] t_len;
  logic              t_precise, t_in_order, t_err, t_last;
  bseq_e             t_seq;
  logic [TAG_W-1:0]  t_tag;

  logic              thread_id, thread_go;
  logic [TAG_W-1:0]  next_tag;
  logic              tag_full, tag_ok, tag_issue, tag_retire;
  logic [W-1:0]      lin, wmask, word;
  logic [BLEN_W-1:0] beat_len;
  logic              beat_last, resp_seen, par_ok, resp_final;

  ocp_thread_arbiter u_thread (
    .clk, .rst_n,
    .tag_in_order_i(t_in_order),
    .sthreadbusy_i (resp_i.thread_busy),
    .thread_id_o   (thread_id),
    .go_o          (thread_go),
    .watch_o       ()
  );

  ocp_tag_order #(.TAG_W(TAG_W)) u_tag (
    .clk, .rst_n,
    .issue_i     (tag_issue),
    .tag_o       (next_tag),
    .full_o      (tag_full),
    .stag_i      (resp_i.tag_id),
    .in_order_i  (t_in_order),
    .accept_o    (tag_ok),
    .expect_o    (),
    .retire_i    (tag_retire),
    .retire_tag_i(t_tag)
  );

  // Word address of the current beat.
  assign lin   = t_base + t_cnt;
  assign wmask = W'(t_len) - W'(1);
  always_comb begin
    if (t_seq == BSEQ_WRAP && t_precise && t_len > 1 && (t_len & (t_len - 1'b1)) == '0)
      word = (t_base & ~wmask) | (lin & wmask);
    else
      word = lin;
  end

  assign beat_len  = t_precise ? t_len : core_blen_i;
  assign beat_last = t_precise ? (t_cnt == W'(t_len) - W'(1) || t_len == '0) : (core_blen_i <= 1);

  assign resp_seen  = (state_q == M_RESP) && (resp_i.resp != SRESP_NULL);
  assign par_ok     = (parity_info(resp_i.data)[BE_W-1:0] == resp_i.data_info[BE_W-1:0]);
  assign resp_final = resp_seen && t_last;
  assign tag_issue  = (state_q == M_THREAD) && thread_go && !tag_full;
  assign tag_retire = resp_final;

  always_comb begin
    req_o = REQ_IDLE;
    if (state_q == M_THREAD || state_q == M_SEND || state_q == M_RESP) begin
      req_o.addr          = {word, t_slave};
      req_o.addr_space    = t_space;
      req_o.thread_id     = thread_id;
      req_o.conn_id       = CONN_W'(MASTER_ID);
      req_o.tag_in_order  = t_in_order;
      req_o.tag_id        = t_tag;
    end
    if (state_q == M_SEND) begin
      req_o.cmd           = t_cmd;
      req_o.byte_en       = t_be;
      req_o.burst_len     = beat_len;
      req_o.burst_precise = t_precise;
      req_o.burst_seq     = t_seq;
      req_o.req_last      = beat_last;
      if (is_write(t_cmd)) begin
        req_o.data       = core_wdata_i;
        req_o.data_valid = 1'b1;
        req_o.data_info  = parity_info(core_wdata_i);
      end
    end
    req_o.resp_accept = resp_seen;
  end

  assign bus_req_o     = (state_q == M_REQ) || (state_q == M_THREAD) ||
                         (state_q == M_SEND) || (state_q == M_RESP);
  assign bus_done_o    = (state_q == M_DONE);
  assign core_done_o   = (state_q == M_DONE);
  assign core_busy_o   = (state_q != M_IDLE);
  assign core_err_o    = t_err;
  assign core_beat_o   = (state_q == M_SEND) && resp_i.cmd_accept;
  assign core_rvalid_o = resp_seen && tag_ok && is_read(t_cmd);
  assign core_rdata_o  = resp_i.data;
  assign core_rresp_o  = resp_i.resp;
  assign tag_reject_o  = resp_seen && !tag_ok;
  assign thread_wait_o = (state_q == M_THREAD) && !thread_go;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= M_IDLE;
      t_cmd      <= MCMD_IDLE;
      t_slave    <= '0;
      t_base     <= '0;
      t_cnt      <= '0;
      t_be       <= '0;
      t_space    <= '0;
      t_len      <= '0;
      t_precise  <= 1'b0;
      t_in_order <= 1'b1;
      t_seq      <= BSEQ_INCR;
      t_err      <= 1'b0;
      t_last     <= 1'b0;
      t_tag      <= '0;
    end else begin
      unique case (state_q)
        M_IDLE: if (core_start_i && core_cmd_i != MCMD_IDLE) begin
          t_cmd      <= core_cmd_i;
          t_slave    <= core_addr_i[1:0];
          t_base     <= core_addr_i[ADDR_W-1:2];
          t_cnt      <= '0;
          t_be       <= core_be_i;
          t_space    <= core_space_i;
          t_len      <= core_blen_i;
          t_precise  <= core_precise_i;
          t_seq      <= core_seq_i;
          t_in_order <= core_in_order_i;
          t_err      <= 1'b0;
          state_q    <= M_REQ;
        end
        M_REQ:    if (bus_grant_i) state_q <= M_THREAD;
        M_THREAD: if (tag_issue) begin
          t_tag   <= next_tag;
          state_q <= M_SEND;
        end
        M_SEND: if (resp_i.cmd_accept) begin
          t_last  <= beat_last;
          state_q <= M_RESP;
        end
        M_RESP: if (resp_seen) begin
          if (!tag_ok || resp_i.resp != SRESP_DVA || (is_read(t_cmd) && !par_ok))
            t_err <= 1'b1;
          t_cnt   <= t_cnt + W'(1);
          state_q <= t_last ? M_DONE : M_SEND;
        end
        M_DONE:  state_q <= M_IDLE;
        default: state_q <= M_IDLE;
      endcase
    end
  end

  a_grant_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q inside {M_THREAD, M_SEND, M_RESP}) |-> bus_grant_i);

endmodule
