// ocp_slave: OCP slave interface in front of a narrow memory core.
//
// One request beat is handled at a time, in four steps:
//   IDLE  - when the decoder selects this slave and MCmd is not IDLE (for a
//           write also MDataValid), the beat is taken into registers and
//           acknowledged in the same cycle with SCmdAccept (and SDataAccept
//           for a write). The address generator turns MAddr, MAddrSpace and
//           the burst position into a core word address.
//   CHECK - error check: a write whose MData does not match the parity in
//           MDataInfo[3:0] answers ERR; otherwise the lock monitor decides
//           (ReadEx/ReadLinked/WriteConditional rules, ERR on a location
//           locked by someone else, FAIL for a WriteConditional without
//           reservation) and records the beat's lock or reservation.
//   CORE  - 32/CORE_W core cycles, one per lane: a write is unpacked and
//           written lane by lane with the MByteEn bits of that lane; a read
//           is packed lane by lane from the asynchronous core read port.
//           Skipped when the beat failed.
//   RESP  - SResp (DVA, FAIL or ERR) is driven with SData, SDataInfo (parity
//           of SData), SByteEn (the beat's MByteEn), SRespLast (the beat's
//           MReqLast), STagID and SThreadID (copies of MTagID and MThreadID)
//           until the master answers MRespAccept.
// A beat therefore takes 3 + 32/CORE_W cycles plus the master's response
// acceptance. SThreadBusy has the bit of the thread in progress set from
// acceptance to the end of the response. Every read and write receives a
// response, as the design description asks for writes too.
//
// The register stage, address generator, pack/unpack, error check and
// SResp acknowledge follow the design description; the exact cycle
// sequence, parity format and response fields are this design's choices.
module ocp_slave #(
  parameter int unsigned CORE_W      = 16,
  parameter int unsigned RAM_AW      = 6,
  parameter int unsigned N_CONN      = 4,
  parameter int unsigned SPACE_WORDS = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ocp_pkg::ocp_req_t      req_i,
  input  logic                   sel_i,
  output ocp_pkg::ocp_resp_t     resp_o,
  output logic [RAM_AW-1:0]      core_addr_o,
  output logic [CORE_W-1:0]      core_wdata_o,
  output logic                   core_we_o,
  output logic [CORE_W/8-1:0]    core_be_o,
  input  logic [CORE_W-1:0]      core_rdata_i
);

  import ocp_pkg::*;

  localparam int unsigned RATIO   = DATA_W / CORE_W;
  localparam int unsigned LANE_W  = (RATIO > 1) ? $clog2(RATIO) : 1;
  localparam int unsigned LANE_AW = (RATIO > 1) ? $clog2(RATIO) : 0;
  localparam int unsigned WORD_AW = RAM_AW - LANE_AW;

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_CORE, S_RESP} state_e;

  state_e             state_q;
  logic               accept;
  mcmd_e              r_cmd;
  logic [DATA_W-1:0]  r_data;
  logic [BE_W-1:0]    r_be;
  logic [INFO_W-1:0]  r_info;
  logic               r_last, r_thread, r_wok;
  logic [TAG_W-1:0]   r_tag;
  logic [CONN_W-1:0]  r_conn;
  sresp_e             r_resp, verdict, lock_verdict;
  logic [LANE_W-1:0]  lane_q;
  logic [WORD_AW-1:0] word;
  logic               par_err, lock_wok;
  logic [DATA_W-1:0]  packed_word;
  logic [CORE_W-1:0]  lane_data;
  logic [CORE_W/8-1:0] lane_be;

  assign accept = (state_q == S_IDLE) && sel_i && (req_i.cmd != MCMD_IDLE) &&
                  (!is_write(req_i.cmd) || req_i.data_valid);

  ocp_addr_gen #(.WORD_AW(WORD_AW), .SPACE_WORDS(SPACE_WORDS)) u_addr_gen (
    .clk, .rst_n,
    .beat_i         (accept),
    .addr_i         (req_i.addr),
    .addr_space_i   (req_i.addr_space),
    .burst_len_i    (req_i.burst_len),
    .burst_precise_i(req_i.burst_precise),
    .burst_seq_i    (req_i.burst_seq),
    .req_last_i     (req_i.req_last),
    .word_o         (word),
    .first_o        ()
  );

  assign par_err = is_write(r_cmd) && (parity_info(r_data)[BE_W-1:0] != r_info[BE_W-1:0]);

  ocp_lock_monitor #(.N_CONN(N_CONN), .AW(WORD_AW)) u_lock (
    .clk, .rst_n,
    .check_i       ((state_q == S_CHECK) && !par_err),
    .cmd_i         (r_cmd),
    .addr_i        (word),
    .conn_i        (r_conn),
    .thread_i      (r_thread),
    .verdict_o     (lock_verdict),
    .write_ok_o    (lock_wok),
    .locked_other_o()
  );

  assign verdict = par_err ? SRESP_ERR : lock_verdict;

  ocp_unpack #(.CORE_W(CORE_W)) u_unpack (
    .word_i     (r_data),
    .byte_en_i  (r_be),
    .lane_i     (lane_q),
    .lane_data_o(lane_data),
    .lane_be_o  (lane_be)
  );

  ocp_pack #(.CORE_W(CORE_W)) u_pack (
    .clk, .rst_n,
    .clear_i    (state_q == S_CHECK),
    .load_i     (state_q == S_CORE && is_read(r_cmd)),
    .lane_i     (lane_q),
    .lane_data_i(core_rdata_i),
    .word_o     (packed_word)
  );

  if (LANE_AW > 0) begin : g_lane_addr
    assign core_addr_o = {word, lane_q[LANE_AW-1:0]};
  end else begin : g_word_addr
    assign core_addr_o = word;
  end
  assign core_wdata_o = lane_data;
  assign core_be_o    = lane_be;
  assign core_we_o    = (state_q == S_CORE) && r_wok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      r_cmd    <= MCMD_IDLE;
      r_data   <= '0;
      r_be     <= '0;
      r_info   <= '0;
      r_last   <= 1'b0;
      r_thread <= 1'b0;
      r_tag    <= '0;
      r_conn   <= '0;
      r_resp   <= SRESP_NULL;
      r_wok    <= 1'b0;
      lane_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (accept) begin
          r_cmd    <= req_i.cmd;
          r_data   <= req_i.data;
          r_be     <= req_i.byte_en;
          r_info   <= req_i.data_info;
          r_last   <= req_i.req_last;
          r_thread <= req_i.thread_id;
          r_tag    <= req_i.tag_id;
          r_conn   <= req_i.conn_id;
          state_q  <= S_CHECK;
        end
        S_CHECK: begin
          r_resp <= verdict;
          r_wok  <= lock_wok && !par_err;
          lane_q <= '0;
          state_q <= (verdict == SRESP_DVA) ? S_CORE : S_RESP;
        end
        S_CORE: begin
          lane_q <= lane_q + LANE_W'(1);
          if (int'(lane_q) == RATIO - 1) begin
            r_wok   <= 1'b0;
            state_q <= S_RESP;
          end
        end
        S_RESP: if (sel_i && req_i.resp_accept) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    resp_o             = RESP_NULL;
    resp_o.cmd_accept  = accept;
    resp_o.data_accept = accept && is_write(req_i.cmd);
    resp_o.thread_busy = '0;
    if (state_q != S_IDLE) resp_o.thread_busy[r_thread] = 1'b1;
    if (state_q == S_RESP) begin
      resp_o.resp      = r_resp;
      resp_o.data      = (is_read(r_cmd) && r_resp == SRESP_DVA) ? packed_word : '0;
      resp_o.data_info = parity_info(resp_o.data);
      resp_o.byte_en   = r_be;
      resp_o.resp_last = r_last;
      resp_o.tag_id    = r_tag;
      resp_o.thread_id = r_thread;
    end
  end

  a_resp_until_accept: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RESP && !(sel_i && req_i.resp_accept)) |=> state_q == S_RESP);

endmodule
