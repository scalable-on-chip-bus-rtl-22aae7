// ocp_soc_top: shared OCP bus with four masters and four memory slaves.
//
// Each master connects one system initiator (its core_* ports) to the bus.
// A master with a command asks the rotating-priority arbiter for the bus;
// the granted master's request bundle reaches all slaves through the request
// mux, the decoder selects the slave named by MAddr[1:0], and that slave's
// response bundle returns to the masters through the response mux. The
// grant is held for the whole transaction (all beats of a burst and their
// responses) and released by the master's done pulse. Every slave drives a
// 64 x 16 asynchronous RAM through its pack/unpack logic, so one 32-bit OCP
// word occupies two RAM locations.
//
// Interface: per master i, the core_*_i inputs start a transaction and the
// core_*_o outputs return beats, read data and completion (see
// ocp_master). grant_o and seq_o show the arbiter's one-hot grant and
// priority register; tag_reject_o and thread_wait_o show the masters' tag
// rejections and thread waits. All logic runs on clk with synchronous
// active-low reset.
//
// The structure (four masters, four slaves, arbiter, decoder, request and
// response muxes, 64 x 16 asynchronous RAM behind each slave) follows the
// design description; the initiators themselves are outside this design.
// The request and response bundles pass combinationally between master and
// slave in both directions (MCmd to SCmdAccept, SResp to MRespAccept); a lint
// tool may see this as a loop of whole structs, but no field depends on
// itself.
module ocp_soc_top #(
  parameter int unsigned N_MASTERS = 4,
  parameter int unsigned N_SLAVES  = 4,
  parameter int unsigned CORE_W    = 16,
  parameter int unsigned RAM_DEPTH = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        core_start_i   [N_MASTERS],
  input  ocp_pkg::mcmd_e              core_cmd_i     [N_MASTERS],
  input  logic [ocp_pkg::ADDR_W-1:0]  core_addr_i    [N_MASTERS],
  input  logic [ocp_pkg::BE_W-1:0]    core_be_i      [N_MASTERS],
  input  logic [ocp_pkg::SPACE_W-1:0] core_space_i   [N_MASTERS],
  input  logic [ocp_pkg::BLEN_W-1:0]  core_blen_i    [N_MASTERS],
  input  logic                        core_precise_i [N_MASTERS],
  input  ocp_pkg::bseq_e              core_seq_i     [N_MASTERS],
  input  logic                        core_in_order_i[N_MASTERS],
  input  logic [ocp_pkg::DATA_W-1:0]  core_wdata_i   [N_MASTERS],
  output logic                        core_beat_o    [N_MASTERS],
  output logic                        core_rvalid_o  [N_MASTERS],
  output logic [ocp_pkg::DATA_W-1:0]  core_rdata_o   [N_MASTERS],
  output ocp_pkg::sresp_e             core_rresp_o   [N_MASTERS],
  output logic                        core_busy_o    [N_MASTERS],
  output logic                        core_done_o    [N_MASTERS],
  output logic                        core_err_o     [N_MASTERS],
  output logic                        tag_reject_o   [N_MASTERS],
  output logic                        thread_wait_o  [N_MASTERS],
  output logic [N_MASTERS-1:0]        grant_o,
  output logic [N_MASTERS-1:0]        seq_o
);

  import ocp_pkg::*;

  localparam int unsigned RAM_AW = $clog2(RAM_DEPTH);

  ocp_req_t           m_req  [N_MASTERS];
  ocp_resp_t          s_resp [N_SLAVES];
  ocp_req_t           bus_req;
  ocp_resp_t          bus_resp;
  logic [N_MASTERS-1:0] m_bus_req, m_bus_done, grant;
  logic [N_SLAVES-1:0]  sel;

  ocp_arbiter #(.N(N_MASTERS)) u_arbiter (
    .clk, .rst_n,
    .req_i  (m_bus_req),
    .done_i (m_bus_done),
    .grant_o(grant),
    .seq_o  (seq_o)
  );
  assign grant_o = grant;

  for (genvar i = 0; i < N_MASTERS; i++) begin : g_master
    ocp_master #(.MASTER_ID(i)) u_master (
      .clk, .rst_n,
      .core_start_i   (core_start_i[i]),
      .core_cmd_i     (core_cmd_i[i]),
      .core_addr_i    (core_addr_i[i]),
      .core_be_i      (core_be_i[i]),
      .core_space_i   (core_space_i[i]),
      .core_blen_i    (core_blen_i[i]),
      .core_precise_i (core_precise_i[i]),
      .core_seq_i     (core_seq_i[i]),
      .core_in_order_i(core_in_order_i[i]),
      .core_wdata_i   (core_wdata_i[i]),
      .core_beat_o    (core_beat_o[i]),
      .core_rvalid_o  (core_rvalid_o[i]),
      .core_rdata_o   (core_rdata_o[i]),
      .core_rresp_o   (core_rresp_o[i]),
      .core_busy_o    (core_busy_o[i]),
      .core_done_o    (core_done_o[i]),
      .core_err_o     (core_err_o[i]),
      .tag_reject_o   (tag_reject_o[i]),
      .thread_wait_o  (thread_wait_o[i]),
      .bus_req_o      (m_bus_req[i]),
      .bus_grant_i    (grant[i]),
      .bus_done_o     (m_bus_done[i]),
      .req_o          (m_req[i]),
      .resp_i         (grant[i] ? bus_resp : RESP_NULL)
    );
  end

  ocp_req_mux #(.N(N_MASTERS)) u_req_mux (
    .req_i  (m_req),
    .grant_i(grant),
    .req_o  (bus_req)
  );

  ocp_decoder #(.N(N_SLAVES)) u_decoder (
    .valid_i(|grant),
    .addr_i (bus_req.addr),
    .sel_o  (sel)
  );

  ocp_resp_mux #(.N(N_SLAVES)) u_resp_mux (
    .resp_i(s_resp),
    .sel_i (sel),
    .resp_o(bus_resp)
  );

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    logic [RAM_AW-1:0]   ram_addr;
    logic [CORE_W-1:0]   ram_wdata, ram_rdata;
    logic                ram_we;
    logic [CORE_W/8-1:0] ram_be;

    ocp_slave #(.CORE_W(CORE_W), .RAM_AW(RAM_AW), .N_CONN(N_MASTERS)) u_slave (
      .clk, .rst_n,
      .req_i       (bus_req),
      .sel_i       (sel[s]),
      .resp_o      (s_resp[s]),
      .core_addr_o (ram_addr),
      .core_wdata_o(ram_wdata),
      .core_we_o   (ram_we),
      .core_be_o   (ram_be),
      .core_rdata_i(ram_rdata)
    );

    ocp_async_ram #(.DEPTH(RAM_DEPTH), .WIDTH(CORE_W)) u_ram (
      .clk,
      .addr (ram_addr),
      .wdata(ram_wdata),
      .we   (ram_we),
      .be   (ram_be),
      .rdata(ram_rdata)
    );
  end

endmodule
