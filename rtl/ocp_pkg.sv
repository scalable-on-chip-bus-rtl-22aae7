// ocp_pkg: types and constants shared by every block of the OCP shared bus.
//
// The bus carries one Open Core Protocol (OCP) request bundle from the
// granted master to the selected slave and one response bundle back. Both
// bundles are packed structs so that the request and response muxes can
// select a whole bundle at once.
//
// Taken from the design description: 32-bit MAddr, MData and SData, the 3-bit
// MCmd codes (IDLE 000, RD 001, RDEX 010, RDL 011, WR 100, WRC 101), a 2-bit
// SResp, a 4-bit MByteEn, a 2-bit SThreadBusy (bit 0 Thread0, bit 1 Thread1),
// a 16-bit MDataInfo whose lower byte carries parity, an 8-bit MAddrSpace,
// the burst signals (MBurstLength, MBurstPrecise, MBurstSeq INCR/WRAP,
// MReqLast, SRespLast), the tag signals (MTagID, MTagInOrder, STagID) and the
// thread signals (MThreadID, MConnID).
// Choices of this design: the SResp encoding follows the usual OCP one
// (NULL 00, DVA 01, FAIL 10, ERR 11); the parity byte holds one even-parity
// bit per data byte in bits [3:0]; tags are 3 bits and MBurstLength 8 bits.
package ocp_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned BE_W     = DATA_W / 8;
  localparam int unsigned TAG_W    = 3;
  localparam int unsigned BLEN_W   = 8;
  localparam int unsigned CONN_W   = 2;
  localparam int unsigned SPACE_W  = 8;
  localparam int unsigned INFO_W   = 16;
  localparam int unsigned THREADS  = 2;

  typedef enum logic [2:0] {
    MCMD_IDLE = 3'b000,
    MCMD_RD   = 3'b001,
    MCMD_RDEX = 3'b010,
    MCMD_RDL  = 3'b011,
    MCMD_WR   = 3'b100,
    MCMD_WRC  = 3'b101
  } mcmd_e;

  typedef enum logic [1:0] {
    SRESP_NULL = 2'b00,
    SRESP_DVA  = 2'b01,
    SRESP_FAIL = 2'b10,
    SRESP_ERR  = 2'b11
  } sresp_e;

  typedef enum logic {
    BSEQ_INCR = 1'b0,
    BSEQ_WRAP = 1'b1
  } bseq_e;

  // Request phase (master to slave) plus the master's response acknowledge.
  typedef struct packed {
    mcmd_e              cmd;           // MCmd
    logic [ADDR_W-1:0]  addr;          // MAddr: [1:0] slave select, [31:2] word
    logic [DATA_W-1:0]  data;          // MData
    logic               data_valid;    // MDataValid
    logic [BE_W-1:0]    byte_en;       // MByteEn
    logic [SPACE_W-1:0] addr_space;    // MAddrSpace
    logic [INFO_W-1:0]  data_info;     // MDataInfo
    logic [BLEN_W-1:0]  burst_len;     // MBurstLength
    logic               burst_precise; // MBurstPrecise
    bseq_e              burst_seq;     // MBurstSeq
    logic               req_last;      // MReqLast
    logic [TAG_W-1:0]   tag_id;        // MTagID
    logic               tag_in_order;  // MTagInOrder
    logic               thread_id;     // MThreadID
    logic [CONN_W-1:0]  conn_id;       // MConnID
    logic               resp_accept;   // MRespAccept
  } ocp_req_t;

  // Slave signals: request acknowledges and the response phase.
  typedef struct packed {
    logic               cmd_accept;    // SCmdAccept
    logic               data_accept;   // SDataAccept
    sresp_e             resp;          // SResp
    logic [DATA_W-1:0]  data;          // SData
    logic [INFO_W-1:0]  data_info;     // SDataInfo
    logic [BE_W-1:0]    byte_en;       // SByteEn
    logic               resp_last;     // SRespLast
    logic [TAG_W-1:0]   tag_id;        // STagID
    logic               thread_id;     // SThreadID
    logic [THREADS-1:0] thread_busy;   // SThreadBusy
  } ocp_resp_t;

  localparam ocp_req_t  REQ_IDLE  = '0;
  localparam ocp_resp_t RESP_NULL = '0;

  function automatic logic is_write(mcmd_e c);
    return (c == MCMD_WR) || (c == MCMD_WRC);
  endfunction

  function automatic logic is_read(mcmd_e c);
    return (c == MCMD_RD) || (c == MCMD_RDEX) || (c == MCMD_RDL);
  endfunction

  // Lower byte of MDataInfo / SDataInfo: even parity of each data byte.
  function automatic logic [INFO_W-1:0] parity_info(logic [DATA_W-1:0] d);
    logic [INFO_W-1:0] r;
    r = '0;
    for (int b = 0; b < BE_W; b++) r[b] = ^d[8*b +: 8];
    return r;
  endfunction

endpackage
