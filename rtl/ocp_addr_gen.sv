// ocp_addr_gen: burst address generator of an OCP slave.
//
// MAddr[31:2] is a word address in OCP words (MAddr[1:0] name the slave).
// On the first beat of a transaction the generator takes that word address
// as the burst base; each further beat advances it by one word:
//   * INCR: base + n;
//   * WRAP (precise bursts whose length is a power of two): the address runs
//     through the length-aligned block that holds the base and wraps back to
//     its start when it passes the block's end. Other WRAP bursts count as
//     INCR.
// The beat that carries MReqLast ends the burst. MAddrSpace picks a region
// of SPACE_WORDS words: the index of its lowest set bit is added as
// index*SPACE_WORDS (no bit set means region 0). The result, truncated to
// WORD_AW bits, is registered in the cycle the beat is accepted (beat_i) and
// is valid from the next cycle on.
//
// INCR/WRAP, MReqLast and the use of MAddrSpace to choose a region follow
// the design description; the wrap block, the region size and the region
// index rule are this design's reading of it.
module ocp_addr_gen #(
  parameter int unsigned WORD_AW     = 5,
  parameter int unsigned SPACE_WORDS = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         beat_i,
  input  logic [ocp_pkg::ADDR_W-1:0]   addr_i,
  input  logic [ocp_pkg::SPACE_W-1:0]  addr_space_i,
  input  logic [ocp_pkg::BLEN_W-1:0]   burst_len_i,
  input  logic                         burst_precise_i,
  input  ocp_pkg::bseq_e               burst_seq_i,
  input  logic                         req_last_i,
  output logic [WORD_AW-1:0]           word_o,
  output logic                         first_o
);

  localparam int unsigned W = ocp_pkg::ADDR_W - 2;

  logic          active_q;
  logic [W-1:0]  base_q, cnt_q;
  logic [W-1:0]  cur_base, cur_cnt, lin, wmask, word_d;
  logic [WORD_AW-1:0] word_q;
  logic          first_q;
  logic [W-1:0]  space_off;

  assign cur_base = active_q ? base_q : addr_i[ocp_pkg::ADDR_W-1:2];
  assign cur_cnt  = active_q ? cnt_q  : '0;
  assign lin      = cur_base + cur_cnt;
  assign wmask    = W'(burst_len_i) - W'(1);

  always_comb begin
    if (burst_seq_i == ocp_pkg::BSEQ_WRAP && burst_precise_i &&
        burst_len_i > 1 && (burst_len_i & (burst_len_i - 1'b1)) == '0)
      word_d = (cur_base & ~wmask) | (lin & wmask);
    else
      word_d = lin;
  end

  always_comb begin
    space_off = '0;
    for (int i = ocp_pkg::SPACE_W - 1; i >= 0; i--)
      if (addr_space_i[i]) space_off = W'(i) * W'(SPACE_WORDS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      base_q   <= '0;
      cnt_q    <= '0;
      word_q   <= '0;
      first_q  <= 1'b0;
    end else if (beat_i) begin
      base_q   <= cur_base;
      cnt_q    <= cur_cnt + W'(1);
      active_q <= !req_last_i;
      word_q   <= WORD_AW'(word_d + space_off);
      first_q  <= !active_q;
    end
  end

  assign word_o  = word_q;
  assign first_o = first_q;

endmodule
