// ocp_tag_order: tag numbering and response ordering check of an OCP master.
//
// Every transaction the master starts takes the next tag (MTagID), counting
// 0, 1, 2, ... modulo 2**TAG_W, and is marked outstanding. When a response
// arrives with STagID, the unit judges it:
//   * in-order transaction (MTagInOrder = 1): acceptable only if STagID is
//     the oldest outstanding tag, i.e. responses come back in issue order;
//   * out-of-order transaction: acceptable if STagID is any outstanding tag.
// retire_i frees tag retire_tag_i when its transaction ends; the oldest pointer
// then moves past every tag that is no longer outstanding. full_o tells the
// master that the next tag is still in use and it must not issue.
// issue_i and retire_i take effect at the rising clock edge; accept_o and
// expect_o are combinational.
//
// Tag numbering, the in-order rule and the out-of-order acceptance follow
// the design description; the tag width and the bookkeeping are this
// design's choices.
module ocp_tag_order #(
  parameter int unsigned TAG_W = ocp_pkg::TAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             issue_i,
  output logic [TAG_W-1:0] tag_o,
  output logic             full_o,
  input  logic [TAG_W-1:0] stag_i,
  input  logic             in_order_i,
  output logic             accept_o,
  output logic [TAG_W-1:0] expect_o,
  input  logic             retire_i,
  input  logic [TAG_W-1:0] retire_tag_i
);

  localparam int unsigned NT = 2 ** TAG_W;

  logic [TAG_W-1:0] next_q, oldest_q, oldest_d;
  logic [NT-1:0]    out_q, out_d;

  assign tag_o    = next_q;
  assign full_o   = out_q[next_q];
  assign expect_o = oldest_q;
  assign accept_o = out_q[stag_i] && (!in_order_i || (stag_i == oldest_q));

  always_comb begin
    logic             found;
    logic [TAG_W-1:0] t;
    found = 1'b0;
    t     = '0;
    out_d = out_q;
    if (retire_i) out_d[retire_tag_i] = 1'b0;
    if (issue_i)  out_d[next_q] = 1'b1;
    // Oldest outstanding tag: first set bit from the old oldest pointer.
    oldest_d = oldest_q;
    if (!out_d[oldest_q]) begin
      oldest_d = issue_i ? next_q + TAG_W'(1) : next_q;
      for (int unsigned k = 1; k < NT; k++) begin
        t = oldest_q + TAG_W'(k);
        if (!found && out_d[t]) begin
          oldest_d = t;
          found    = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_q   <= '0;
      oldest_q <= '0;
      out_q    <= '0;
    end else begin
      out_q    <= out_d;
      oldest_q <= oldest_d;
      if (issue_i) next_q <= next_q + TAG_W'(1);
    end
  end

endmodule
