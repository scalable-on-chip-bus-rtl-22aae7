// ocp_arbiter: rotating-priority arbiter for the shared OCP bus.
//
// A one-hot priority register (seq_o) names the master that currently has
// the highest priority. Priority then falls cyclically with the master
// index: with seq_o = 4'b0001, master 1 (index 0) is first, then 2, 3, 4.
// The decision starts at that first level and only passes to the next
// level when the master there does not request, so any requesting master
// is served. The grant is registered at the rising clock edge and held for
// the whole transaction; when the granted master reports done_i, the grant
// is dropped and the priority register is rotated once, so that the next
// master in turn becomes the most important one (whoever was served).
// After a completed transaction the bus is idle for one cycle before the
// next grant. Reset gives master 1 the highest priority.
//
// The rotate-once rule, the 4-bit priority register and the one-hot grant
// and priority vectors follow the design description; the idle cycle
// between grants and the reset value are this design's choices.
module ocp_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  input  logic [N-1:0] done_i,
  output logic [N-1:0] grant_o,
  output logic [N-1:0] seq_o
);

  logic [N-1:0] grant_q, seq_q, pick;

  // First requester found scanning upward (cyclically) from the master
  // whose priority bit is set.
  always_comb begin
    int unsigned top;
    int unsigned idx;
    logic        found;
    top   = 0;
    found = 1'b0;
    pick  = '0;
    for (int unsigned i = 0; i < N; i++)
      if (seq_q[i]) top = i;
    for (int unsigned k = 0; k < N; k++) begin
      idx = top + k;
      if (idx >= N) idx = idx - N;
      if (!found && req_i[idx]) begin
        pick[idx] = 1'b1;
        found     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant_q <= '0;
      seq_q   <= N'(1);
    end else if (grant_q != '0) begin
      if ((done_i & grant_q) != '0) begin
        grant_q <= '0;
        seq_q   <= {seq_q[N-2:0], seq_q[N-1]};
      end
    end else begin
      grant_q <= pick;
    end
  end

  assign grant_o = grant_q;
  assign seq_o   = seq_q;

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_q));
  a_seq_onehot:   assert property (@(posedge clk) disable iff (!rst_n) $onehot(seq_q));

endmodule
