// ocp_thread_arbiter: thread arbitration inside an OCP master.
//
// Each master and slave has two threads. In-order transfers (MTagInOrder = 1)
// use Thread0 and out-of-order transfers use Thread1. The slave reports in
// the 2-bit SThreadBusy which of its threads is busy (bit 0 Thread0, bit 1
// Thread1). The transfer may go (go_o) only while its thread is free at the
// slave; otherwise it waits. When both threads are busy, watch_o alternates
// between the two threads every clock cycle so that the master observes
// whichever one finishes first. Combinational except for that toggle.
//
// The thread mapping and SThreadBusy encoding follow the design description;
// waiting on the busy thread rather than moving the transfer to the other
// thread is this design's reading of it.
module ocp_thread_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tag_in_order_i,
  input  logic [1:0] sthreadbusy_i,
  output logic       thread_id_o,
  output logic       go_o,
  output logic       watch_o
);

  logic watch_q;

  assign thread_id_o = ~tag_in_order_i;
  assign go_o        = ~sthreadbusy_i[thread_id_o];

  always_ff @(posedge clk) begin
    if (!rst_n)                   watch_q <= 1'b0;
    else if (&sthreadbusy_i)      watch_q <= ~watch_q;
    else                          watch_q <= thread_id_o;
  end

  assign watch_o = (&sthreadbusy_i) ? watch_q : thread_id_o;

endmodule
