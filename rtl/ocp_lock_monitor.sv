// ocp_lock_monitor: locked (ReadEx) and reserved (ReadLinked) locations of
// an OCP slave.
//
// For each beat the slave presents MCmd, the core word address, MConnID and
// MThreadID; verdict_o says what the beat earns and write_ok_o whether the
// core may be written. check_i commits the beat's effect at the clock edge.
//
//   ReadEx (RDEX): locks the location for this master and thread. One lock
//     per master (MConnID); it is released by that master's write (WR or
//     WRC) from the same thread to the location.
//   ReadLinked (RDL): sets this master's reservation on the location (one
//     reservation per master, a new one replaces the old).
//   WriteConditional (WRC): writes and answers DVA only if this master holds
//     a reservation on the location; otherwise it answers FAIL and writes
//     nothing. A master cannot use another master's reservation.
//   Write (WR): always allowed (unless locked by someone else) and clears
//     every reservation on the location; a successful WRC does the same.
//   Any access to a location locked by another master or by another thread
//   of the same master answers ERR and changes nothing.
//
// Lock, reservation and FAIL behaviour follow the design description; one
// lock and one reservation per master, ERR for a locked location and the
// choice that only writes clear reservations are this design's reading.
module ocp_lock_monitor #(
  parameter int unsigned N_CONN = 4,
  parameter int unsigned AW     = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        check_i,
  input  ocp_pkg::mcmd_e              cmd_i,
  input  logic [AW-1:0]               addr_i,
  input  logic [ocp_pkg::CONN_W-1:0]  conn_i,
  input  logic                        thread_i,
  output ocp_pkg::sresp_e             verdict_o,
  output logic                        write_ok_o,
  output logic                        locked_other_o
);

  import ocp_pkg::*;

  logic [N_CONN-1:0] lock_v_q, resv_v_q;
  logic [AW-1:0]     lock_a_q [N_CONN];
  logic [N_CONN-1:0] lock_t_q;
  logic [AW-1:0]     resv_a_q [N_CONN];

  logic locked_other, own_resv;

  always_comb begin
    locked_other = 1'b0;
    for (int unsigned c = 0; c < N_CONN; c++)
      if (lock_v_q[c] && lock_a_q[c] == addr_i &&
          !(CONN_W'(c) == conn_i && lock_t_q[c] == thread_i))
        locked_other = 1'b1;
  end

  assign own_resv = (int'(conn_i) < N_CONN) && resv_v_q[conn_i] && resv_a_q[conn_i] == addr_i;

  always_comb begin
    verdict_o = SRESP_DVA;
    if (locked_other)                      verdict_o = SRESP_ERR;
    else if (cmd_i == MCMD_WRC && !own_resv) verdict_o = SRESP_FAIL;
  end

  assign write_ok_o     = is_write(cmd_i) && verdict_o == SRESP_DVA;
  assign locked_other_o = locked_other;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock_v_q <= '0;
      resv_v_q <= '0;
      lock_t_q <= '0;
      for (int unsigned c = 0; c < N_CONN; c++) begin
        lock_a_q[c] <= '0;
        resv_a_q[c] <= '0;
      end
    end else if (check_i && verdict_o == SRESP_DVA && int'(conn_i) < N_CONN) begin
      unique case (cmd_i)
        MCMD_RDEX: begin
          lock_v_q[conn_i] <= 1'b1;
          lock_a_q[conn_i] <= addr_i;
          lock_t_q[conn_i] <= thread_i;
        end
        MCMD_RDL: begin
          resv_v_q[conn_i] <= 1'b1;
          resv_a_q[conn_i] <= addr_i;
        end
        MCMD_WR, MCMD_WRC: begin
          if (lock_v_q[conn_i] && lock_a_q[conn_i] == addr_i && lock_t_q[conn_i] == thread_i)
            lock_v_q[conn_i] <= 1'b0;
          for (int unsigned c = 0; c < N_CONN; c++)
            if (resv_a_q[c] == addr_i) resv_v_q[c] <= 1'b0;
        end
        default: ;
      endcase
    end
  end

endmodule
