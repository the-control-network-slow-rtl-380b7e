// bc_errlog: error logbook and interrupt line of the BC.
//
// Every error the BC can detect has one flag in the 16-bit logbook (bit
// order in bc_pkg::err_bit_e). A flag is set by a pulse or a level on its
// set_i bit and stays set until the RCU resets the logbook (RERLBK) or the
// whole BC (BCRST), both given as clr_i. A condition that is still present
// after a reset sets its flag again on the next cycle.
//
// Interrupt: whenever a flag goes from 0 to 1, int_o is raised. The RCU
// acknowledges by pulling the INT line low, seen here as int_ack_i; its
// rising edge (after a 2-flop synchronizer) drops int_o. The RCU is then
// expected to read the logbook. A new flag raised after the acknowledge
// raises int_o again; one raised in the same cycle as the acknowledge wins.
// clr_i also drops int_o.
//
// Flags and the INT/acknowledge scheme follow the BC description; the
// synchronizer and edge-triggered acknowledge are this design's choices.
module bc_errlog
  import bc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_i,
  input  logic [N_ERR-1:0] set_i,
  input  logic             int_ack_i,
  output logic [N_ERR-1:0] log_o,
  output logic             int_o
);

  logic [2:0] ack_q;
  logic       ack_rise, new_err;

  assign ack_rise = ack_q[1] & ~ack_q[2];
  assign new_err  = |(set_i & ~log_o) & ~clr_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= '0;
      log_o <= '0;
      int_o <= 1'b0;
    end else begin
      ack_q <= {ack_q[1:0], int_ack_i};
      if (clr_i) log_o <= '0;
      else       log_o <= log_o | set_i;
      if (new_err)       int_o <= 1'b1;
      else if (ack_rise || clr_i) int_o <= 1'b0;
    end
  end

endmodule
