// bc_scope: state analyser for the ALTRO bus control signals.
//
// When an instruction starts (the RCLK tick, tick_i, on which CSTB is seen
// rising) the scope restarts and records DSTB, WRITE, ACK and TRSF on that tick and
// the following SCOPE_LEN-1 ticks, one sample per readout clock period.
// Bit i of each register is the sample taken i periods after the start, so
// the RCU can see which control signal was not generated as expected. The
// four registers (DSTBSC, WRSC, ACKSC, TRSFSC) keep the last instruction's
// record until the next instruction starts; bits not yet sampled read 0.
// The 10-sample depth and the four signals follow the buffer monitoring
// table; the bit order is this design's choice. soft_rst_i (BCRST) clears.
module bc_scope
  import bc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_rst_i,
  input  logic                 tick_i,
  input  altro_ctrl_t          ctrl_i,
  output logic [SCOPE_LEN-1:0] dstbsc_o,
  output logic [SCOPE_LEN-1:0] wrsc_o,
  output logic [SCOPE_LEN-1:0] acksc_o,
  output logic [SCOPE_LEN-1:0] trsfsc_o
);

  localparam int unsigned IW = $clog2(SCOPE_LEN + 1);
  logic [IW-1:0] idx;   // next sample position; SCOPE_LEN when done
  logic          cstb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= IW'(SCOPE_LEN);
      cstb_q <= 1'b0;
      dstbsc_o <= '0; wrsc_o <= '0; acksc_o <= '0; trsfsc_o <= '0;
    end else if (soft_rst_i) begin
      idx <= IW'(SCOPE_LEN);
      cstb_q <= 1'b0;
      dstbsc_o <= '0; wrsc_o <= '0; acksc_o <= '0; trsfsc_o <= '0;
    end else if (tick_i) begin
      cstb_q <= ctrl_i.cstb;
      if (ctrl_i.cstb && !cstb_q) begin
        idx      <= IW'(1);
        dstbsc_o <= SCOPE_LEN'(ctrl_i.dstb);
        wrsc_o   <= SCOPE_LEN'(ctrl_i.write);
        acksc_o  <= SCOPE_LEN'(ctrl_i.ack);
        trsfsc_o <= SCOPE_LEN'(ctrl_i.trsf);
      end else if (idx < IW'(SCOPE_LEN)) begin
        idx           <= idx + 1'b1;
        dstbsc_o[idx] <= ctrl_i.dstb;
        wrsc_o[idx]   <= ctrl_i.write;
        acksc_o[idx]  <= ctrl_i.ack;
        trsfsc_o[idx] <= ctrl_i.trsf;
      end
    end
  end

endmodule
