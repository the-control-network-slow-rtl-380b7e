// bc_clk_monitor: watchdog for a clock the BC does not run on.
//
// The readout clock (RCLK) and the sampling clock (SCLK) of the ALTROs are
// watched by counting their periods with the BC clock: mon_clk_i passes a
// 2-flop synchronizer and each rising edge gives a one-cycle rise_o pulse.
// If no rising edge is seen for TIMEOUT BC clock cycles, missing_o is high
// until the clock returns; it feeds RCKERR or SCKERR in the error logbook.
// rise_o of the RCLK watchdog is also the sampling tick of the ALTRO bus.
// The monitored clock must be slower than half the BC clock. Detecting
// missing clock periods follows the error logbook description; the
// synchronizer and the TIMEOUT value are this design's choices.
module bc_clk_monitor #(
  parameter int unsigned TIMEOUT = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mon_clk_i,
  output logic rise_o,
  output logic missing_o
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [2:0]    s;
  logic [TW-1:0] cnt;

  assign rise_o = s[1] & ~s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '0;
      cnt       <= '0;
      missing_o <= 1'b0;
    end else begin
      s <= {s[1:0], mon_clk_i};
      if (rise_o) begin
        cnt       <= '0;
        missing_o <= 1'b0;
      end else if (cnt < TW'(TIMEOUT)) begin
        cnt <= cnt + 1'b1;
      end else begin
        missing_o <= 1'b1;
      end
    end
  end

endmodule
