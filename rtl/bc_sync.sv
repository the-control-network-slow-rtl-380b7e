// bc_sync: two-flop synchronizer for WIDTH independent signals entering the
// BC clock domain. Output lags the input by two BC clock cycles. Multi-bit
// buses passed through it must be stable when they are used (the ALTRO bus
// is only used on the RCLK tick, half a period after it changed). The
// synchronizers are this design's own addition: the card's signals are
// asynchronous to the BC clock.
module bc_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q_o  <= '0;
    end else begin
      meta <= d_i;
      q_o  <= meta;
    end
  end

endmodule
