// bc_i2c_slave: I2C slave interface of the Board Controller.
//
// The RCU reaches every Board Controller through a shared two-wire I2C bus
// (SCL, SDA). This module is the byte-level slave: it oversamples SCL and SDA
// with the BC clock, detects START, repeated START and STOP, matches the
// 7-bit slave address, acknowledges address and written bytes, and shifts
// out read bytes supplied by the layer above.
//
// Interface to the layer above:
//   start_o    one-cycle pulse on every START / repeated START
//   stop_o     one-cycle pulse on STOP
//   rd_start_o pulse when this slave was addressed for reading
//   rx_valid_o pulse with rx_byte_o for each byte written by the master
//   tx_byte_i  byte to send; sampled on the SCL falling edge that starts it
//   tx_done_o  pulse when the master acknowledged a sent byte (the next
//              tx_byte_i is then loaded on the following SCL falling edge)
// SDA is open drain: sda_oe_o = 1 pulls the line low.
//
// Timing: SCL and SDA pass a 2-flop synchronizer, so the BC clock must be at
// least about 8 times the SCL rate (a 40 MHz BC clock serves the 100 kHz and
// 400 kHz modes). The bus protocol is standard I2C; the oversampled
// implementation is this design's choice.
module bc_i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] slave_addr_i,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_oe_o,
  output logic       start_o,
  output logic       stop_o,
  output logic       rd_start_o,
  output logic       rx_valid_o,
  output logic [7:0] rx_byte_o,
  input  logic [7:0] tx_byte_i,
  output logic       tx_done_o
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ADDR_ACK, S_RX, S_RX_ACK, S_TX, S_TX_ACK
  } state_e;

  state_e     state;
  logic [2:0] scl_q, sda_q;         // [0],[1] synchronizer, [2] previous
  logic       scl, sda, scl_rise, scl_fall, start_det, stop_det;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic       rw, mack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q <= '1;
      sda_q <= '1;
    end else begin
      scl_q <= {scl_q[1:0], scl_i};
      sda_q <= {sda_q[1:0], sda_i};
    end
  end

  assign scl       = scl_q[1];
  assign sda       = sda_q[1];
  assign scl_rise  = scl & ~scl_q[2];
  assign scl_fall  = ~scl & scl_q[2];
  assign start_det = scl & scl_q[2] & ~sda & sda_q[2];
  assign stop_det  = scl & scl_q[2] & sda & ~sda_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bitcnt     <= '0;
      shreg      <= '0;
      rw         <= 1'b0;
      mack       <= 1'b0;
      sda_oe_o   <= 1'b0;
      start_o    <= 1'b0;
      stop_o     <= 1'b0;
      rd_start_o <= 1'b0;
      rx_valid_o <= 1'b0;
      rx_byte_o  <= '0;
      tx_done_o  <= 1'b0;
    end else begin
      start_o    <= 1'b0;
      stop_o     <= 1'b0;
      rd_start_o <= 1'b0;
      rx_valid_o <= 1'b0;
      tx_done_o  <= 1'b0;
      if (start_det) begin
        state    <= S_ADDR;
        bitcnt   <= '0;
        sda_oe_o <= 1'b0;
        start_o  <= 1'b1;
      end else if (stop_det) begin
        state    <= S_IDLE;
        sda_oe_o <= 1'b0;
        stop_o   <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_RX: begin
            if (scl_rise && bitcnt < 4'd8) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 4'd1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              bitcnt <= '0;
              if (state == S_ADDR) begin
                if (shreg[7:1] == slave_addr_i) begin
                  sda_oe_o   <= 1'b1;
                  rw         <= shreg[0];
                  rd_start_o <= shreg[0];
                  state      <= S_ADDR_ACK;
                end else begin
                  state <= S_IDLE;
                end
              end else begin
                sda_oe_o   <= 1'b1;
                rx_valid_o <= 1'b1;
                rx_byte_o  <= shreg;
                state      <= S_RX_ACK;
              end
            end
          end
          S_ADDR_ACK, S_RX_ACK: begin
            if (scl_fall) begin
              if (state == S_ADDR_ACK && rw) begin
                shreg    <= {tx_byte_i[6:0], 1'b0};
                sda_oe_o <= ~tx_byte_i[7];
                bitcnt   <= 4'd1;
                state    <= S_TX;
              end else begin
                sda_oe_o <= 1'b0;
                state    <= S_RX;
              end
            end
          end
          S_TX: begin
            if (scl_fall) begin
              if (bitcnt == 4'd8) begin
                sda_oe_o <= 1'b0;
                state    <= S_TX_ACK;
              end else begin
                sda_oe_o <= ~shreg[7];
                shreg    <= {shreg[6:0], 1'b0};
                bitcnt   <= bitcnt + 4'd1;
              end
            end
          end
          S_TX_ACK: begin
            if (scl_rise) begin
              mack      <= ~sda;
              tx_done_o <= ~sda;
            end else if (scl_fall) begin
              if (mack) begin
                shreg    <= {tx_byte_i[6:0], 1'b0};
                sda_oe_o <= ~tx_byte_i[7];
                bitcnt   <= 4'd1;
                state    <= S_TX;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // SDA is only pulled low while acknowledging or sending, never when idle
  a_sda_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE || state == S_RX || state == S_TX_ACK) |-> !sda_oe_o);

endmodule
