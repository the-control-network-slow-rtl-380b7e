// bc_altro_monitor: ALTRO bus protocol checker and instruction decoder.
//
// The BC listens to the 40-bit bidirectional ALTRO bus (BD) and its control
// lines (CSTB, WRITE, ACK, TRSF, DSTB) between the RCU and the ALTRO chips
// of its card. The bus is sampled once per readout clock period: tick_i is a
// one-cycle pulse in the BC clock domain marking a rising edge of RCLK, and
// ctrl_i / bd_i must be stable at that point.
//
// An instruction starts on the tick where CSTB rises; BD then holds the
// instruction word (layout in bc_pkg::altro_instr_t). For every instruction
//   PERR    the word fails even parity over all 40 bits.
// For a parity-clean instruction to the ALTROs of this card (FEC address
// equal to fec_addr_i, or broadcast):
//   ISTERR  the code is not an ALTRO register or command.
//   RDERR   a read is broadcast, or ACK does not come within ACK_TIMEOUT
//           ticks, or CSTB drops before ACK (WRITE low).
//   WRERR   the same for a write (WRITE high); broadcast writes expect no
//           ACK.
//   ROERR   after the ACK of a channel readout (CHRDO) TRSF does not rise
//           within TRSF_TIMEOUT ticks, the transfer lasts more than
//           XFER_TIMEOUT ticks, or CHRDO is broadcast.
// Valid instructions are reported as events: wpinc_o, rpinc_o, chrdo_o with
// chip_o and bcast_o. A readout produces ro_start_o (at CHRDO),
// one dstb_o per tick with DSTB and TRSF high, and ro_end_o when TRSF falls
// or the readout fails. All outputs are one-cycle pulses.
//
// Which errors exist follows the BC error logbook; the exact rules, the
// instruction layout, the ALTRO codes and the timeouts are this design's
// reading of the ALTRO bus protocol.
module bc_altro_monitor
  import bc_pkg::*;
#(
  parameter int unsigned ACK_TIMEOUT  = 16,
  parameter int unsigned TRSF_TIMEOUT = 32,
  parameter int unsigned XFER_TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst_i,
  input  logic        tick_i,
  input  altro_ctrl_t ctrl_i,
  input  logic [39:0] bd_i,
  input  logic [4:0]  fec_addr_i,
  output logic        wpinc_o,
  output logic        rpinc_o,
  output logic        chrdo_o,
  output logic [2:0]  chip_o,
  output logic        bcast_o,
  output logic        ro_start_o,
  output logic        ro_end_o,
  output logic        dstb_o,
  output logic        rderr_o,
  output logic        wrerr_o,
  output logic        roerr_o,
  output logic        perr_o,
  output logic        isterr_o
);

  typedef enum logic [2:0] {M_IDLE, M_WAIT_ACK, M_WAIT_END, M_WAIT_TRSF, M_XFER} mstate_e;

  mstate_e      st;
  logic         cstb_q;
  logic         wr_q, rdo_q;
  logic [10:0]  timer;
  altro_instr_t ins;
  logic         par_ok, for_us, code_ok, cstb_rise;

  assign ins       = altro_instr_t'(bd_i);
  assign par_ok    = ~(^bd_i);
  assign for_us    = ~ins.bcal & (ins.bcast | (ins.fec == fec_addr_i));
  assign code_ok   = altro_code_valid(ins.code);
  assign cstb_rise = ctrl_i.cstb & ~cstb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; cstb_q <= 1'b0; wr_q <= 1'b0; rdo_q <= 1'b0; timer <= '0;
      wpinc_o <= 1'b0; rpinc_o <= 1'b0; chrdo_o <= 1'b0;
      chip_o <= '0; bcast_o <= 1'b0;
      ro_start_o <= 1'b0; ro_end_o <= 1'b0; dstb_o <= 1'b0;
      rderr_o <= 1'b0; wrerr_o <= 1'b0; roerr_o <= 1'b0; perr_o <= 1'b0; isterr_o <= 1'b0;
    end else begin
      wpinc_o <= 1'b0; rpinc_o <= 1'b0; chrdo_o <= 1'b0;
      ro_start_o <= 1'b0; ro_end_o <= 1'b0; dstb_o <= 1'b0;
      rderr_o <= 1'b0; wrerr_o <= 1'b0; roerr_o <= 1'b0; perr_o <= 1'b0; isterr_o <= 1'b0;
      if (soft_rst_i) begin
        st <= M_IDLE;
        cstb_q <= 1'b0;
      end else if (tick_i) begin
        cstb_q <= ctrl_i.cstb;
        timer  <= timer + 11'd1;
        unique case (st)
          M_IDLE: ;
          M_WAIT_ACK: begin
            if (ctrl_i.ack) begin
              st    <= rdo_q ? M_WAIT_TRSF : M_WAIT_END;
              timer <= '0;
            end else if (!ctrl_i.cstb || timer >= 11'(ACK_TIMEOUT - 1)) begin
              rderr_o <= ~wr_q;
              wrerr_o <= wr_q;
              if (rdo_q) ro_end_o <= 1'b1;
              st <= ctrl_i.cstb ? M_WAIT_END : M_IDLE;
            end
          end
          M_WAIT_END: if (!ctrl_i.cstb) st <= M_IDLE;
          M_WAIT_TRSF: begin
            if (ctrl_i.trsf) begin
              st    <= M_XFER;
              timer <= '0;
              dstb_o <= ctrl_i.dstb;
            end else if (timer >= 11'(TRSF_TIMEOUT - 1)) begin
              roerr_o  <= 1'b1;
              ro_end_o <= 1'b1;
              st       <= M_IDLE;
            end
          end
          M_XFER: begin
            if (!ctrl_i.trsf) begin
              ro_end_o <= 1'b1;
              st       <= M_IDLE;
            end else if (timer >= 11'(XFER_TIMEOUT - 1)) begin
              roerr_o  <= 1'b1;
              ro_end_o <= 1'b1;
              st       <= M_IDLE;
            end else begin
              dstb_o <= ctrl_i.dstb;
            end
          end
          default: st <= M_IDLE;
        endcase

        // a new instruction preempts whatever the checker was waiting for
        if (cstb_rise && (st == M_IDLE || st == M_WAIT_END)) begin
          perr_o  <= ~par_ok;
          st      <= M_IDLE;
          if (par_ok && for_us) begin
            isterr_o <= ~code_ok;
            chip_o   <= ins.chip;
            bcast_o  <= ins.bcast;
            wr_q     <= ctrl_i.write;
            rdo_q    <= (ins.code == I_CHRDO);
            timer    <= '0;
            if (code_ok) begin
              wpinc_o <= (ins.code == I_WPINC);
              rpinc_o <= (ins.code == I_RPINC);
              if (ins.code == I_CHRDO) begin
                if (ins.bcast) begin
                  roerr_o <= 1'b1;
                end else begin
                  chrdo_o    <= 1'b1;
                  ro_start_o <= 1'b1;
                end
              end
            end
            if (ins.bcast) begin
              rderr_o <= ~ctrl_i.write;
            end else if (code_ok) begin
              st <= M_WAIT_ACK;
            end
          end
        end
      end
    end
  end

  // bus events and errors are only reported right after an RCLK tick
  logic tick_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tick_q <= 1'b0;
    else        tick_q <= tick_i;
  a_on_tick: assert property (@(posedge clk) disable iff (!rst_n)
    (wpinc_o | rpinc_o | chrdo_o | dstb_o | rderr_o | wrerr_o | roerr_o |
     perr_o | isterr_o) |-> tick_q);

endmodule
