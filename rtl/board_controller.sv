// board_controller: slow-control part of the Board Controller (BC) of one
// front-end card (FEC) of the TPC readout.
//
// The readout control unit (RCU) monitors and controls every FEC over a
// dedicated control network: an I2C bus (SCL, SDA) for register access and
// an extra INT line on which the BC signals errors. This module joins:
//   bc_i2c_slave + bc_reg_access  I2C slave at address {I2C_PREFIX,
//                                 hwadd_i[4:0]}, register read/write and the
//                                 commands CNTRST, BCRST, RERLBK
//   bc_monitor                    temperature, voltages and currents from the
//                                 card's ADC, acceptance bands, regulator and
//                                 power-switch control
//   bc_altro_monitor              ALTRO bus decoder and protocol checker
//   bc_meb_mirror                 mirror of the ALTRO multi-event buffers
//   bc_scope                      10-sample record of DSTB/WRITE/ACK/TRSF
//   bc_stats                      trigger/reset/readout counters, overlap check
//   bc_clk_monitor (x2)           missing RCLK / SCLK detection; the RCLK one
//                                 also gives the bus sampling tick
//   bc_errlog                     16 sticky error flags and the INT line
//
// Everything runs on the BC clock clk (assumed 40 MHz). The ALTRO bus,
// trigger lines (L1, L2, global reset), RCLK and SCLK are asynchronous to it
// and are synchronized here; L1, L2 and GRST count on their rising edges.
// The ALTRO bus is sampled on every RCLK rising edge, so RCLK must be at most
// about a quarter of the BC clock and BD/control lines must change near the
// RCLK falling edge. The AD7417 ADC itself is outside: its conversions arrive
// on adc_valid_i/adc_ch_i/adc_data_i. The INT acknowledge (the RCU pulling
// INT low) is the input int_ack_i.
module board_controller
  import bc_pkg::*;
#(
  parameter logic [1:0]  I2C_PREFIX   = 2'b10,
  parameter int unsigned MEB_DEPTH    = 8,
  parameter int unsigned TROVP_CYCLES = 4000,
  parameter int unsigned ACK_TIMEOUT  = 16,
  parameter int unsigned TRSF_TIMEOUT = 32,
  parameter int unsigned XFER_TIMEOUT = 1024,
  parameter int unsigned CLK_TIMEOUT  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        hwadd_i,
  // control network
  input  logic              scl_i,
  input  logic              sda_i,
  output logic              sda_oe_o,
  output logic              int_o,
  input  logic              int_ack_i,
  // ALTRO bus, clocks and triggers
  input  logic              rclk_i,
  input  logic              sclk_i,
  input  logic              l1_i,
  input  logic              l2_i,
  input  logic              grst_i,
  input  logic [39:0]       bd_i,
  input  logic              cstb_i,
  input  logic              write_i,
  input  logic              ack_i,
  input  logic              trsf_i,
  input  logic              dstb_i,
  // ADC conversions
  input  logic              adc_valid_i,
  input  logic [2:0]        adc_ch_i,
  input  logic [ADC_W-1:0]  adc_data_i,
  // power regulators and switches
  input  logic [3:0]        vreg_status_i,
  input  logic [1:0]        pwsw_status_i,
  output logic [3:0]        vreg_en_o,
  output logic [1:0]        pwsw_en_o
);

  // ------------------------------------------------------- synchronizers
  altro_ctrl_t ctrl;
  logic [39:0] bd;
  logic [2:0]  trig, trig_q;
  logic        l1_ev, l2_ev, grst_ev;

  bc_sync #(.WIDTH(45)) u_sync_bus (
    .clk, .rst_n,
    .d_i({bd_i, cstb_i, write_i, ack_i, trsf_i, dstb_i}),
    .q_o({bd, ctrl.cstb, ctrl.write, ctrl.ack, ctrl.trsf, ctrl.dstb})
  );

  bc_sync #(.WIDTH(3)) u_sync_trig (
    .clk, .rst_n, .d_i({l1_i, l2_i, grst_i}), .q_o(trig)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_q <= '0;
    else        trig_q <= trig;
  end
  assign {l1_ev, l2_ev, grst_ev} = trig & ~trig_q;

  // ------------------------------------------------------ clock watchdogs
  logic rtick, rck_missing, sck_missing;

  bc_clk_monitor #(.TIMEOUT(CLK_TIMEOUT)) u_rclk_mon (
    .clk, .rst_n, .mon_clk_i(rclk_i), .rise_o(rtick), .missing_o(rck_missing)
  );

  bc_clk_monitor #(.TIMEOUT(CLK_TIMEOUT)) u_sclk_mon (
    .clk, .rst_n, .mon_clk_i(sclk_i), .rise_o(), .missing_o(sck_missing)
  );

  // ------------------------------------------------------ register access
  logic             i2c_start, i2c_stop, i2c_rd_start, i2c_rx_valid, i2c_tx_done;
  logic [7:0]       i2c_rx_byte, i2c_tx_byte;
  logic             wr;
  logic [7:0]       wr_addr;
  logic [REG_W-1:0] wr_data;
  logic             cntrst, bcrst, rerlbk;
  bc_regs_t         regs;

  bc_i2c_slave u_i2c (
    .clk, .rst_n,
    .slave_addr_i({I2C_PREFIX, hwadd_i[4:0]}),
    .scl_i, .sda_i, .sda_oe_o,
    .start_o(i2c_start), .stop_o(i2c_stop), .rd_start_o(i2c_rd_start),
    .rx_valid_o(i2c_rx_valid), .rx_byte_o(i2c_rx_byte),
    .tx_byte_i(i2c_tx_byte), .tx_done_o(i2c_tx_done)
  );

  bc_reg_access u_regs (
    .clk, .rst_n,
    .start_i(i2c_start), .stop_i(i2c_stop), .rd_start_i(i2c_rd_start),
    .rx_valid_i(i2c_rx_valid), .rx_byte_i(i2c_rx_byte),
    .tx_done_i(i2c_tx_done), .tx_byte_o(i2c_tx_byte),
    .regs_i(regs),
    .wr_o(wr), .wr_addr_o(wr_addr), .wr_data_o(wr_data),
    .cntrst_o(cntrst), .bcrst_o(bcrst), .rerlbk_o(rerlbk)
  );

  // ------------------------------------------------------------ monitoring
  logic averr, acerr, dverr, dcerr, tperr;

  bc_monitor u_mon (
    .clk, .rst_n, .soft_rst_i(bcrst),
    .adc_valid_i, .adc_ch_i, .adc_data_i,
    .wr_i(wr), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .vreg_status_i, .pwsw_status_i, .vreg_en_o, .pwsw_en_o,
    .voltreg_o(regs.voltreg), .pwsw_o(regs.pwsw),
    .temp_o(regs.temp), .anvolt_o(regs.anvolt), .dgvolt_o(regs.dgvolt),
    .ancur_o(regs.ancur), .dgcur_o(regs.dgcur),
    .avolthr_o(regs.avolthr), .acurthr_o(regs.acurthr),
    .dvolthr_o(regs.dvolthr), .dcurthr_o(regs.dcurthr), .tpthr_o(regs.tpthr),
    .averr_o(averr), .acerr_o(acerr), .dverr_o(dverr), .dcerr_o(dcerr),
    .tperr_o(tperr)
  );

  // ------------------------------------------------------ ALTRO bus checks
  logic       wpinc, rpinc, chrdo, bcast, ro_start, ro_end, dstb_ev;
  logic [2:0] chip;
  logic       rderr, wrerr, roerr, perr, isterr;

  bc_altro_monitor #(
    .ACK_TIMEOUT(ACK_TIMEOUT), .TRSF_TIMEOUT(TRSF_TIMEOUT),
    .XFER_TIMEOUT(XFER_TIMEOUT)
  ) u_altro (
    .clk, .rst_n, .soft_rst_i(bcrst), .tick_i(rtick), .ctrl_i(ctrl),
    .bd_i(bd), .fec_addr_i(hwadd_i[4:0]),
    .wpinc_o(wpinc), .rpinc_o(rpinc), .chrdo_o(chrdo),
    .chip_o(chip), .bcast_o(bcast),
    .ro_start_o(ro_start), .ro_end_o(ro_end), .dstb_o(dstb_ev),
    .rderr_o(rderr), .wrerr_o(wrerr), .roerr_o(roerr), .perr_o(perr),
    .isterr_o(isterr)
  );

  logic bfull, bempy, bsyerr;

  bc_meb_mirror #(.MEB_DEPTH(MEB_DEPTH)) u_meb (
    .clk, .rst_n, .soft_rst_i(bcrst), .grst_i(grst_ev), .l2_i(l2_ev),
    .wpinc_i(wpinc), .rpinc_i(rpinc), .chrdo_i(chrdo),
    .chip_i(chip), .bcast_i(bcast),
    .wrpter_o(regs.wrpter), .rdpter_o(regs.rdpter), .mevbf_o(regs.mevbf),
    .rbuff_o(regs.rbuff),
    .bfull_o(bfull), .bempy_o(bempy), .bsyerr_o(bsyerr)
  );

  bc_scope u_scope (
    .clk, .rst_n, .soft_rst_i(bcrst), .tick_i(rtick), .ctrl_i(ctrl),
    .dstbsc_o(regs.dstbsc), .wrsc_o(regs.wrsc), .acksc_o(regs.acksc),
    .trsfsc_o(regs.trsfsc)
  );

  // ------------------------------------------------------------ statistics
  logic trovp;

  bc_stats #(.TROVP_CYCLES(TROVP_CYCLES)) u_stats (
    .clk, .rst_n, .soft_rst_i(bcrst), .cntrst_i(cntrst),
    .l1_i(l1_ev), .l2_i(l2_ev), .grst_i(grst_ev), .rdo_i(chrdo),
    .ro_start_i(ro_start), .ro_end_i(ro_end), .dstb_i(dstb_ev),
    .nbrl1_o(regs.nbrl1), .nbrl2_o(regs.nbrl2), .nbrrs_o(regs.nbrrs),
    .nbrdo_o(regs.nbrdo), .ndstb_o(regs.ndstb), .trovp_o(trovp)
  );
  assign regs.hwadd = hwadd_i;

  // --------------------------------------------------------- error logbook
  logic [N_ERR-1:0] err_set;

  always_comb begin
    err_set           = '0;
    err_set[E_RDERR]  = rderr;
    err_set[E_WRERR]  = wrerr;
    err_set[E_ROERR]  = roerr;
    err_set[E_PERR]   = perr;
    err_set[E_BEMPY]  = bempy;
    err_set[E_BSYERR] = bsyerr;
    err_set[E_BFULL]  = bfull;
    err_set[E_TROVP]  = trovp;
    err_set[E_AVERR]  = averr;
    err_set[E_DVERR]  = dverr;
    err_set[E_DCERR]  = dcerr;
    err_set[E_ACERR]  = acerr;
    err_set[E_RCKERR] = rck_missing;
    err_set[E_SCKERR] = sck_missing;
    err_set[E_ISTERR] = isterr;
    err_set[E_TPERR]  = tperr;
  end

  bc_errlog u_errlog (
    .clk, .rst_n, .clr_i(bcrst | rerlbk), .set_i(err_set),
    .int_ack_i, .log_o(regs.errlog), .int_o
  );

endmodule
