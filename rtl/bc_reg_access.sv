// bc_reg_access: register access protocol and command decoder of the BC.
//
// Sits on top of the byte-level I2C slave. A transfer from the RCU is
//   write:   START, slave address + W, register address, 4 data bytes, STOP
//   read:    START, slave address + W, register address,
//            repeated START, slave address + R, 4 data bytes, STOP
// Data bytes are sent most significant first; each register is
// right-aligned in the 32-bit word and unused upper bits read as 0.
// The write strobe wr_o is a one-cycle pulse after the fourth data byte;
// bytes beyond the fourth are ignored. A read captures the whole 32-bit
// register the moment the slave is addressed for reading, so a multi-byte
// value cannot tear while it is shifted out.
//
// The three commands of the BC (CNTRST: reset all counters, BCRST: reset
// the Board Controller and all its registers, RERLBK: reset the error
// logbook) are register addresses of their own: the command pulse is given
// as soon as such an address byte is written, no data bytes are needed.
//
// The register names and widths follow the BC register tables; the framing
// on I2C, the 4-byte word and the addresses (see bc_pkg) are this design's
// choices.
module bc_reg_access
  import bc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // byte-level I2C slave
  input  logic              start_i,
  input  logic              stop_i,
  input  logic              rd_start_i,
  input  logic              rx_valid_i,
  input  logic [7:0]        rx_byte_i,
  input  logic              tx_done_i,
  output logic [7:0]        tx_byte_o,
  // register file
  input  bc_regs_t          regs_i,
  output logic              wr_o,
  output logic [7:0]        wr_addr_o,
  output logic [REG_W-1:0]  wr_data_o,
  // commands
  output logic              cntrst_o,
  output logic              bcrst_o,
  output logic              rerlbk_o
);

  logic [7:0]       addr_q;
  logic [2:0]       bidx;        // data byte index within the transfer
  logic             have_addr;   // register address byte received
  logic [REG_W-1:0] wdata, rdata_q, rd_mux;

  // read multiplexer
  always_comb begin
    rd_mux = '0;
    if (addr_q[7]) begin
      rd_mux[3:0] = regs_i.rbuff[addr_q[6:4]][addr_q[3:0]];
    end else begin
      case (addr_q)
        A_TEMP:    rd_mux[ADC_W-1:0]   = regs_i.temp;
        A_VOLTREG: rd_mux[3:0]         = regs_i.voltreg;
        A_PWSW:    rd_mux[1:0]         = regs_i.pwsw;
        A_ANVOLT:  rd_mux[ADC_W-1:0]   = regs_i.anvolt;
        A_DGVOLT:  rd_mux[ADC_W-1:0]   = regs_i.dgvolt;
        A_ANCUR:   rd_mux[ADC_W-1:0]   = regs_i.ancur;
        A_DGCUR:   rd_mux[ADC_W-1:0]   = regs_i.dgcur;
        A_AVOLTHR: rd_mux[2*ADC_W-1:0] = regs_i.avolthr;
        A_ACURTHR: rd_mux[2*ADC_W-1:0] = regs_i.acurthr;
        A_DVOLTHR: rd_mux[2*ADC_W-1:0] = regs_i.dvolthr;
        A_DCURTHR: rd_mux[2*ADC_W-1:0] = regs_i.dcurthr;
        A_TPTHR:   rd_mux[ADC_W-1:0]   = regs_i.tpthr;
        A_ERRLOG:  rd_mux[N_ERR-1:0]   = regs_i.errlog;
        A_NBRL1:   rd_mux[CNT_W-1:0]   = regs_i.nbrl1;
        A_NBRL2:   rd_mux[CNT_W-1:0]   = regs_i.nbrl2;
        A_NBRRS:   rd_mux[CNT_W-1:0]   = regs_i.nbrrs;
        A_NDSTB:   rd_mux[NDSTB_W-1:0] = regs_i.ndstb;
        A_NBRDO:   rd_mux[CNT_W-1:0]   = regs_i.nbrdo;
        A_HWADD:   rd_mux[7:0]         = regs_i.hwadd;
        A_WRPTER:  rd_mux[3*N_CHIPS-1:0] = regs_i.wrpter;
        A_MEVBF:   rd_mux[4*N_CHIPS-1:0] = regs_i.mevbf;
        A_RDPTER:  rd_mux[3*N_CHIPS-1:0] = regs_i.rdpter;
        A_DSTBSC:  rd_mux[SCOPE_LEN-1:0] = regs_i.dstbsc;
        A_WRSC:    rd_mux[SCOPE_LEN-1:0] = regs_i.wrsc;
        A_ACKSC:   rd_mux[SCOPE_LEN-1:0] = regs_i.acksc;
        A_TRSFSC:  rd_mux[SCOPE_LEN-1:0] = regs_i.trsfsc;
        default:   rd_mux = '0;
      endcase
    end
  end

  assign tx_byte_o = rdata_q[REG_W-1-8*bidx[1:0] -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q    <= '0;
      bidx      <= '0;
      have_addr <= 1'b0;
      wdata     <= '0;
      rdata_q   <= '0;
      wr_o      <= 1'b0;
      wr_addr_o <= '0;
      wr_data_o <= '0;
      cntrst_o  <= 1'b0;
      bcrst_o   <= 1'b0;
      rerlbk_o  <= 1'b0;
    end else begin
      wr_o     <= 1'b0;
      cntrst_o <= 1'b0;
      bcrst_o  <= 1'b0;
      rerlbk_o <= 1'b0;
      if (start_i || stop_i) begin
        have_addr <= 1'b0;
        bidx      <= '0;
      end else if (rd_start_i) begin
        rdata_q <= rd_mux;
        bidx    <= '0;
      end else if (tx_done_i) begin
        if (bidx != 3'd4) bidx <= bidx + 3'd1;
        if (bidx == 3'd3) rdata_q <= '0;   // further bytes read as 0
      end else if (rx_valid_i) begin
        if (!have_addr) begin
          have_addr <= 1'b1;
          addr_q    <= rx_byte_i;
          cntrst_o  <= (rx_byte_i == C_CNTRST);
          bcrst_o   <= (rx_byte_i == C_BCRST);
          rerlbk_o  <= (rx_byte_i == C_RERLBK);
        end else if (bidx != 3'd4) begin
          wdata <= {wdata[REG_W-9:0], rx_byte_i};
          bidx  <= bidx + 3'd1;
          if (bidx == 3'd3) begin
            wr_o      <= 1'b1;
            wr_addr_o <= addr_q;
            wr_data_o <= {wdata[REG_W-9:0], rx_byte_i};
          end
        end
      end
    end
  end

  // at most one command per address byte; a write strobe is never a command
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({cntrst_o, bcrst_o, rerlbk_o, wr_o}));

endmodule
