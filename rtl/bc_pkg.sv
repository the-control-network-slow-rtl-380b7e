// bc_pkg: shared constants and types of the front-end card Board Controller (BC).
//
// The BC is the slow-control slave of one front-end card (FEC). The readout
// control unit (RCU) reads and writes its registers over an I2C bus and is
// told of errors through a separate INT line. This package holds the register
// map seen over I2C, the bit order of the error logbook, the ALTRO bus
// instruction layout and codes the BC watches, and the record of all
// readable register values that the register access block multiplexes.
//
// The register names, widths and meanings follow the Board Controller
// register tables (monitoring, error logbook, statistics, buffer monitoring).
// The numeric register addresses, the command addresses, the error bit order
// and the ALTRO instruction layout are this design's own choices; the ALTRO
// codes are those of the ALTRO chip's instruction set.
package bc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_CHIPS   = 8;   // ALTRO chips per FEC
  localparam int unsigned N_CH      = 16;  // channels per ALTRO chip
  localparam int unsigned ADC_W     = 10;  // AD7417 conversion width
  localparam int unsigned CNT_W     = 16;  // statistics counters
  localparam int unsigned NDSTB_W   = 9;   // DSTB count of last readout
  localparam int unsigned SCOPE_LEN = 10;  // RCLK samples kept per control signal
  localparam int unsigned N_ERR     = 16;  // error logbook flags
  localparam int unsigned REG_W     = 32;  // register word moved over I2C (4 bytes)

  // ------------------------------------------------------- register map
  typedef enum logic [7:0] {
    A_TEMP    = 8'h00, A_VOLTREG = 8'h01, A_PWSW    = 8'h02,
    A_ANVOLT  = 8'h03, A_DGVOLT  = 8'h04, A_ANCUR   = 8'h05,
    A_DGCUR   = 8'h06, A_AVOLTHR = 8'h07, A_ACURTHR = 8'h08,
    A_DVOLTHR = 8'h09, A_DCURTHR = 8'h0A, A_TPTHR   = 8'h0B,
    A_ERRLOG  = 8'h10,
    A_NBRL1   = 8'h20, A_NBRL2   = 8'h21, A_NBRRS   = 8'h22,
    A_NDSTB   = 8'h23, A_NBRDO   = 8'h24, A_HWADD   = 8'h25,
    A_WRPTER  = 8'h30, A_MEVBF   = 8'h31, A_RDPTER  = 8'h32,
    A_DSTBSC  = 8'h33, A_WRSC    = 8'h34, A_ACKSC   = 8'h35,
    A_TRSFSC  = 8'h36,
    // commands: executed when the address byte of a write arrives
    C_CNTRST  = 8'h40, C_BCRST   = 8'h41, C_RERLBK  = 8'h42
  } reg_addr_e;
  // RBUFF of chip c, channel h is at 8'h80 | {c[2:0], h[3:0]}
  localparam logic [7:0] A_RBUFF_BASE = 8'h80;

  // --------------------------------------------------- error logbook bits
  typedef enum int unsigned {
    E_RDERR = 0, E_WRERR = 1, E_ROERR = 2, E_PERR = 3, E_BEMPY = 4,
    E_BSYERR = 5, E_BFULL = 6, E_TROVP = 7, E_AVERR = 8, E_DVERR = 9,
    E_DCERR = 10, E_ACERR = 11, E_RCKERR = 12, E_SCKERR = 13,
    E_ISTERR = 14, E_TPERR = 15
  } err_bit_e;

  // ------------------------------------------- ALTRO bus instruction word
  // bd[39] parity (even over all 40 bits), bd[38] broadcast, bd[37] BC/ALTRO
  // select, bd[36:32] FEC address, bd[31:29] chip, bd[28:25] channel,
  // bd[24:20] instruction code, bd[19:0] data.
  typedef struct packed {
    logic       par;
    logic       bcast;
    logic       bcal;
    logic [4:0] fec;
    logic [2:0] chip;
    logic [3:0] chan;
    logic [4:0] code;
    logic [19:0] data;
  } altro_instr_t;

  localparam logic [4:0] I_WPINC = 5'h18;
  localparam logic [4:0] I_RPINC = 5'h19;
  localparam logic [4:0] I_CHRDO = 5'h1A;
  localparam logic [4:0] I_SWTRG = 5'h1B;
  localparam logic [4:0] I_TRCLR = 5'h1C;
  localparam logic [4:0] I_ERCLR = 5'h1D;

  // Valid ALTRO register and command codes: registers 0x00-0x0D and
  // 0x10-0x12, commands 0x18-0x1D.
  function automatic logic altro_code_valid(logic [4:0] code);
    return (code <= 5'h0D) || (code >= 5'h10 && code <= 5'h12) ||
           (code >= 5'h18 && code <= 5'h1D);
  endfunction

  // --------------------------------------- ALTRO bus control sample
  typedef struct packed {
    logic cstb;
    logic write;
    logic ack;
    logic trsf;
    logic dstb;
  } altro_ctrl_t;

  // -------------------------------------------- readable register values
  typedef struct packed {
    // temperature and electrical monitoring
    logic [ADC_W-1:0]   temp;
    logic [3:0]         voltreg;
    logic [1:0]         pwsw;
    logic [ADC_W-1:0]   anvolt;
    logic [ADC_W-1:0]   dgvolt;
    logic [ADC_W-1:0]   ancur;
    logic [ADC_W-1:0]   dgcur;
    logic [2*ADC_W-1:0] avolthr;
    logic [2*ADC_W-1:0] acurthr;
    logic [2*ADC_W-1:0] dvolthr;
    logic [2*ADC_W-1:0] dcurthr;
    logic [ADC_W-1:0]   tpthr;
    // error logbook
    logic [N_ERR-1:0]   errlog;
    // statistics
    logic [CNT_W-1:0]   nbrl1;
    logic [CNT_W-1:0]   nbrl2;
    logic [CNT_W-1:0]   nbrrs;
    logic [NDSTB_W-1:0] ndstb;
    logic [CNT_W-1:0]   nbrdo;
    logic [7:0]         hwadd;
    // protocol and buffer monitoring
    logic [N_CHIPS-1:0][2:0]           wrpter;
    logic [N_CHIPS-1:0][3:0]           mevbf;
    logic [N_CHIPS-1:0][2:0]           rdpter;
    logic [N_CHIPS-1:0][N_CH-1:0][3:0] rbuff;
    logic [SCOPE_LEN-1:0] dstbsc;
    logic [SCOPE_LEN-1:0] wrsc;
    logic [SCOPE_LEN-1:0] acksc;
    logic [SCOPE_LEN-1:0] trsfsc;
  } bc_regs_t;

endpackage
