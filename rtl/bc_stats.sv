// bc_stats: statistical counters and trigger overlap detection of the BC.
//
// Counts what the FEC actually received so the RCU can cross-check it with
// what it sent:
//   NBRL1  L1 triggers                         16 bit
//   NBRL2  L2 triggers                         16 bit
//   NBRRS  global resets                       16 bit
//   NBRDO  readout commands to this FEC        16 bit
//   NDSTB  data strobes of the last readout     9 bit
// All inputs are one-cycle event pulses in the BC clock domain. The 16-bit
// counters wrap. NDSTB counts dstb_i pulses between ro_start_i and ro_end_i
// in a running counter (saturating at 511) and is updated at ro_end_i, so it
// always shows a complete readout. cntrst_i (CNTRST) and soft_rst_i (BCRST)
// clear all counters.
//
// Trigger overlap (TROVP): two L1 triggers less than TROVP_CYCLES BC clock
// cycles apart give a one-cycle trovp_o pulse. The 100 us overlap window is
// specified; at the assumed 40 MHz BC clock it is 4000 cycles.
// Counter widths and meanings follow the statistics table; wrapping, the
// NDSTB update point and the clock rate are this design's choices.
module bc_stats
  import bc_pkg::*;
#(
  parameter int unsigned TROVP_CYCLES = 4000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst_i,
  input  logic               cntrst_i,
  input  logic               l1_i,
  input  logic               l2_i,
  input  logic               grst_i,
  input  logic               rdo_i,
  input  logic               ro_start_i,
  input  logic               ro_end_i,
  input  logic               dstb_i,
  output logic [CNT_W-1:0]   nbrl1_o,
  output logic [CNT_W-1:0]   nbrl2_o,
  output logic [CNT_W-1:0]   nbrrs_o,
  output logic [CNT_W-1:0]   nbrdo_o,
  output logic [NDSTB_W-1:0] ndstb_o,
  output logic               trovp_o
);

  localparam int unsigned TW = $clog2(TROVP_CYCLES + 1);

  logic [NDSTB_W-1:0] dstb_run;
  logic [TW-1:0]      since_l1;   // distance in cycles to the last L1, saturating
  logic               clr;

  assign clr = soft_rst_i | cntrst_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbrl1_o <= '0; nbrl2_o <= '0; nbrrs_o <= '0; nbrdo_o <= '0;
      ndstb_o <= '0; dstb_run <= '0;
    end else if (clr) begin
      nbrl1_o <= '0; nbrl2_o <= '0; nbrrs_o <= '0; nbrdo_o <= '0;
      ndstb_o <= '0; dstb_run <= '0;
    end else begin
      if (l1_i)   nbrl1_o <= nbrl1_o + 1'b1;
      if (l2_i)   nbrl2_o <= nbrl2_o + 1'b1;
      if (grst_i) nbrrs_o <= nbrrs_o + 1'b1;
      if (rdo_i)  nbrdo_o <= nbrdo_o + 1'b1;
      if (ro_start_i)
        dstb_run <= '0;
      else if (dstb_i && dstb_run != '1)
        dstb_run <= dstb_run + 1'b1;
      if (ro_end_i)
        ndstb_o <= (dstb_i && dstb_run != '1) ? dstb_run + 1'b1 : dstb_run;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_l1 <= TW'(TROVP_CYCLES);
      trovp_o  <= 1'b0;
    end else begin
      trovp_o <= l1_i && (since_l1 < TW'(TROVP_CYCLES));
      if (l1_i)                              since_l1 <= TW'(1);
      else if (since_l1 < TW'(TROVP_CYCLES)) since_l1 <= since_l1 + 1'b1;
    end
  end

endmodule
