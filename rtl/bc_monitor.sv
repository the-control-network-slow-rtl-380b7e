// bc_monitor: temperature, current and voltage monitoring of the FEC.
//
// The card's 5-channel 10-bit ADC (AD7417) samples the temperature and the
// analogue and digital supply voltages and currents. Each conversion is
// handed to this block as (adc_valid_i, adc_ch_i, adc_data_i) and stored in
// TEMP, ANVOLT, DGVOLT, ANCUR or DGCUR. The RCU sets acceptance bands
// AVOLTHR, ACURTHR, DVOLTHR, DCURTHR (lower limit in bits 9:0, upper limit in
// bits 19:10) and a temperature upper limit TPTHR. A stored value outside
// its band raises AVERR, ACERR, DVERR or DCERR; a temperature above TPTHR
// raises TPERR. The error outputs are levels, registered one cycle after the
// value or limit changes, and are meant for the sticky error logbook.
//
// VOLTREG (4 voltage regulators) and PWSW (2 power switches) are read/write:
// a write drives vreg_en_o / pwsw_en_o, a read returns the state reported by
// the regulators and switches (vreg_status_i, pwsw_status_i). 1 is ON.
//
// Register functions and widths follow the BC monitoring table. This
// design's choices: ADC channel numbering (0 temperature, 1 analogue
// voltage, 2 digital voltage, 3 analogue current, 4 digital current), reset
// values (all limits wide open, regulators and switches ON) and the inclusive
// band (low <= value <= high is accepted). soft_rst_i (BCRST) returns every
// register to its reset value.
module bc_monitor
  import bc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              soft_rst_i,
  // ADC conversions
  input  logic              adc_valid_i,
  input  logic [2:0]        adc_ch_i,
  input  logic [ADC_W-1:0]  adc_data_i,
  // register writes
  input  logic              wr_i,
  input  logic [7:0]        wr_addr_i,
  input  logic [REG_W-1:0]  wr_data_i,
  // power control
  input  logic [3:0]        vreg_status_i,
  input  logic [1:0]        pwsw_status_i,
  output logic [3:0]        vreg_en_o,
  output logic [1:0]        pwsw_en_o,
  output logic [3:0]        voltreg_o,
  output logic [1:0]        pwsw_o,
  // register values
  output logic [ADC_W-1:0]   temp_o, anvolt_o, dgvolt_o, ancur_o, dgcur_o,
  output logic [2*ADC_W-1:0] avolthr_o, acurthr_o, dvolthr_o, dcurthr_o,
  output logic [ADC_W-1:0]   tpthr_o,
  // errors (levels)
  output logic averr_o, acerr_o, dverr_o, dcerr_o, tperr_o
);

  // VOLTREG and PWSW read back the state the hardware reports
  assign voltreg_o = vreg_status_i;
  assign pwsw_o    = pwsw_status_i;

  localparam logic [2*ADC_W-1:0] BAND_OPEN = {{ADC_W{1'b1}}, {ADC_W{1'b0}}};

  function automatic logic out_of_band(logic [ADC_W-1:0] v, logic [2*ADC_W-1:0] band);
    return (v < band[ADC_W-1:0]) || (v > band[2*ADC_W-1:ADC_W]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      temp_o <= '0; anvolt_o <= '0; dgvolt_o <= '0; ancur_o <= '0; dgcur_o <= '0;
      avolthr_o <= BAND_OPEN; acurthr_o <= BAND_OPEN;
      dvolthr_o <= BAND_OPEN; dcurthr_o <= BAND_OPEN;
      tpthr_o   <= '1;
      vreg_en_o <= '1;
      pwsw_en_o <= '1;
    end else if (soft_rst_i) begin
      temp_o <= '0; anvolt_o <= '0; dgvolt_o <= '0; ancur_o <= '0; dgcur_o <= '0;
      avolthr_o <= BAND_OPEN; acurthr_o <= BAND_OPEN;
      dvolthr_o <= BAND_OPEN; dcurthr_o <= BAND_OPEN;
      tpthr_o   <= '1;
      vreg_en_o <= '1;
      pwsw_en_o <= '1;
    end else begin
      if (adc_valid_i) begin
        case (adc_ch_i)
          3'd0: temp_o   <= adc_data_i;
          3'd1: anvolt_o <= adc_data_i;
          3'd2: dgvolt_o <= adc_data_i;
          3'd3: ancur_o  <= adc_data_i;
          3'd4: dgcur_o  <= adc_data_i;
          default: ;
        endcase
      end
      if (wr_i) begin
        case (wr_addr_i)
          A_VOLTREG: vreg_en_o <= wr_data_i[3:0];
          A_PWSW:    pwsw_en_o <= wr_data_i[1:0];
          A_AVOLTHR: avolthr_o <= wr_data_i[2*ADC_W-1:0];
          A_ACURTHR: acurthr_o <= wr_data_i[2*ADC_W-1:0];
          A_DVOLTHR: dvolthr_o <= wr_data_i[2*ADC_W-1:0];
          A_DCURTHR: dcurthr_o <= wr_data_i[2*ADC_W-1:0];
          A_TPTHR:   tpthr_o   <= wr_data_i[ADC_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {averr_o, acerr_o, dverr_o, dcerr_o, tperr_o} <= '0;
    end else if (soft_rst_i) begin
      {averr_o, acerr_o, dverr_o, dcerr_o, tperr_o} <= '0;
    end else begin
      averr_o <= out_of_band(anvolt_o, avolthr_o);
      acerr_o <= out_of_band(ancur_o,  acurthr_o);
      dverr_o <= out_of_band(dgvolt_o, dvolthr_o);
      dcerr_o <= out_of_band(dgcur_o,  dcurthr_o);
      tperr_o <= (temp_o > tpthr_o);
    end
  end

endmodule
