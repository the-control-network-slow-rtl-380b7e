// Testbench for bc_monitor: random ADC samples and acceptance bands; checks
// the stored values, the band and temperature errors against a reference,
// regulator/switch control and read-back, and the BCRST reset values.
module bc_monitor_tb;
  import bc_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0;
  logic adc_valid = 0; logic [2:0] adc_ch = 0; logic [ADC_W-1:0] adc_data = 0;
  logic wr = 0; logic [7:0] wa = 0; logic [REG_W-1:0] wd = 0;
  logic [3:0] vst = 4'h5, ven, voltreg; logic [1:0] pst = 2'b10, pen, pwsw;
  logic [ADC_W-1:0] temp, anv, dgv, anc, dgc, tpthr;
  logic [2*ADC_W-1:0] avt, act, dvt, dct;
  logic averr, acerr, dverr, dcerr, tperr;
  int checks = 0, failures = 0;
  logic [ADC_W-1:0] v [5];
  logic [2*ADC_W-1:0] band [4];
  logic [ADC_W-1:0] tlim;

  bc_monitor dut (
    .clk, .rst_n, .soft_rst_i(srst), .adc_valid_i(adc_valid), .adc_ch_i(adc_ch),
    .adc_data_i(adc_data), .wr_i(wr), .wr_addr_i(wa), .wr_data_i(wd),
    .vreg_status_i(vst), .pwsw_status_i(pst), .vreg_en_o(ven), .pwsw_en_o(pen),
    .voltreg_o(voltreg), .pwsw_o(pwsw),
    .temp_o(temp), .anvolt_o(anv), .dgvolt_o(dgv), .ancur_o(anc), .dgcur_o(dgc),
    .avolthr_o(avt), .acurthr_o(act), .dvolthr_o(dvt), .dcurthr_o(dct), .tpthr_o(tpthr),
    .averr_o(averr), .acerr_o(acerr), .dverr_o(dverr), .dcerr_o(dcerr), .tperr_o(tperr));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(logic [7:0] a, logic [REG_W-1:0] d);
    wr = 1; wa = a; wd = d; @(posedge clk); #1 wr = 0;
  endtask

  task automatic sample(int ch, logic [ADC_W-1:0] d);
    adc_valid = 1; adc_ch = 3'(ch); adc_data = d; @(posedge clk); #1 adc_valid = 0;
  endtask

  function automatic logic oob(logic [ADC_W-1:0] x, logic [2*ADC_W-1:0] b);
    return x < b[9:0] || x > b[19:10];
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    check("no error after reset", {averr, acerr, dverr, dcerr, tperr} == 0);
    check("regulators and switches on", ven == 4'hF && pen == 2'b11);
    check("status read back", voltreg == vst && pwsw == pst);
    write(A_VOLTREG, 32'h0000_0006); write(A_PWSW, 32'h0000_0001);
    check("regulator control", ven == 4'h6 && pen == 2'b01);
    for (int it = 0; it < 200; it++) begin
      for (int b = 0; b < 4; b++) begin
        automatic logic [9:0] lo = 10'($urandom_range(0, 600)), hi = 10'($urandom_range(400, 1023));
        band[b] = {hi, lo};
      end
      tlim = 10'($urandom);
      write(A_AVOLTHR, 32'(band[0])); write(A_ACURTHR, 32'(band[1]));
      write(A_DVOLTHR, 32'(band[2])); write(A_DCURTHR, 32'(band[3]));
      write(A_TPTHR, 32'(tlim));
      for (int c = 0; c < 5; c++) begin v[c] = 10'($urandom); sample(c, v[c]); end
      sample(5, 10'h3FF);  // unused channel
      @(posedge clk); #1;
      check("stored values", temp == v[0] && anv == v[1] && dgv == v[2] && anc == v[3] && dgc == v[4]);
      check("bands", avt == band[0] && act == band[1] && dvt == band[2] && dct == band[3] && tpthr == tlim);
      check("AVERR", averr == oob(v[1], band[0]));
      check("ACERR", acerr == oob(v[3], band[1]));
      check("DVERR", dverr == oob(v[2], band[2]));
      check("DCERR", dcerr == oob(v[4], band[3]));
      check("TPERR", tperr == (v[0] > tlim));
    end
    // band edges: the limits themselves are accepted
    write(A_AVOLTHR, {12'h0, 10'd700, 10'd500});
    write(A_TPTHR, 32'd600);
    sample(1, 10'd700); sample(0, 10'd600); @(posedge clk); #1;
    check("upper limit accepted", !averr && !tperr);
    sample(1, 10'd500); @(posedge clk); #1;
    check("lower limit accepted", !averr);
    sample(1, 10'd701); sample(0, 10'd601); @(posedge clk); #1;
    check("above upper limit", averr && tperr);
    sample(1, 10'd499); @(posedge clk); #1;
    check("below lower limit", averr);
    srst = 1; @(posedge clk); #1 srst = 0; @(posedge clk); #1;
    check("BCRST values", temp == 0 && avt == 20'hFFC00 && tpthr == 10'h3FF && ven == 4'hF);
    check("BCRST no error", {averr, acerr, dverr, dcerr, tperr} == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
