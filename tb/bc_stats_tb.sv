// Testbench for bc_stats: random L1/L2/reset/readout pulses counted by a
// reference, NDSTB of the last readout, CNTRST, and trigger overlap at the
// window edge.
module bc_stats_tb;
  import bc_pkg::*;
  localparam int TW = 50;
  logic clk = 0, rst_n = 0, srst = 0, cntrst = 0;
  logic l1 = 0, l2 = 0, grst = 0, rdo = 0, ros = 0, roe = 0, dstb = 0;
  logic [CNT_W-1:0] n1, n2, nrs, ndo;
  logic [NDSTB_W-1:0] nd;
  logic trovp;
  int checks = 0, failures = 0, r1 = 0, r2 = 0, rrs = 0, rdo_n = 0, ovp = 0;

  bc_stats #(.TROVP_CYCLES(TW)) dut (
    .clk, .rst_n, .soft_rst_i(srst), .cntrst_i(cntrst), .l1_i(l1), .l2_i(l2),
    .grst_i(grst), .rdo_i(rdo), .ro_start_i(ros), .ro_end_i(roe), .dstb_i(dstb),
    .nbrl1_o(n1), .nbrl2_o(n2), .nbrrs_o(nrs), .nbrdo_o(ndo), .ndstb_o(nd),
    .trovp_o(trovp));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && trovp) ovp++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic readout(int words);
    ros = 1; rdo = 1; @(posedge clk); #1 ros = 0; rdo = 0; rdo_n++;
    for (int i = 0; i < words; i++) begin
      dstb = 1; @(posedge clk); #1 dstb = 0;
      if ($urandom % 2) @(posedge clk);
      #1;
    end
    roe = 1; @(posedge clk); #1 roe = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      l1 = ($urandom % 4) == 0; l2 = ($urandom % 5) == 0; grst = ($urandom % 9) == 0;
      r1 += l1; r2 += l2; rrs += grst;
      @(posedge clk); #1;
      {l1, l2, grst} = '0;
      repeat (TW) @(posedge clk);
      #1;
    end
    check("NBRL1", n1 == CNT_W'(r1));
    check("NBRL2", n2 == CNT_W'(r2));
    check("NBRRS", nrs == CNT_W'(rrs));
    check("no overlap when spaced", ovp == 0);
    readout(37);
    check("NDSTB 37", nd == 37);
    readout(5);
    check("NDSTB 5", nd == 5);
    check("NBRDO", ndo == CNT_W'(rdo_n));
    // overlap window: exactly TW apart is fine, TW-1 is an overlap
    l1 = 1; @(posedge clk); #1 l1 = 0; repeat (TW - 1) @(posedge clk); #1;
    l1 = 1; @(posedge clk); #1 l1 = 0; repeat (2) @(posedge clk); #1;
    check("no TROVP at TW", ovp == 0);
    repeat (TW - 2 - 2) @(posedge clk); #1;
    l1 = 1; @(posedge clk); #1 l1 = 0; repeat (2) @(posedge clk); #1;
    check("TROVP at TW-1", ovp == 1);
    cntrst = 1; @(posedge clk); #1 cntrst = 0;
    check("CNTRST clears", n1 == 0 && n2 == 0 && nrs == 0 && ndo == 0 && nd == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
