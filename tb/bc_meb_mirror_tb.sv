// Testbench for bc_meb_mirror: random L2 triggers, WPINC/RPINC (per chip and
// broadcast) and channel readouts against a reference model of the buffer
// occupancy and pointers; checks BFULL, BEMPY and BSYERR.
module bc_meb_mirror_tb;
  import bc_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, grst = 0, l2 = 0, wpinc = 0, rpinc = 0, chrdo = 0, bcast = 0;
  logic [2:0] chip = 0;
  logic [N_CHIPS-1:0][2:0] wp, rp;
  logic [N_CHIPS-1:0][3:0] occ;
  logic [N_CHIPS-1:0][N_CH-1:0][3:0] rb;
  logic bfull, bempy, bsyerr;
  int m_occ [N_CHIPS], m_wp [N_CHIPS], m_rp [N_CHIPS];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_sync = 0;

  bc_meb_mirror #(.MEB_DEPTH(D)) dut (
    .clk, .rst_n, .soft_rst_i(1'b0), .grst_i(grst), .l2_i(l2), .wpinc_i(wpinc),
    .rpinc_i(rpinc), .chrdo_i(chrdo), .chip_i(chip), .bcast_i(bcast),
    .wrpter_o(wp), .rdpter_o(rp), .mevbf_o(occ), .rbuff_o(rb),
    .bfull_o(bfull), .bempy_o(bempy), .bsyerr_o(bsyerr));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_occ[c]) begin m_occ[c] = 0; m_wp[c] = 0; m_rp[c] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      automatic int op = $urandom % 10;
      automatic logic e_full = 0, e_empty = 0, e_sync = 0;
      chip = 3'($urandom); bcast = ($urandom % 2) == 0;
      {l2, wpinc, rpinc, chrdo, grst} = '0;
      if (it % 500 == 499) begin
        grst = 1;
        foreach (m_occ[c]) begin m_occ[c] = 0; m_wp[c] = 0; m_rp[c] = 0; end
      end else if (op < 3) begin
        l2 = 1;
        foreach (m_occ[c]) if (m_occ[c] != m_occ[0]) e_sync = 1;
        foreach (m_occ[c])
          if (m_occ[c] == D) e_full = 1;
          else begin m_occ[c]++; m_wp[c] = (m_wp[c] + 1) % D; end
      end else if (op < 5) begin
        wpinc = 1;
        foreach (m_occ[c]) if (bcast || chip == c)
          if (m_occ[c] == D) e_full = 1;
          else begin m_occ[c]++; m_wp[c] = (m_wp[c] + 1) % D; end
      end else if (op < 8) begin
        rpinc = 1;
        foreach (m_occ[c]) if ((bcast || chip == c) && m_occ[c] > 0) begin
          m_occ[c]--; m_rp[c] = (m_rp[c] + 1) % D;
        end
      end else begin
        chrdo = 1; bcast = 0;
        e_empty = (m_occ[chip] == 0);
      end
      @(posedge clk); #1;
      {l2, wpinc, rpinc, chrdo, grst} = '0;
      n_full += e_full; n_empty += e_empty; n_sync += e_sync;
      check("BFULL", bfull == e_full);
      check("BEMPY", bempy == e_empty);
      check("BSYERR", bsyerr == e_sync);
      foreach (m_occ[c]) begin
        check($sformatf("chip %0d occupancy", c), occ[c] == 4'(m_occ[c]));
        check($sformatf("chip %0d pointers", c), wp[c] == 3'(m_wp[c]) && rp[c] == 3'(m_rp[c]));
        check($sformatf("chip %0d RBUFF", c), rb[c][$urandom % N_CH] == 4'(D - m_occ[c]));
      end
    end
    check("all three errors seen", n_full > 0 && n_empty > 0 && n_sync > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
