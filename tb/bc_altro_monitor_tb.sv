// Testbench for bc_altro_monitor: plays ALTRO bus transactions (good and
// faulty reads, writes and channel readouts, broadcast commands, bad parity,
// bad codes, other cards) one RCLK tick at a time and counts the events and
// error pulses against what each transaction should give.
module bc_altro_monitor_tb;
  import bc_pkg::*;
  localparam int ACK_TO = 8, TRSF_TO = 12, XFER_TO = 300;
  localparam logic [4:0] FEC = 5'd5;
  logic clk = 0, rst_n = 0, tick = 0;
  altro_ctrl_t ctrl = '0;
  logic [39:0] bd = '0;
  logic wpinc, rpinc, chrdo, bcast, ros, roe, dstb, rderr, wrerr, roerr, perr, isterr;
  logic [2:0] chip;
  int checks = 0, failures = 0;
  int c_wp, c_rp, c_rdo, c_ros, c_roe, c_dstb, c_rd, c_wr, c_ro, c_p, c_ist;
  logic [2:0] last_chip; logic last_bcast;

  bc_altro_monitor #(.ACK_TIMEOUT(ACK_TO), .TRSF_TIMEOUT(TRSF_TO), .XFER_TIMEOUT(XFER_TO)) dut (
    .clk, .rst_n, .soft_rst_i(1'b0), .tick_i(tick), .ctrl_i(ctrl), .bd_i(bd),
    .fec_addr_i(FEC), .wpinc_o(wpinc), .rpinc_o(rpinc), .chrdo_o(chrdo),
    .chip_o(chip), .bcast_o(bcast), .ro_start_o(ros), .ro_end_o(roe),
    .dstb_o(dstb), .rderr_o(rderr), .wrerr_o(wrerr), .roerr_o(roerr),
    .perr_o(perr), .isterr_o(isterr));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    c_wp += wpinc; c_rp += rpinc; c_rdo += chrdo; c_ros += ros; c_roe += roe;
    c_dstb += dstb; c_rd += rderr; c_wr += wrerr; c_ro += roerr; c_p += perr;
    c_ist += isterr;
    if (wpinc || rpinc || chrdo) begin last_chip = chip; last_bcast = bcast; end
  end

  task automatic clear_counts();
    {c_wp, c_rp, c_rdo, c_ros, c_roe, c_dstb, c_rd, c_wr, c_ro, c_p, c_ist} = '{default: 0};
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_tick(int n = 1);
    repeat (n) begin
      tick = 1; @(posedge clk); #1 tick = 0; repeat (3) @(posedge clk); #1;
    end
  endtask

  function automatic logic [39:0] word(logic bc, logic [4:0] fec, logic [2:0] ch,
                                       logic [3:0] chan, logic [4:0] code, logic badpar = 0);
    altro_instr_t w;
    w = '{par: 1'b0, bcast: bc, bcal: 1'b0, fec: fec, chip: ch, chan: chan,
          code: code, data: 20'($urandom)};
    w.par = (^w) ^ badpar;
    return 40'(w);
  endfunction

  // instruction with CSTB high, ACK after ack_at ticks (0 = never),
  // CSTB dropped after cstb_len ticks
  task automatic instr(logic [39:0] w, logic wr, int ack_at, int cstb_len);
    bd = w; ctrl.write = wr; ctrl.cstb = 1; do_tick();
    for (int t = 1; t < cstb_len; t++) begin
      ctrl.ack = (ack_at != 0 && t >= ack_at);
      do_tick();
    end
    ctrl.cstb = 0; ctrl.ack = 0; ctrl.write = 0; bd = '0; do_tick(2);
  endtask

  task automatic transfer(int words, int wait_trsf);
    do_tick(wait_trsf);
    ctrl.trsf = 1;
    for (int i = 0; i < words; i++) begin
      ctrl.dstb = 1; do_tick(); ctrl.dstb = 0;
      if ($urandom % 3 == 0) do_tick();
    end
    ctrl.trsf = 0; do_tick(2);
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    do_tick(2);
    // good register write and read
    clear_counts();
    instr(word(0, FEC, 3'd2, 4'd1, 5'h0A), 1, 2, 4);
    instr(word(0, FEC, 3'd2, 4'd1, 5'h0B), 0, 3, 5);
    check("good accesses: no error", c_rd + c_wr + c_ro + c_p + c_ist == 0);
    // read without ACK
    clear_counts();
    bd = word(0, FEC, 3'd1, 4'd0, 5'h01); ctrl.write = 0; ctrl.cstb = 1;
    do_tick(ACK_TO - 1);
    check("no RDERR before the ACK timeout", c_rd == 0);
    do_tick(3);
    check("read without ACK gives RDERR while CSTB is held", c_rd == 1 && c_wr == 0);
    do_tick(5); ctrl.cstb = 0; bd = '0; do_tick(3);
    check("one RDERR per instruction", c_rd == 1);
    // write whose CSTB drops before ACK
    clear_counts();
    instr(word(0, FEC, 3'd1, 4'd0, 5'h02), 1, 0, 2);
    check("write CSTB early drop gives WRERR", c_wr == 1 && c_rd == 0);
    // parity error
    clear_counts();
    instr(word(0, FEC, 3'd1, 4'd0, 5'h02, 1), 1, 2, 3);
    check("PERR", c_p == 1 && c_wr == 0 && c_ist == 0);
    // invalid code
    clear_counts();
    instr(word(0, FEC, 3'd1, 4'd0, 5'h0F), 1, 2, 3);
    check("ISTERR", c_ist == 1 && c_p == 0);
    // another card: nothing but parity is watched
    clear_counts();
    instr(word(0, 5'd9, 3'd1, 4'd0, I_WPINC), 1, 0, 3);
    instr(word(0, 5'd9, 3'd1, 4'd0, 5'h0F), 0, 0, ACK_TO + 3);
    check("other card ignored", c_wp + c_rd + c_wr + c_ist + c_p == 0);
    // broadcast read is illegal, broadcast command is fine without ACK
    clear_counts();
    instr(word(1, 5'd0, 3'd0, 4'd0, 5'h03), 0, 0, 2);
    check("broadcast read gives RDERR", c_rd == 1);
    clear_counts();
    instr(word(1, 5'd0, 3'd0, 4'd0, I_WPINC), 1, 0, 2);
    check("broadcast WPINC", c_wp == 1 && last_bcast && c_wr == 0);
    clear_counts();
    instr(word(0, FEC, 3'd3, 4'd0, I_RPINC), 1, 1, 3);
    check("RPINC chip 3", c_rp == 1 && last_chip == 3'd3 && !last_bcast && c_wr == 0);
    // good channel readouts
    for (int n = 0; n < 4; n++) begin
      automatic int words = $urandom_range(1, 60);
      clear_counts();
      instr(word(0, FEC, 3'd6, 4'(n), I_CHRDO), 1, 1, 2);
      transfer(words, 2);
      check($sformatf("readout of %0d words", words),
            c_rdo == 1 && c_ros == 1 && c_roe == 1 && c_dstb == words && c_ro == 0);
    end
    // readout without TRSF
    clear_counts();
    instr(word(0, FEC, 3'd6, 4'd2, I_CHRDO), 1, 1, 2);
    do_tick(TRSF_TO + 2);
    check("readout without TRSF gives ROERR", c_ro == 1 && c_roe == 1);
    // readout that never ends
    clear_counts();
    instr(word(0, FEC, 3'd6, 4'd2, I_CHRDO), 1, 1, 2);
    ctrl.trsf = 1; do_tick(XFER_TO + 3); ctrl.trsf = 0; do_tick(2);
    check("endless transfer gives ROERR", c_ro == 1 && c_roe == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
