// End-to-end testbench for board_controller at its default parameters.
//
// An RCU model talks to the BC over an open-drain I2C bus (4-byte register
// reads and writes, commands) and watches the INT line; an ALTRO bus model
// plays instructions, channel readouts and trigger sequences on RCLK; an ADC
// model delivers temperature, voltage and current conversions. Every error
// flag of the logbook is provoked once and checked through the register
// interface together with the INT/acknowledge handshake; counters, buffer
// mirror, pointers, RBUFF, the control-signal scope, the read/write
// monitoring registers and the three commands are checked against values
// worked out here. Each mechanism is counted and one never seen fails.
module board_controller_tb;
  import bc_pkg::*;

  localparam logic [7:0] HWADD = 8'h2B;           // FEC address 0x0B
  localparam logic [6:0] I2C_ADDR = {2'b10, HWADD[4:0]};
  localparam int HALF = 50;                        // BC cycles per SCL half period
  localparam int MEB_DEPTH_TB = 8;                 // default buffer depth

  logic clk = 0, rst_n = 0;
  logic scl = 1, m_low = 0, sda, sda_oe, int_o, int_ack = 0;
  logic rclk = 0, sclk = 0, rclk_run = 1, sclk_run = 1;
  logic l1 = 0, l2 = 0, grst = 0;
  logic [39:0] bd = '0;
  logic cstb = 0, write = 0, ack = 0, trsf = 0, dstb = 0;
  logic adc_valid = 0; logic [2:0] adc_ch = 0; logic [ADC_W-1:0] adc_data = 0;
  logic [3:0] vreg_status = 4'b1011, vreg_en;
  logic [1:0] pwsw_status = 2'b01, pwsw_en;

  int checks = 0, failures = 0;
  logic [N_ERR-1:0] seen = '0;     // error flags observed through ERRLOG
  int n_int = 0, n_cmd_cnt = 0, n_cmd_bc = 0, n_cmd_rl = 0, n_readout = 0;

  assign sda = ~(m_low | sda_oe);

  board_controller dut (
    .clk, .rst_n, .hwadd_i(HWADD), .scl_i(scl), .sda_i(sda), .sda_oe_o(sda_oe),
    .int_o, .int_ack_i(int_ack), .rclk_i(rclk), .sclk_i(sclk), .l1_i(l1), .l2_i(l2),
    .grst_i(grst), .bd_i(bd), .cstb_i(cstb), .write_i(write), .ack_i(ack),
    .trsf_i(trsf), .dstb_i(dstb), .adc_valid_i(adc_valid), .adc_ch_i(adc_ch),
    .adc_data_i(adc_data), .vreg_status_i(vreg_status), .pwsw_status_i(pwsw_status),
    .vreg_en_o(vreg_en), .pwsw_en_o(pwsw_en));

  always #12.5 clk = ~clk;                          // 40 MHz BC clock
  always #100 if (rclk_run) rclk = ~rclk;           // 5 MHz RCLK model
  always #150 if (sclk_run) sclk = ~sclk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------- I2C master
  task automatic half(); repeat (HALF) @(posedge clk); endtask
  task automatic i2c_start(); m_low = 0; half(); scl = 1; half(); m_low = 1; half(); scl = 0; half(); endtask
  task automatic i2c_stop();  m_low = 1; half(); scl = 1; half(); m_low = 0; half(); endtask
  task automatic put_bit(logic b); m_low = ~b; half(); scl = 1; half(); scl = 0; half(); endtask
  task automatic get_bit(output logic b); m_low = 0; half(); scl = 1; half(); b = sda; scl = 0; half(); endtask
  task automatic put_byte(logic [7:0] d);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(d[i]);
    get_bit(a);
    check("I2C ACK", !a);
  endtask
  task automatic get_byte(output logic [7:0] d, input logic last);
    for (int i = 7; i >= 0; i--) get_bit(d[i]);
    put_bit(last);
  endtask

  task automatic reg_write(logic [7:0] a, logic [31:0] d);
    i2c_start(); put_byte({I2C_ADDR, 1'b0}); put_byte(a);
    for (int i = 3; i >= 0; i--) put_byte(d[8*i +: 8]);
    i2c_stop();
  endtask
  task automatic reg_read(logic [7:0] a, output logic [31:0] d);
    i2c_start(); put_byte({I2C_ADDR, 1'b0}); put_byte(a);
    i2c_start(); put_byte({I2C_ADDR, 1'b1});
    for (int i = 3; i >= 0; i--) get_byte(d[8*i +: 8], i == 0);
    i2c_stop();
  endtask
  task automatic command(logic [7:0] c);
    i2c_start(); put_byte({I2C_ADDR, 1'b0}); put_byte(c); i2c_stop();
    if (c == C_CNTRST) n_cmd_cnt++;
    if (c == C_BCRST)  n_cmd_bc++;
    if (c == C_RERLBK) n_cmd_rl++;
  endtask

  // read ERRLOG, expect exactly `exp`, do the INT handshake, clear the log
  // (persist: the condition is still present, so the flag comes back)
  task automatic expect_log(logic [N_ERR-1:0] exp, string what, bit persist = 0);
    logic [31:0] d;
    repeat (20) @(posedge clk);
    reg_read(A_ERRLOG, d);
    check($sformatf("%s: ERRLOG %h expected %h", what, d[15:0], exp), d == 32'(exp));
    seen |= d[N_ERR-1:0] & exp;
    if (exp != 0) begin
      check($sformatf("%s: INT raised", what), int_o);
      if (int_o) n_int++;
      int_ack = 1; repeat (6) @(posedge clk); int_ack = 0; repeat (2) @(posedge clk);
      check($sformatf("%s: INT dropped on acknowledge", what), !int_o);
    end else begin
      check($sformatf("%s: no INT", what), !int_o);
    end
    command(C_RERLBK);
    reg_read(A_ERRLOG, d);
    check($sformatf("%s: ERRLOG after RERLBK", what), d == (persist ? 32'(exp) : 0));
  endtask

  // ---------------------------------------------------------- ALTRO bus
  task automatic rt(int n = 1); repeat (n) @(negedge rclk); endtask

  function automatic logic [39:0] word(logic bc, logic [4:0] fec, logic [2:0] ch,
                                       logic [3:0] chan, logic [4:0] code, logic badpar = 0);
    altro_instr_t w;
    w = '{par: 1'b0, bcast: bc, bcal: 1'b0, fec: fec, chip: ch, chan: chan,
          code: code, data: 20'h12345};
    w.par = (^w) ^ badpar;
    return 40'(w);
  endfunction

  task automatic instr(logic [39:0] w, logic wr, int ack_at, int cstb_len);
    rt(); bd = w; write = wr; cstb = 1; rt();
    for (int t = 1; t < cstb_len; t++) begin
      ack = (ack_at != 0 && t >= ack_at);
      rt();
    end
    cstb = 0; ack = 0; write = 0; bd = '0; rt(2);
  endtask

  task automatic readout(logic [2:0] chip, logic [3:0] chan, int words);
    instr(word(0, HWADD[4:0], chip, chan, I_CHRDO), 1, 1, 2);
    rt(2); trsf = 1;
    for (int i = 0; i < words; i++) begin dstb = 1; rt(); dstb = 0; end
    trsf = 0; rt(3);
    n_readout++;
  endtask

  task automatic trig(ref logic s);
    @(negedge rclk); s = 1; rt(2); s = 0; rt(2);
  endtask
  task automatic l1l2(); trig(l1); repeat (500) @(posedge clk); trig(l2); endtask
  task automatic gap(); repeat (4100) @(posedge clk); endtask  // > 100 us

  task automatic adc(int ch, int v);
    @(posedge clk); adc_valid = 1; adc_ch = 3'(ch); adc_data = 10'(v);
    @(posedge clk); adc_valid = 0;
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n_ev;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (200) @(posedge clk);

    // identity, clean start
    reg_read(A_HWADD, d);
    check("HWADD", d == 32'(HWADD));
    command(C_RERLBK);
    expect_log('0, "idle");

    // --------------------------------------------- electrical monitoring
    reg_write(A_AVOLTHR, {12'h0, 10'd700, 10'd500});
    reg_write(A_ACURTHR, {12'h0, 10'd300, 10'd100});
    reg_write(A_DVOLTHR, {12'h0, 10'd650, 10'd450});
    reg_write(A_DCURTHR, {12'h0, 10'd400, 10'd200});
    reg_write(A_TPTHR, 32'd600);
    reg_read(A_AVOLTHR, d); check("AVOLTHR read back", d == {12'h0, 10'd700, 10'd500});
    reg_read(A_DCURTHR, d); check("DCURTHR read back", d == {12'h0, 10'd400, 10'd200});
    reg_read(A_TPTHR, d);   check("TPTHR read back", d == 32'd600);
    reg_write(A_VOLTREG, 32'h5); reg_write(A_PWSW, 32'h2);
    check("regulator and switch control", vreg_en == 4'h5 && pwsw_en == 2'h2);
    reg_read(A_VOLTREG, d); check("VOLTREG reads regulator state", d == 32'(vreg_status));
    reg_read(A_PWSW, d);    check("PWSW reads switch state", d == 32'(pwsw_status));
    adc(0, 400); adc(1, 600); adc(2, 550); adc(3, 200); adc(4, 300);
    reg_read(A_TEMP, d);   check("TEMP", d == 400);
    reg_read(A_ANVOLT, d); check("ANVOLT", d == 600);
    reg_read(A_DGVOLT, d); check("DGVOLT", d == 550);
    reg_read(A_ANCUR, d);  check("ANCUR", d == 200);
    reg_read(A_DGCUR, d);  check("DGCUR", d == 300);
    // the zero values before the first conversions were out of band
    reg_read(A_ERRLOG, d);
    check("out-of-band start flagged", d == 32'h0F00 && int_o);
    int_ack = 1; repeat (6) @(posedge clk); int_ack = 0;
    command(C_RERLBK);
    expect_log('0, "all in band");
    adc(1, 720);  expect_log(16'(1) << E_AVERR, "analogue voltage high", 1); adc(1, 600);
    command(C_RERLBK);
    adc(3, 50);   expect_log(16'(1) << E_ACERR, "analogue current low", 1);   adc(3, 200);
    command(C_RERLBK);
    adc(2, 449);  expect_log(16'(1) << E_DVERR, "digital voltage low", 1);    adc(2, 550);
    command(C_RERLBK);
    adc(4, 401);  expect_log(16'(1) << E_DCERR, "digital current high", 1);   adc(4, 300);
    command(C_RERLBK);
    adc(0, 601);  expect_log(16'(1) << E_TPERR, "temperature high", 1);       adc(0, 400);
    command(C_RERLBK);
    expect_log('0, "back in band");

    // ------------------------------------------------ triggers and buffers
    for (int i = 0; i < 3; i++) begin l1l2(); gap(); end
    reg_read(A_NBRL1, d); check("NBRL1 = 3", d == 3);
    reg_read(A_NBRL2, d); check("NBRL2 = 3", d == 3);
    reg_read(A_MEVBF, d); check($sformatf("MEVBF all 3: %h", d), d == 32'h3333_3333);
    reg_read(A_WRPTER, d); check("WRPTER all 3", d == {8{3'd3}});
    reg_read(A_RBUFF_BASE | 8'h57, d); check("RBUFF chip 5 ch 7 = 5", d == 5);
    expect_log('0, "spaced triggers");

    // good register write and read on the ALTRO bus, then the scope
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h0A), 1, 2, 4);
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h0A), 0, 3, 5);
    reg_read(A_WRSC, d);  check($sformatf("WRITE scope %b", d[9:0]), d == 32'b00_0000_0000);
    reg_read(A_ACKSC, d); check($sformatf("ACK scope %b", d[9:0]), d == 32'b00_0001_1000);
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h0A), 1, 2, 4);
    reg_read(A_WRSC, d);  check($sformatf("WRITE scope %b", d[9:0]), d == 32'b00_0000_1111);
    reg_read(A_ACKSC, d); check($sformatf("ACK scope %b", d[9:0]), d == 32'b00_0000_1100);
    expect_log('0, "good ALTRO accesses");

    // channel readouts
    readout(3'd2, 4'd5, 37);
    reg_read(A_NDSTB, d); check("NDSTB 37", d == 37);
    reg_read(A_TRSFSC, d); check($sformatf("TRSF scope %b", d[9:0]), d == 32'b11_1100_0000);
    reg_read(A_DSTBSC, d); check($sformatf("DSTB scope %b", d[9:0]), d == 32'b11_1100_0000);
    readout(3'd4, 4'd0, 200);
    reg_read(A_NDSTB, d); check("NDSTB 200", d == 200);
    reg_read(A_NBRDO, d); check("NBRDO 2", d == 2);
    expect_log('0, "good readouts");

    // read pointer increments: broadcast, then per chip
    instr(word(1, 5'd0, 3'd0, 4'd0, I_RPINC), 1, 0, 2);
    reg_read(A_MEVBF, d);  check("MEVBF all 2", d == 32'h2222_2222);
    reg_read(A_RDPTER, d); check("RDPTER all 1", d == {8{3'd1}});
    reg_read(A_RBUFF_BASE | 8'h3F, d); check("RBUFF chip 3 ch 15 = 6", d == 6);

    // BSYERR: chip 6 alone gets one more RPINC, the next L2 sees the skew
    instr(word(0, HWADD[4:0], 3'd6, 4'd0, I_RPINC), 1, 1, 3);
    reg_read(A_MEVBF, d);  check("MEVBF chip 6 = 1", d == 32'h2122_2222);
    l1l2(); gap();
    expect_log(16'(1) << E_BSYERR, "buffers out of step");

    // BEMPY: empty chip 6 and read it out
    instr(word(0, HWADD[4:0], 3'd6, 4'd0, I_RPINC), 1, 1, 3);
    instr(word(0, HWADD[4:0], 3'd6, 4'd0, I_RPINC), 1, 1, 3);
    reg_read(A_MEVBF, d);  check("MEVBF chip 6 empty", d[27:24] == 0);
    readout(3'd6, 4'd3, 4);
    expect_log(16'(1) << E_BEMPY, "readout of empty buffer");

    // global reset clears the mirror and is counted
    trig(grst);
    reg_read(A_NBRRS, d); check("NBRRS 1", d == 1);
    reg_read(A_MEVBF, d); check("MEVBF cleared by global reset", d == 0);

    // BFULL: 8 events fill the buffers, the 9th overflows
    for (int i = 0; i < MEB_DEPTH_TB; i++) begin l1l2(); gap(); end
    reg_read(A_MEVBF, d); check("MEVBF full", d == 32'h8888_8888);
    reg_read(A_RBUFF_BASE | 8'h00, d); check("RBUFF 0 when full", d == 0);
    l1l2(); gap();
    expect_log(16'(1) << E_BFULL, "buffer full");

    // trigger overlap: two L1 within 100 us
    trig(l1); repeat (1000) @(posedge clk); trig(l1); gap();
    expect_log(16'(1) << E_TROVP, "trigger overlap");

    // protocol errors
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h03), 0, 0, 20);
    expect_log(16'(1) << E_RDERR, "read without ACK");
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h03), 1, 0, 2);
    expect_log(16'(1) << E_WRERR, "write dropped before ACK");
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h03, 1), 1, 2, 4);
    expect_log(16'(1) << E_PERR, "parity");
    instr(word(0, HWADD[4:0], 3'd1, 4'd0, 5'h0E), 1, 2, 4);
    expect_log(16'(1) << E_ISTERR, "invalid instruction");
    instr(word(0, HWADD[4:0], 3'd1, 4'd2, I_CHRDO), 1, 1, 2);
    rt(40);
    expect_log(16'(1) << E_ROERR, "readout without transfer");
    instr(word(0, 5'd3, 3'd1, 4'd0, 5'h0E), 0, 0, 20);
    expect_log('0, "other card's traffic");

    // missing clocks
    sclk_run = 0; repeat (200) @(posedge clk);
    reg_read(A_ERRLOG, d);
    check("SCKERR while sampling clock stopped", d[E_SCKERR]);
    seen[E_SCKERR] |= d[E_SCKERR];
    sclk_run = 1; repeat (50) @(posedge clk);
    int_ack = 1; repeat (6) @(posedge clk); int_ack = 0;
    command(C_RERLBK);
    rclk_run = 0; repeat (200) @(posedge clk); rclk_run = 1; repeat (50) @(posedge clk);
    expect_log(16'(1) << E_RCKERR, "readout clock gap");

    // CNTRST clears the counters only
    reg_read(A_NBRL1, d); check("NBRL1 before CNTRST", d == 3 + 1 + 8 + 1 + 2);
    command(C_CNTRST);
    reg_read(A_NBRL1, d); check("NBRL1 cleared", d == 0);
    reg_read(A_NBRDO, d); check("NBRDO cleared", d == 0);
    reg_read(A_NDSTB, d); check("NDSTB cleared", d == 0);
    reg_read(A_TPTHR, d); check("TPTHR kept by CNTRST", d == 600);

    // BCRST returns the registers to their reset values
    trig(l1); adc(1, 1000);
    command(C_BCRST);
    reg_read(A_TPTHR, d);   check("TPTHR reset", d == 32'h3FF);
    reg_read(A_AVOLTHR, d); check("AVOLTHR reset", d == 32'hFFC00);
    reg_read(A_NBRL1, d);   check("NBRL1 reset", d == 0);
    reg_read(A_MEVBF, d);   check("MEVBF reset", d == 0);
    reg_read(A_ERRLOG, d);  check("ERRLOG reset", d == 0);
    check("regulators back on", vreg_en == 4'hF && pwsw_en == 2'h3);

    // every mechanism must have happened
    for (int b = 0; b < N_ERR; b++)
      check($sformatf("error flag %0d seen", b), seen[b]);
    check("INT handshakes", n_int >= 15);
    check("commands used", n_cmd_cnt > 0 && n_cmd_bc > 0 && n_cmd_rl > 0);
    check("readouts", n_readout >= 3);
    $display("mechanisms: errors seen %h, INT %0d, CNTRST %0d, BCRST %0d, RERLBK %0d, readouts %0d",
             seen, n_int, n_cmd_cnt, n_cmd_bc, n_cmd_rl, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
