// Control-network testbench: two Board Controllers with different hardware
// addresses share one I2C bus, one ALTRO bus and the trigger lines, as cards
// of one readout branch do. An RCU model addresses each card in turn and
// checks that registers, commands and errors stay per card: an instruction
// for one card raises only that card's INT, a broadcast reaches both, and an
// address with no card behind it is not acknowledged.
module control_network_tb;
  import bc_pkg::*;

  localparam logic [7:0] HW_A = 8'h03, HW_B = 8'h14;
  localparam int HALF = 50;

  logic clk = 0, rst_n = 0;
  logic scl = 1, m_low = 0, sda;
  logic [1:0] sda_oe, int_o, int_ack = '0;
  logic rclk = 0;
  logic l1 = 0, l2 = 0;
  logic [39:0] bd = '0;
  logic cstb = 0, write = 0, ack = 0;
  int checks = 0, failures = 0;

  assign sda = ~(m_low | (|sda_oe));

  board_controller card_a (
    .clk, .rst_n, .hwadd_i(HW_A), .scl_i(scl), .sda_i(sda), .sda_oe_o(sda_oe[0]),
    .int_o(int_o[0]), .int_ack_i(int_ack[0]), .rclk_i(rclk), .sclk_i(rclk),
    .l1_i(l1), .l2_i(l2), .grst_i(1'b0), .bd_i(bd), .cstb_i(cstb), .write_i(write),
    .ack_i(ack), .trsf_i(1'b0), .dstb_i(1'b0), .adc_valid_i(1'b0), .adc_ch_i(3'd0),
    .adc_data_i(10'd0), .vreg_status_i(4'hF), .pwsw_status_i(2'h3),
    .vreg_en_o(), .pwsw_en_o());

  board_controller card_b (
    .clk, .rst_n, .hwadd_i(HW_B), .scl_i(scl), .sda_i(sda), .sda_oe_o(sda_oe[1]),
    .int_o(int_o[1]), .int_ack_i(int_ack[1]), .rclk_i(rclk), .sclk_i(rclk),
    .l1_i(l1), .l2_i(l2), .grst_i(1'b0), .bd_i(bd), .cstb_i(cstb), .write_i(write),
    .ack_i(ack), .trsf_i(1'b0), .dstb_i(1'b0), .adc_valid_i(1'b0), .adc_ch_i(3'd0),
    .adc_data_i(10'd0), .vreg_status_i(4'hF), .pwsw_status_i(2'h3),
    .vreg_en_o(), .pwsw_en_o());

  always #12.5 clk = ~clk;
  always #100 rclk = ~rclk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic half(); repeat (HALF) @(posedge clk); endtask
  task automatic i2c_start(); m_low = 0; half(); scl = 1; half(); m_low = 1; half(); scl = 0; half(); endtask
  task automatic i2c_stop();  m_low = 1; half(); scl = 1; half(); m_low = 0; half(); endtask
  task automatic put_bit(logic b); m_low = ~b; half(); scl = 1; half(); scl = 0; half(); endtask
  task automatic get_bit(output logic b); m_low = 0; half(); scl = 1; half(); b = sda; scl = 0; half(); endtask
  task automatic put_byte(logic [7:0] d, output logic acked);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(d[i]);
    get_bit(a); acked = !a;
  endtask
  task automatic get_byte(output logic [7:0] d, input logic last);
    for (int i = 7; i >= 0; i--) get_bit(d[i]);
    put_bit(last);
  endtask

  function automatic logic [6:0] addr_of(logic [7:0] hw);
    return {2'b10, hw[4:0]};
  endfunction

  task automatic reg_write(logic [7:0] hw, logic [7:0] a, logic [31:0] d);
    logic ok;
    i2c_start(); put_byte({addr_of(hw), 1'b0}, ok); put_byte(a, ok);
    for (int i = 3; i >= 0; i--) put_byte(d[8*i +: 8], ok);
    i2c_stop();
  endtask
  task automatic reg_read(logic [7:0] hw, logic [7:0] a, output logic [31:0] d);
    logic ok;
    i2c_start(); put_byte({addr_of(hw), 1'b0}, ok); put_byte(a, ok);
    i2c_start(); put_byte({addr_of(hw), 1'b1}, ok);
    for (int i = 3; i >= 0; i--) get_byte(d[8*i +: 8], i == 0);
    i2c_stop();
  endtask
  task automatic command(logic [7:0] hw, logic [7:0] c);
    logic ok;
    i2c_start(); put_byte({addr_of(hw), 1'b0}, ok); put_byte(c, ok); i2c_stop();
  endtask

  task automatic rt(int n = 1); repeat (n) @(negedge rclk); endtask
  function automatic logic [39:0] word(logic bc, logic [4:0] fec, logic [4:0] code);
    altro_instr_t w;
    w = '{par: 1'b0, bcast: bc, bcal: 1'b0, fec: fec, chip: 3'd2, chan: 4'd0,
          code: code, data: 20'h0};
    w.par = ^w;
    return 40'(w);
  endfunction
  task automatic instr(logic [39:0] w, int ack_at);
    rt(); bd = w; write = 1; cstb = 1; rt();
    for (int t = 1; t < 4; t++) begin ack = (ack_at != 0 && t >= ack_at); rt(); end
    cstb = 0; ack = 0; write = 0; bd = '0; rt(2);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic ok;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (200) @(posedge clk);
    command(HW_A, C_RERLBK); command(HW_B, C_RERLBK);
    int_ack = 2'b11; repeat (6) @(posedge clk); int_ack = 2'b00;
    check("both cards quiet", int_o == 2'b00);

    reg_read(HW_A, A_HWADD, d); check("card A answers with its address", d == 32'(HW_A));
    reg_read(HW_B, A_HWADD, d); check("card B answers with its address", d == 32'(HW_B));
    reg_write(HW_A, A_TPTHR, 32'd111);
    reg_write(HW_B, A_TPTHR, 32'd222);
    reg_read(HW_A, A_TPTHR, d); check("card A register", d == 111);
    reg_read(HW_B, A_TPTHR, d); check("card B register", d == 222);

    // no card at this address
    i2c_start(); put_byte({addr_of(8'h07), 1'b0}, ok); i2c_stop();
    check("absent card not acknowledged", !ok);

    // an invalid instruction for card B only
    instr(word(0, HW_B[4:0], 5'h0E), 2);
    repeat (20) @(posedge clk);
    check("only card B raises INT", int_o == 2'b10);
    reg_read(HW_B, A_ERRLOG, d); check("card B logs ISTERR", d == (32'd1 << E_ISTERR));
    reg_read(HW_A, A_ERRLOG, d); check("card A log clean", d == 0);
    int_ack[1] = 1; repeat (6) @(posedge clk); int_ack[1] = 0; repeat (3) @(posedge clk);
    check("card B INT acknowledged", int_o == 2'b00);

    // broadcast WPINC and an L2 reach both cards
    instr(word(1, 5'd0, I_WPINC), 0);
    @(negedge rclk); l2 = 1; rt(2); l2 = 0; rt(2);
    reg_read(HW_A, A_MEVBF, d); check("card A mirror", d == 32'h2222_2222);
    reg_read(HW_B, A_MEVBF, d); check("card B mirror", d == 32'h2222_2222);
    reg_read(HW_A, A_NBRL2, d); check("card A counted L2", d == 1);
    reg_read(HW_B, A_NBRL2, d); check("card B counted L2", d == 1);

    // a command to card A leaves card B alone
    command(HW_A, C_BCRST);
    reg_read(HW_A, A_TPTHR, d); check("card A reset", d == 32'h3FF);
    reg_read(HW_B, A_TPTHR, d); check("card B kept its value", d == 222);
    reg_read(HW_B, A_ERRLOG, d); check("card B log still holds ISTERR", d == (32'd1 << E_ISTERR));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
