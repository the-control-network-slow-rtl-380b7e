// Testbench for bc_i2c_slave: an I2C master model on an open-drain bus
// writes and reads random bytes; checks address matching, ACK/NACK, the
// received bytes, the transmitted bytes and the START/STOP/read pulses.
module bc_i2c_slave_tb;
  localparam logic [6:0] ADDR = 7'h45;
  localparam int HALF = 20;   // BC clock cycles per SCL half period
  logic clk = 0, rst_n = 0;
  logic scl = 1, m_low = 0, sda_oe, sda;
  logic start, stop, rd_start, rx_valid, tx_done;
  logic [7:0] rx_byte, tx_byte;
  logic [7:0] rxq [$];
  logic [7:0] txmem [8];
  int tx_idx = 0, n_start = 0, n_stop = 0, n_rds = 0;
  int checks = 0, failures = 0;

  assign sda = ~(m_low | sda_oe);   // wired-AND with pull-up

  bc_i2c_slave dut (.clk, .rst_n, .slave_addr_i(ADDR), .scl_i(scl), .sda_i(sda),
    .sda_oe_o(sda_oe), .start_o(start), .stop_o(stop), .rd_start_o(rd_start),
    .rx_valid_o(rx_valid), .rx_byte_o(rx_byte), .tx_byte_i(tx_byte),
    .tx_done_o(tx_done));

  always #5 clk = ~clk;
  assign tx_byte = txmem[tx_idx % 8];
  always @(posedge clk) begin
    if (rx_valid) rxq.push_back(rx_byte);
    if (tx_done) tx_idx++;
    if (rd_start) tx_idx = 0;
    if (rst_n) begin n_start += start; n_stop += stop; n_rds += rd_start; end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic half(); repeat (HALF) @(posedge clk); endtask

  task automatic i2c_start();
    m_low = 0; half(); scl = 1; half(); m_low = 1; half(); scl = 0; half();
  endtask
  task automatic i2c_stop();
    m_low = 1; half(); scl = 1; half(); m_low = 0; half();
  endtask
  task automatic put_bit(logic b);
    m_low = ~b; half(); scl = 1; half(); scl = 0; half();
  endtask
  task automatic get_bit(output logic b);
    m_low = 0; half(); scl = 1; half(); b = sda; scl = 0; half();
  endtask
  task automatic put_byte(logic [7:0] d, output logic acked);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(d[i]);
    get_bit(a); acked = ~a;
  endtask
  task automatic get_byte(output logic [7:0] d, input logic ack);
    for (int i = 7; i >= 0; i--) get_bit(d[i]);
    put_bit(~ack);
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [7:0] sent [$], got;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);
    for (int it = 0; it < 6; it++) begin
      automatic int n = $urandom_range(1, 5);
      // write
      sent.delete(); rxq.delete();
      i2c_start();
      put_byte({ADDR, 1'b0}, ok);
      check("address ACK", ok);
      for (int i = 0; i < n; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        sent.push_back(b);
        put_byte(b, ok);
        check("data ACK", ok);
      end
      i2c_stop();
      repeat (10) @(posedge clk);
      check($sformatf("received %0d bytes", n), rxq.size() == n);
      for (int i = 0; i < n && i < rxq.size(); i++)
        check("received byte", rxq[i] == sent[i]);
      // read
      foreach (txmem[i]) txmem[i] = 8'($urandom);
      i2c_start();
      put_byte({ADDR, 1'b1}, ok);
      check("read address ACK", ok);
      for (int i = 0; i < n; i++) begin
        get_byte(got, i != n - 1);
        check($sformatf("read byte %0d: %h vs %h", i, got, txmem[i]), got == txmem[i]);
      end
      i2c_stop();
    end
    // wrong address: NACK, nothing received
    rxq.delete();
    i2c_start();
    put_byte({ADDR ^ 7'h01, 1'b0}, ok);
    check("wrong address NACK", !ok);
    put_byte(8'h5A, ok);
    check("no ACK for data to others", !ok);
    i2c_stop();
    repeat (10) @(posedge clk);
    check("nothing received for others", rxq.size() == 0);
    check($sformatf("START/STOP/read pulses %0d %0d %0d", n_start, n_stop, n_rds), n_start == 13 && n_stop == 13 && n_rds == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
