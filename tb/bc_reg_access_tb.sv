// Testbench for bc_reg_access: drives the byte-level slave interface
// directly. Writes random words to random addresses and checks the write
// strobe; writes the three command addresses and checks the command pulses;
// reads every mapped register (and a sample of RBUFF entries) from a random
// register record and compares the four bytes with the expected value.
module bc_reg_access_tb;
  import bc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, rd_start = 0, rx_valid = 0, tx_done = 0;
  logic [7:0] rx_byte = 0, tx_byte;
  bc_regs_t regs;
  logic wr, cntrst, bcrst, rerlbk;
  logic [7:0] wa; logic [REG_W-1:0] wd;
  int checks = 0, failures = 0, n_wr = 0, n_cnt = 0, n_bc = 0, n_rl = 0;
  logic [7:0] last_wa; logic [REG_W-1:0] last_wd;

  bc_reg_access dut (.clk, .rst_n, .start_i(start), .stop_i(stop),
    .rd_start_i(rd_start), .rx_valid_i(rx_valid), .rx_byte_i(rx_byte),
    .tx_done_i(tx_done), .tx_byte_o(tx_byte), .regs_i(regs), .wr_o(wr),
    .wr_addr_o(wa), .wr_data_o(wd), .cntrst_o(cntrst), .bcrst_o(bcrst),
    .rerlbk_o(rerlbk));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (wr) begin n_wr++; last_wa = wa; last_wd = wd; end
    n_cnt += cntrst; n_bc += bcrst; n_rl += rerlbk;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1 s = 0; repeat (3) @(posedge clk); #1;
  endtask
  task automatic send(logic [7:0] b);
    rx_byte = b; pulse(rx_valid);
  endtask
  task automatic write_reg(logic [7:0] a, logic [31:0] d);
    pulse(start); send(a);
    for (int i = 3; i >= 0; i--) send(d[8*i +: 8]);
    pulse(stop);
  endtask
  task automatic read_reg(logic [7:0] a, output logic [31:0] d);
    pulse(start); send(a); pulse(start); pulse(rd_start);
    for (int i = 3; i >= 0; i--) begin d[8*i +: 8] = tx_byte; pulse(tx_done); end
    pulse(stop);
  endtask

  function automatic logic [31:0] expect_val(logic [7:0] a);
    if (a >= 8'h80) return 32'(regs.rbuff[a[6:4]][a[3:0]]);
    case (a)
      8'h00: return 32'(regs.temp);    8'h01: return 32'(regs.voltreg);
      8'h02: return 32'(regs.pwsw);    8'h03: return 32'(regs.anvolt);
      8'h04: return 32'(regs.dgvolt);  8'h05: return 32'(regs.ancur);
      8'h06: return 32'(regs.dgcur);   8'h07: return 32'(regs.avolthr);
      8'h08: return 32'(regs.acurthr); 8'h09: return 32'(regs.dvolthr);
      8'h0A: return 32'(regs.dcurthr); 8'h0B: return 32'(regs.tpthr);
      8'h10: return 32'(regs.errlog);
      8'h20: return 32'(regs.nbrl1);   8'h21: return 32'(regs.nbrl2);
      8'h22: return 32'(regs.nbrrs);   8'h23: return 32'(regs.ndstb);
      8'h24: return 32'(regs.nbrdo);   8'h25: return 32'(regs.hwadd);
      8'h30: return 32'(regs.wrpter);  8'h31: return 32'(regs.mevbf);
      8'h32: return 32'(regs.rdpter);  8'h33: return 32'(regs.dstbsc);
      8'h34: return 32'(regs.wrsc);    8'h35: return 32'(regs.acksc);
      8'h36: return 32'(regs.trsfsc);
      default: return 32'h0;
    endcase
  endfunction

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] addrs [$] = '{8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06,
      8'h07, 8'h08, 8'h09, 8'h0A, 8'h0B, 8'h10, 8'h20, 8'h21, 8'h22, 8'h23,
      8'h24, 8'h25, 8'h30, 8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h0C, 8'h7F};
    for (int i = 0; i < $bits(regs) / 32 + 1; i++) regs[32*i +: 32] = $urandom;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      automatic logic [7:0] a = 8'($urandom_range(0, 8'h3F));
      automatic logic [31:0] v = $urandom;
      automatic int n_prev = n_wr;
      write_reg(a, v);
      check("one write strobe", n_wr == n_prev + 1);
      check("write address and data", last_wa == a && last_wd == v);
    end
    write_reg(C_CNTRST, 0); write_reg(C_BCRST, 0); write_reg(C_RERLBK, 0);
    write_reg(C_RERLBK, 0);
    check("command pulses", n_cnt == 1 && n_bc == 1 && n_rl == 2);
    // short write: no strobe
    begin
      automatic int n_prev = n_wr;
      pulse(start); send(8'h07); send(8'h12); pulse(stop);
      check("incomplete write ignored", n_wr == n_prev);
    end
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < $bits(regs) / 32 + 1; i++) regs[32*i +: 32] = $urandom;
      foreach (addrs[k]) begin
        read_reg(addrs[k], d);
        check($sformatf("read %h: %h vs %h", addrs[k], d, expect_val(addrs[k])),
              d == expect_val(addrs[k]));
      end
      for (int k = 0; k < 16; k++) begin
        automatic logic [7:0] a = 8'h80 | 8'($urandom);
        read_reg(a, d);
        check($sformatf("read RBUFF %h", a), d == expect_val(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
