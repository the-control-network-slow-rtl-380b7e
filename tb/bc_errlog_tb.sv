// Testbench for bc_errlog: sets error flags by pulses and levels, checks the
// sticky logbook against a reference, the INT rise on each new flag, the
// drop on acknowledge and the clear.
module bc_errlog_tb;
  import bc_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, ack = 0;
  logic [N_ERR-1:0] set = '0, log, ref_log = '0;
  logic int_o;
  int checks = 0, failures = 0;

  bc_errlog dut (.clk, .rst_n, .clr_i(clr), .set_i(set), .int_ack_i(ack),
                 .log_o(log), .int_o);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(logic [N_ERR-1:0] v);
    set = v; @(posedge clk); #1 set = '0;
    ref_log |= v;
  endtask

  task automatic do_ack();
    ack = 1; repeat (4) @(posedge clk); #1 ack = 0; repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    check("idle after reset", log == 0 && !int_o);
    pulse(16'h0001 << E_PERR); #1;
    check("PERR flag set", log == ref_log);
    check("INT raised", int_o);
    do_ack();
    check("INT dropped on acknowledge", !int_o);
    check("flag kept after acknowledge", log == ref_log);
    pulse(16'h0001 << E_PERR); #1;
    check("same flag again: no new INT", !int_o);
    for (int i = 0; i < 20; i++) begin
      automatic logic [N_ERR-1:0] v = N_ERR'($urandom) & N_ERR'($urandom);
      automatic logic fresh = |(v & ~ref_log);
      pulse(v); #1;
      check($sformatf("logbook %h", ref_log), log == ref_log);
      check("INT on new flag only", int_o == fresh);
      if (int_o) do_ack();
    end
    clr = 1; @(posedge clk); #1 clr = 0; ref_log = '0;
    check("cleared", log == 0 && !int_o);
    // a level condition sets its flag again after a clear
    set = 16'h0001 << E_TPERR; @(posedge clk); #1;
    clr = 1; @(posedge clk); #1 clr = 0;
    check("cleared while level", log == 0);
    @(posedge clk); #1;
    check("level sets flag again", log == (16'h0001 << E_TPERR) && int_o);
    set = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
