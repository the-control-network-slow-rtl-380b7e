// Testbench for bc_scope: drives random control-signal patterns on a slow
// tick, starts instructions by raising CSTB and compares the four recorded
// 10-sample registers with the pattern that was driven.
module bc_scope_tb;
  import bc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  altro_ctrl_t ctrl = '0;
  logic [SCOPE_LEN-1:0] dsc, wsc, asc, tsc, ed, ew, ea, et;
  int checks = 0, failures = 0;

  bc_scope dut (.clk, .rst_n, .soft_rst_i(1'b0), .tick_i(tick), .ctrl_i(ctrl),
                .dstbsc_o(dsc), .wrsc_o(wsc), .acksc_o(asc), .trsfsc_o(tsc));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_tick();
    tick = 1; @(posedge clk); #1 tick = 0; repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      ctrl = '0; do_tick();
      for (int i = 0; i < SCOPE_LEN + 5; i++) begin
        ctrl.cstb  = (i < 4);
        ctrl.dstb  = 1'($urandom); ctrl.write = 1'($urandom);
        ctrl.ack   = 1'($urandom); ctrl.trsf  = 1'($urandom);
        if (i < SCOPE_LEN) begin
          ed[i] = ctrl.dstb; ew[i] = ctrl.write; ea[i] = ctrl.ack; et[i] = ctrl.trsf;
        end
        do_tick();
      end
      check("DSTB scope", dsc == ed);
      check("WRITE scope", wsc == ew);
      check("ACK scope", asc == ea);
      check("TRSF scope", tsc == et);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
