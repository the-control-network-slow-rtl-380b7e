// Testbench for bc_clk_monitor: runs the watched clock, checks one rise_o
// pulse per edge and no alarm, stops it and checks that missing_o rises
// after TIMEOUT cycles, then restarts it and checks the alarm clears.
module bc_clk_monitor_tb;
  localparam int TIMEOUT = 16;
  logic clk = 0, rst_n = 0, mon = 0, run = 1;
  logic rise, missing;
  int checks = 0, failures = 0, rises = 0, edges = 0;

  bc_clk_monitor #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .mon_clk_i(mon), .rise_o(rise), .missing_o(missing));

  always #5 clk = ~clk;
  always #40 if (run) begin mon = ~mon; if (mon) edges++; end
  always @(posedge clk) if (rise) rises++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    edges = 0; rises = 0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      if (missing) begin check("no alarm while clock runs", 0); break; end
    end
    check("no alarm while clock runs", !missing);
    @(posedge mon); run = 0;
    repeat (6) @(posedge clk);
    check($sformatf("one rise per edge (%0d vs %0d)", rises, edges), rises == edges);
    repeat (TIMEOUT - 8) @(posedge clk);
    check("alarm not before timeout", !missing);
    repeat (12) @(posedge clk);
    check("alarm after timeout", missing);
    run = 1;
    repeat (20) @(posedge clk);
    check("alarm cleared when clock returns", !missing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
