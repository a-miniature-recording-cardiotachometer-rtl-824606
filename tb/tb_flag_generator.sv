// tb_flag_generator: checks that SRF toggles on each rising edge of the
// 0.1-Hz clock and that AI clears it, with priority over a simultaneous edge.
module tb_flag_generator;
  logic clk = 1'b0, rst_n = 1'b0, c01 = 1'b0, ai = 1'b0, srf;
  int checks = 0, failures = 0;
  bit expect_srf = 1'b0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flag_generator dut (.clk(clk), .rst_n(rst_n), .clk_01(c01), .ai(ai), .srf(srf));

  task automatic tick();
    @(negedge clk) c01 = 1'b1;
    repeat (4) @(negedge clk);
    c01 = 1'b0;
    repeat (4) @(negedge clk);
    expect_srf = ~expect_srf;
    check(srf == expect_srf, $sformatf("after tick srf=%0b", srf));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(srf == 1'b0, "reset clears SRF");
    tick();                     // set
    tick();                     // toggled off again (request not served)
    tick();                     // set
    @(negedge clk) ai = 1'b1;
    @(negedge clk) ai = 1'b0;
    expect_srf = 1'b0;
    check(srf == 1'b0, "AI clears SRF");
    tick();                     // set again
    // AI in the very cycle of a rising edge, with SRF clear: the clear
    // wins and SRF stays low (a toggle would set it).
    @(negedge clk) ai = 1'b1;
    @(negedge clk) ai = 1'b0;
    check(srf == 1'b0, "AI clears SRF again");
    @(negedge clk) ai = 1'b1;
    c01 = 1'b1;
    @(negedge clk) ai = 1'b0;
    check(srf == 1'b0, "AI has priority over the toggle");
    repeat (3) @(negedge clk);
    check(srf == 1'b0, "no toggle without a new edge");
    c01 = 1'b0;
    expect_srf = 1'b0;
    repeat (3) @(negedge clk);
    tick();
    check(srf == 1'b1, "set on the next edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
