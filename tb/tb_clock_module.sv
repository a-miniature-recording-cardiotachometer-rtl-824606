// tb_clock_module: checks the divider chain's output periods and the stage IV
// hold.
//
// A scaled instance (strobe /4, 1 kHz /16, stage III /3, 204 Hz /2, 0.1 Hz /8)
// has every output period measured between rising edges and compared with
// the product of the ratios. A default instance checks the 156-kHz (32
// cycles), 1-kHz (4096) and 204-Hz (24576) periods of the full-size chain.
// Hold is checked by forcing it high and seeing the stage IV outputs stay low,
// then timing the first 0.1-Hz rise after release (half its period).
module tb_clock_module;
  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic s156, s1k, s204, s01;
  logic d156, d1k, d204, d01;
  clock_module #(.DIV_STROBE(4), .DIV_1K(16), .DIV_III(3), .DIV_204(2), .DIV_SRQ(8)) dut (
    .clk(clk), .rst_n(rst_n), .hold(hold),
    .clk_156k(s156), .clk_1k(s1k), .clk_204(s204), .clk_01(s01)
  );
  clock_module dut_full (
    .clk(clk), .rst_n(rst_n), .hold(1'b0),
    .clk_156k(d156), .clk_1k(d1k), .clk_204(d204), .clk_01(d01)
  );

  int last[7], nedge[7];
  logic [6:0] sigs;
  assign sigs = {d204, d1k, d156, s01, s204, s1k, s156};
  for (genvar i = 0; i < 7; i++) begin : g_meter
    tb_period_meter u_m (.clk(clk), .enable(rst_n && !hold), .sig(sigs[i]),
                         .period(last[i]), .edges(nedge[i]));
  end

  initial begin
    int hi204, hi01, wait_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Scaled chain: 2000 cycles is several 0.1-Hz periods (384 cycles).
    repeat (2000) @(posedge clk);
    check(last[0] == 4,   $sformatf("strobe period %0d, want 4", last[0]));
    check(last[1] == 16,  $sformatf("1k period %0d, want 16", last[1]));
    check(last[2] == 96,  $sformatf("204 period %0d, want 96", last[2]));
    check(last[3] == 384, $sformatf("0.1 period %0d, want 384", last[3]));
    check(nedge[3] >= 3,   "0.1-Hz output toggled several times");
    // Hold: stage IV outputs stay low.
    @(negedge clk) hold = 1'b1;
    hi204 = 0; hi01 = 0;
    repeat (500) begin
      @(posedge clk);
      #1;
      if (s204) hi204++;
      if (s01)  hi01++;
    end
    check(hi204 == 0 && hi01 == 0, "stage IV held at zero while hold");
    // After release the first 0.1-Hz rise comes after DIV_SRQ/2 stage-III
    // periods of 48 cycles, within one stage-III period of phase error.
    @(negedge clk) hold = 1'b0;
    wait_cycles = 0;
    while (!s01) begin @(posedge clk); #1; wait_cycles++; end
    check(wait_cycles > 4*48 - 48 && wait_cycles <= 4*48,
          $sformatf("first 0.1-Hz rise after %0d cycles", wait_cycles));
    // Full-size chain: let the 204-Hz output complete two periods.
    repeat (60000) @(posedge clk);
    check(last[4] == 32,    $sformatf("full strobe period %0d, want 32", last[4]));
    check(last[5] == 4096,  $sformatf("full 1k period %0d, want 4096", last[5]));
    check(last[6] == 24576, $sformatf("full 204 period %0d, want 24576", last[6]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
