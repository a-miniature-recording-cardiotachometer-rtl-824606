// tb_beat_period_accumulator: checks clear, preset, gated counting and the
// count-to-period mapping.
//
// The 204-Hz clock is a testbench square wave of 10 cycles. For a series of
// gate lengths the testbench presets, opens CG for a whole number of 204-Hz
// periods, closes it and compares the count with (0xCD + periods) mod 256,
// worked out here. It also checks that clear holds zero and wins over
// preset, and that nothing is counted while CG is low.
module tb_beat_period_accumulator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, preset = 1'b0, cg = 1'b0, c204 = 1'b0;
  logic [7:0] count;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;
  // 204-Hz stand-in: period 10 clk cycles, rising edge on negedge of clk.
  initial forever begin
    repeat (5) @(negedge clk);
    c204 = ~c204;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  beat_period_accumulator dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .preset(preset), .cg(cg),
    .clk_204(c204), .count(count)
  );

  task automatic measure(input int periods);
    logic [7:0] expect_v;
    // Preset during a low 204-Hz phase, then open the gate just after a
    // rising edge so that exactly `periods` rising edges fall inside it.
    @(posedge c204);
    @(negedge clk) preset = 1'b1;
    repeat (2) @(negedge clk);
    preset = 1'b0;
    check(count == 8'hCD, $sformatf("preset gives %h", count));
    @(posedge c204);
    @(negedge clk) cg = 1'b1;
    repeat (periods * 10) @(negedge clk);
    cg = 1'b0;
    repeat (30) @(negedge clk);
    expect_v = 8'(8'hCD + periods);
    check(count == expect_v,
          $sformatf("%0d periods: count %h, expected %h", periods, count, expect_v));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) clr = 1'b1;
    cg = 1'b1;
    repeat (40) @(negedge clk);
    check(count == 8'h00, "clear holds zero while CG is true");
    preset = 1'b1;
    repeat (2) @(negedge clk);
    check(count == 8'h00, "clear wins over preset");
    preset = 1'b0;
    cg = 1'b0;
    clr = 1'b0;
    // 51 periods = 0.25 s -> 00; 306 periods = 1.5 s -> FF.
    measure(51);
    measure(306);
    measure(1);
    measure(100);
    measure(200);
    measure(307);   // beyond 1.5 s: wraps to 00
    // Nothing is counted with the gate closed.
    repeat (100) @(negedge clk);
    check(count == 8'(8'hCD + 307), "no counting while CG is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
