// tb_counting_gate: checks the QRS pulse width, the counting-gate toggle and
// rejection of a second (T-wave) edge inside the pulse.
//
// QRS_PULSE is scaled to 20 cycles. Each simulated beat is a 5-cycle high
// level on qrs; some beats are followed 10 cycles later by a T-wave edge,
// which must neither restart the pulse nor toggle CG. The expected CG is a
// reference toggle kept by the testbench, one flip per accepted beat.
module tb_counting_gate;
  localparam int unsigned PW = 20;
  logic clk = 1'b0, rst_n = 1'b0, qrs = 1'b0;
  logic qrs_pulse, cg;
  int checks = 0, failures = 0;
  bit exp_cg = 1'b0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  counting_gate #(.QRS_PULSE(PW)) dut (
    .clk(clk), .rst_n(rst_n), .qrs(qrs), .qrs_pulse(qrs_pulse), .cg(cg)
  );

  // Measure the width of every pulse.
  int width = 0, pulses = 0;
  always @(posedge clk) if (rst_n) begin
    if (qrs_pulse) width <= width + 1;
    else if (width != 0) begin
      checks++;
      pulses++;
      if (width != PW) begin failures++; $display("FAIL: pulse width %0d", width); end
      width <= 0;
    end
  end

  task automatic beat(input bit t_wave, input int gap);
    @(negedge clk) qrs = 1'b1;
    repeat (5) @(negedge clk);
    qrs = 1'b0;
    if (t_wave) begin
      repeat (10) @(negedge clk);
      qrs = 1'b1;
      repeat (3) @(negedge clk);
      qrs = 1'b0;
    end
    exp_cg = ~exp_cg;
    repeat (gap) @(negedge clk);
    check(cg == exp_cg, $sformatf("cg=%0b expected %0b", cg, exp_cg));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(cg == 1'b0 && qrs_pulse == 1'b0, "idle after reset");
    for (int i = 0; i < 12; i++) beat(i % 3 == 1, 40 + i * 7);
    check(pulses == 12, $sformatf("%0d pulses for 12 beats", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
