// tb_transition_controller: walks the state machine through every
// transition of its state diagram and checks R.
//
// The 156-kHz strobe is a testbench square wave of 8 cycles. Expected states
// follow the transition list: power-on Halt; EXT RST -> Start; Bit 11 ->
// not-Write; SRF AND CG -> Write; SRF cleared -> not-Write; Bit 11 -> Halt;
// Halt ignores SRF, CG and Bit 11; EXT RST -> Start; EXT STOP from
// not-Write -> Halt. It also checks that SRF without CG, or CG without SRF,
// leaves not-Write alone, and that Write entered with CG stays while SRF
// is set even after CG falls.
module tb_transition_controller;
  import cardio_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0;
  logic ext_rst = 1'b0, ext_stop = 1'b0, srf = 1'b0, cg = 1'b0, bit11 = 1'b0;
  logic q1, q2, r;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;
  initial forever begin
    repeat (4) @(negedge clk);
    strobe = ~strobe;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  transition_controller dut (
    .clk(clk), .rst_n(rst_n), .clk_156k(strobe), .ext_rst(ext_rst),
    .ext_stop(ext_stop), .srf(srf), .cg(cg), .bit11(bit11),
    .q1(q1), .q2(q2), .r(r), .state(state)
  );

  task automatic expect_state(input ctrl_state_t s, input string what);
    repeat (20) @(negedge clk);   // more than two strobe periods
    check(state == s && {q1, q2} == 2'(s) && r == (s == START),
          $sformatf("%s: state %s, expected %s", what, state.name(), s.name()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    expect_state(HALT, "power-on");
    srf = 1'b1; cg = 1'b1;
    expect_state(HALT, "Halt ignores SRF*CG");
    srf = 1'b0; cg = 1'b0;
    @(negedge clk) ext_rst = 1'b1;
    @(negedge clk) ext_rst = 1'b0;
    #1 check(state == START, "EXT RST forces Start at once");
    expect_state(START, "Start holds");
    srf = 1'b1;
    expect_state(START, "Start ignores SRF");
    srf = 1'b0;
    // Bit 11 arrives; in the full design the address reset clears it a
    // few cycles after R falls, well before the next strobe.
    @(negedge clk) bit11 = 1'b1;
    while (state == START) @(negedge clk);
    check(state == WRITE_N && r == 1'b0, "Bit 11 ends clearing in not-Write");
    bit11 = 1'b0;
    expect_state(WRITE_N, "not-Write holds");
    srf = 1'b1;
    expect_state(WRITE_N, "SRF without CG");
    srf = 1'b0; cg = 1'b1;
    expect_state(WRITE_N, "CG without SRF");
    srf = 1'b1;
    expect_state(WRITE, "SRF*CG enters Write");
    cg = 1'b0;
    expect_state(WRITE, "Write holds after CG falls while SRF is set");
    cg = 1'b1;
    expect_state(WRITE, "Write holds with CG");
    srf = 1'b0;
    expect_state(WRITE_N, "SRF cleared returns to not-Write");
    // SRF rising while CG is low, then CG rising: Write.
    cg = 1'b0; srf = 1'b1;
    expect_state(WRITE_N, "SRF while CG low waits");
    cg = 1'b1;
    expect_state(WRITE, "CG rising with SRF enters Write");
    srf = 1'b0; cg = 1'b0;
    expect_state(WRITE_N, "back to not-Write");
    bit11 = 1'b1;
    expect_state(HALT, "Bit 11 (memory full) halts");
    bit11 = 1'b0; srf = 1'b1; cg = 1'b1;
    expect_state(HALT, "Halt is blocked");
    bit11 = 1'b1;
    expect_state(HALT, "Halt ignores Bit 11");
    bit11 = 1'b0; srf = 1'b0; cg = 1'b0;
    @(negedge clk) ext_rst = 1'b1;
    @(negedge clk) ext_rst = 1'b0;
    expect_state(START, "EXT RST leaves Halt");
    @(negedge clk) bit11 = 1'b1;
    while (state == START) @(negedge clk);
    bit11 = 1'b0;
    expect_state(WRITE_N, "second clearing done");
    ext_stop = 1'b1;
    expect_state(HALT, "EXT STOP halts");
    ext_stop = 1'b0;
    expect_state(HALT, "stays halted after EXT STOP is released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
