// tb_state_controller: runs the control unit through memory clearing and two
// storage requests against a testbench address counter.
//
// Scaled timing: 156-kHz strobe 8 cycles, 1-kHz clock 64 cycles, WE 20, AI
// 4, AR 3. The testbench models the address counter (cleared by AR,
// advanced by AI, Bit 11 = its bit 4 here, so clearing takes 16 writes) and
// CG. It checks: EXT RST gives Start and an AR pulse; exactly 16 WE/AI pairs
// during clearing; a second AR and not-Write after the carry; a storage
// request (0.1-Hz edge) followed by CG gives one WE and one AI, clears SRF
// and returns to not-Write; a CG fall with no request gives PR alone.
module tb_state_controller;
  import cardio_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe = 1'b0, c1k = 1'b0, c01 = 1'b0, cg = 1'b0;
  logic ext_rst = 1'b0, ext_stop = 1'b0, ext_ai = 1'b0;
  logic srf, q1, q2, r, ar, we, ai, pr;
  ctrl_state_t state;
  int checks = 0, failures = 0;
  int addr = 0, n_ar = 0, n_we = 0, n_ai = 0, n_pr = 0;
  logic ar_d = 0, we_d = 0, ai_d = 0, pr_d = 0;
  logic bit11;

  always #100 clk = ~clk;
  initial forever begin repeat (4)  @(negedge clk); strobe = ~strobe; end
  initial forever begin repeat (32) @(negedge clk); c1k = ~c1k; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign bit11 = addr[4];

  always @(posedge clk) if (rst_n) begin
    ar_d <= ar; we_d <= we; ai_d <= ai; pr_d <= pr;
    if (ar && !ar_d) n_ar <= n_ar + 1;
    if (we && !we_d) n_we <= n_we + 1;
    if (ai && !ai_d) n_ai <= n_ai + 1;
    if (pr && !pr_d) n_pr <= n_pr + 1;
    if (ar) addr <= 0;
    else if (ai && !ai_d) addr <= addr + 1;
  end

  state_controller #(.WE_WIDTH(20), .AI_WIDTH(4), .AR_WIDTH(3)) dut (
    .clk(clk), .rst_n(rst_n), .clk_156k(strobe), .clk_1k(c1k), .clk_01(c01),
    .cg(cg), .bit11(bit11), .ext_rst(ext_rst), .ext_stop(ext_stop),
    .ext_ai(ext_ai), .srf(srf), .q1(q1), .q2(q2), .r(r), .state(state),
    .ar(ar), .we(we), .ai(ai), .pr(pr)
  );

  initial begin
    int we0, ai0, pr0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(state == HALT && !r, "power-on Halt");
    ext_rst = 1'b1;
    @(negedge clk) ext_rst = 1'b0;
    repeat (10) @(negedge clk);
    check(state == START && r && n_ar == 1, "EXT RST: Start, R high, one AR");
    while (state == START) @(negedge clk);
    repeat (20) @(negedge clk);
    check(n_we == 16 && n_ai == 16, $sformatf("clearing wrote %0d/%0d times, want 16", n_we, n_ai));
    check(n_ar == 2 && addr == 0 && state == WRITE_N, "second AR, not-Write, address 0");
    // Storage request while CG is low, then a beat: CG high then low.
    we0 = n_we; ai0 = n_ai; pr0 = n_pr;
    @(negedge clk) c01 = 1'b1;
    repeat (20) @(negedge clk);
    check(srf && state == WRITE_N, "SRF set, waiting for CG");
    cg = 1'b1;
    repeat (20) @(negedge clk);
    check(state == WRITE, "CG with SRF enters Write");
    cg = 1'b0;
    repeat (60) @(negedge clk);
    check(n_we == we0 + 1 && n_ai == ai0 + 1 && n_pr == pr0 + 1, "one write cycle");
    check(!srf && state == WRITE_N && addr == 1, "SRF cleared, not-Write, address 1");
    // A beat with no request: PR only.
    cg = 1'b1; repeat (30) @(negedge clk);
    cg = 1'b0; repeat (60) @(negedge clk);
    check(n_we == we0 + 1 && n_pr == pr0 + 2, "phantom WE: PR only");
    // Next 0.1-Hz edge (after a fall), request served again.
    c01 = 1'b0; repeat (10) @(negedge clk);
    c01 = 1'b1; repeat (10) @(negedge clk);
    cg = 1'b1; repeat (30) @(negedge clk);
    cg = 1'b0; repeat (60) @(negedge clk);
    check(n_we == we0 + 2 && addr == 2 && !srf, "second storage");
    ext_stop = 1'b1; repeat (20) @(negedge clk); ext_stop = 1'b0;
    check(state == HALT, "EXT STOP halts");
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
