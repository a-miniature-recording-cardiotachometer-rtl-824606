// tb_write_controller: checks the WE -> AI/PR sequence, its pulse widths and
// gating.
//
// Widths are scaled to WE 20 and AI 4 cycles. Three cases:
//  - R high, Q1 low (memory clearing): each falling edge of the 1-kHz input
//    gives WE, then AI and PR together right after WE ends; CG is ignored;
//  - R low, Q1 low (Write): a falling CG gives the same sequence;
//  - R low, Q1 high (not Write): a falling CG gives PR only (phantom WE).
// A monitor measures every pulse and the gap between WE's end and AI/PR's
// start.
module tb_write_controller;
  localparam int unsigned WW = 20, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c1k = 1'b0, r = 1'b0, cg = 1'b0, q1 = 1'b1;
  logic we, ai, pr;
  int checks = 0, failures = 0;
  int we_w = 0, ai_w = 0, pr_w = 0, n_we = 0, n_ai = 0, n_pr = 0;
  int since_we = 1000;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  write_controller #(.WE_WIDTH(WW), .AI_WIDTH(AW)) dut (
    .clk(clk), .rst_n(rst_n), .clk_1k(c1k), .r(r), .cg(cg), .q1(q1),
    .we(we), .ai(ai), .pr(pr)
  );

  always @(posedge clk) if (rst_n) begin
    if (we) we_w <= we_w + 1;
    else if (we_w != 0) begin
      n_we <= n_we + 1; we_w <= 0; since_we <= 0;
      checks++;
      if (we_w != WW) begin failures++; $display("FAIL: WE width %0d", we_w); end
    end else since_we <= since_we + 1;
    if (pr) begin
      if (pr_w == 0) begin
        checks++;
        if (n_we > 0 && q1 == 1'b0 && since_we > 1) begin
          failures++; $display("FAIL: PR %0d cycles after WE", since_we);
        end
      end
      pr_w <= pr_w + 1;
    end else if (pr_w != 0) begin
      n_pr <= n_pr + 1; pr_w <= 0;
      checks++;
      if (pr_w != AW) begin failures++; $display("FAIL: PR width %0d", pr_w); end
    end
    if (ai) ai_w <= ai_w + 1;
    else if (ai_w != 0) begin
      n_ai <= n_ai + 1; ai_w <= 0;
      checks++;
      if (ai_w != AW) begin failures++; $display("FAIL: AI width %0d", ai_w); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Memory clearing: R high, Q1 low; five 1-kHz periods of 64 cycles.
    @(negedge clk) r = 1'b1; q1 = 1'b0;
    repeat (5) begin
      c1k = 1'b1; repeat (32) @(negedge clk);
      c1k = 1'b0; cg = ~cg; repeat (32) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(n_we == 5 && n_ai == 5 && n_pr == 5,
          $sformatf("clearing: WE %0d AI %0d PR %0d, want 5 each", n_we, n_ai, n_pr));
    // Write state: R low, Q1 low, CG falls once; 1-kHz must be ignored.
    cg = 1'b1; r = 1'b0;
    repeat (40) @(negedge clk);
    c1k = 1'b1; repeat (10) @(negedge clk); c1k = 1'b0;
    repeat (40) @(negedge clk);
    check(n_we == 5, "1 kHz ignored while R is low");
    cg = 1'b0;
    repeat (60) @(negedge clk);
    check(n_we == 6 && n_ai == 6 && n_pr == 6, "write cycle on falling CG");
    // Not-Write: Q1 high; CG falls: PR only.
    q1 = 1'b1; cg = 1'b1;
    repeat (40) @(negedge clk);
    cg = 1'b0;
    repeat (60) @(negedge clk);
    check(n_we == 6 && n_ai == 6 && n_pr == 7, "phantom WE gives PR only");
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
