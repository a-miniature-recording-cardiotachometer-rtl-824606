// tb_reset_generator: checks that AR pulses once, for AR_WIDTH cycles, on
// each rising and each falling edge of R and stays low otherwise.
module tb_reset_generator;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, r = 1'b0, ar;
  int checks = 0, failures = 0;
  int width = 0, npulses = 0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  reset_generator #(.AR_WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .r(r), .ar(ar));

  always @(posedge clk) if (rst_n) begin
    if (ar) width <= width + 1;
    else if (width != 0) begin
      npulses <= npulses + 1;
      checks++;
      if (width != W) begin failures++; $display("FAIL: AR width %0d", width); end
      width <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(npulses == 0, "no AR without an R edge");
    r = 1'b1;
    repeat (3) @(negedge clk);
    check(ar == 1'b1, "AR follows rising R");
    repeat (100) @(negedge clk);
    check(npulses == 1, "one pulse on rising R");
    r = 1'b0;
    repeat (3) @(negedge clk);
    check(ar == 1'b1, "AR follows falling R");
    repeat (100) @(negedge clk);
    check(npulses == 2, "one pulse on falling R");
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
