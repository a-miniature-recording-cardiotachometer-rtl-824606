// tb_ram_256x4: checks that the RAM chip stores all 256 words and ignores
// writes when its enable is low.
//
// Writes a pseudo-random pattern to every address, reads it back through the
// asynchronous output, then attempts to overwrite everything with ce low and
// checks the pattern is unchanged. Expected values come from a reference
// array in the testbench.
module tb_ram_256x4;
  logic clk = 1'b0, ce = 1'b0, we = 1'b0;
  logic [7:0] a = '0;
  logic [3:0] din = '0, dout;
  logic [3:0] ref_mem [256];
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ram_256x4 dut (.clk(clk), .ce(ce), .we(we), .a(a), .din(din), .dout(dout));

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i); din = 4'($urandom); ce = 1'b1; we = 1'b1;
      ref_mem[i] = din;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) a = 8'(i);
      #1 check(dout == ref_mem[i], $sformatf("read %0d: %h vs %h", i, dout, ref_mem[i]));
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i); din = ~ref_mem[i]; ce = 1'b0; we = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 256; i += 5) begin
      @(negedge clk) a = 8'(i);
      #1 check(dout == ref_mem[i], $sformatf("ce low wrote %0d", i));
    end
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
