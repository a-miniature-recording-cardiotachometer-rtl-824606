// tb_data_address_generator: checks address reset, increment, the Bit 11
// carry and the 2-to-4 memory enable decoder.
//
// The testbench keeps its own address model. It pulses AI (3 cycles high,
// 3 low, so one increment per pulse) 1024 times and checks the address and
// Bit 11 along the way, the carry appearing exactly at the 1024th pulse. At
// every tenth address it checks that mem_enable is one-hot on address bits
// 9..8 when en is high and zero when en is low. AR then clears everything.
module tb_data_address_generator;
  logic clk = 1'b0, rst_n = 1'b0, ar = 1'b0, ai = 1'b0, en = 1'b0;
  logic [11:0] addr;
  logic bit11;
  logic [3:0] mem_enable;
  int checks = 0, failures = 0;
  int model = 0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_address_generator dut (
    .clk(clk), .rst_n(rst_n), .ar(ar), .ai(ai), .en(en), .addr(addr),
    .bit11(bit11), .mem_enable(mem_enable)
  );

  task automatic pulse_ai();
    @(negedge clk) ai = 1'b1;
    repeat (3) @(negedge clk);
    ai = 1'b0;
    repeat (3) @(negedge clk);
    model++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) ar = 1'b1;
    @(negedge clk) ar = 1'b0;
    check(addr == 0 && !bit11, "address reset");
    for (int i = 0; i < 1024; i++) begin
      pulse_ai();
      check(addr == 12'(model), $sformatf("addr %h, expected %h", addr, model));
      check(bit11 == (model >= 1024), $sformatf("bit11 at %0d", model));
      if (model % 10 == 0 && model < 1024) begin
        en = 1'b1;
        #1;
        check(mem_enable == 4'(1 << ((model >> 8) & 3)),
              $sformatf("enable %b at %h", mem_enable, model));
        en = 1'b0;
        #1;
        check(mem_enable == 4'b0000, "no enable without en");
      end
    end
    // Hold AI high for a long time: still a single increment.
    @(negedge clk) ai = 1'b1;
    repeat (20) @(negedge clk);
    ai = 1'b0;
    @(negedge clk);
    check(addr == 12'd1025, "one increment per AI pulse");
    @(negedge clk) ar = 1'b1;
    @(negedge clk) ar = 1'b0;
    check(addr == 0 && !bit11, "AR clears address and carry");
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
