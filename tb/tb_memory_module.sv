// tb_memory_module: checks the 1K x 8 memory built from eight 256x4 chips
// and its data bus.
//
// Writes a byte pattern (address-derived, 8'(a*37+11)) to all 1024
// addresses, selecting the chip pair one-hot from address bits 9..8 as the
// address decoder does, and checks that the bus carries the write data while
// WE is high. It then reads every address back over the bus, and checks that
// the bus is undriven with no enable and no WE.
module tb_memory_module;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] mem_enable = '0;
  logic [7:0] addr = '0, wdata = '0, bus_data;
  logic bus_drive;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] pattern(input int a);
    return 8'(a * 37 + 11);
  endfunction

  memory_module dut (
    .clk(clk), .mem_enable(mem_enable), .we(we), .addr(addr), .wdata(wdata),
    .bus_data(bus_data), .bus_drive(bus_drive)
  );

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      addr = 8'(a); wdata = pattern(a); we = 1'b1;
      mem_enable = 4'(1 << (a >> 8));
      #1;
      if (a % 64 == 0) check(bus_drive && bus_data == wdata, "bus carries write data");
    end
    @(negedge clk) we = 1'b0; mem_enable = '0;
    #1 check(!bus_drive && bus_data == 8'h00, "bus idle");
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      addr = 8'(a); mem_enable = 4'(1 << (a >> 8));
      #1 check(bus_drive && bus_data == pattern(a),
               $sformatf("read %h: %h vs %h", a, bus_data, pattern(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
