// tb_cardiotachometer_full: one complete operation of the recorder with
// every parameter at its default (5-MHz clock, 1 clk cycle = 200 ns).
//
// EXT RST starts memory clearing, which must take 1024 periods of the
// 1.22-kHz clock (about 0.84 s). A steady heart at a 0.8-s beat interval
// (75 beats/min) is then applied; the first storage request comes about 5 s
// after clearing, and the byte stored must be the count for 0.8 s:
// 0.8 s * 5e6 / 24576 = 162.76 periods -> M = 162 - 51 = 111 (+-1). EXT STOP
// then halts the recorder and the first bytes are read back over the
// external port: 111 at address 0, zeros after it. Real time simulated is
// about 7 s (35 million cycles).
module tb_cardiotachometer_full;
  localparam int BEAT = 4_000_000;   // 0.8 s in 200-ns cycles
  localparam int M_EXPECT = 111;
  logic clk = 1'b0, rst_n = 1'b0;
  logic qrs_in = 1'b0, ext_rst = 1'b0, ext_stop = 1'b0;
  logic ext_ar = 1'b0, ext_ai = 1'b0, ext_en_n = 1'b1;
  logic [7:0] data_bus;
  logic data_bus_drive, cg;
  logic [9:0] address;
  logic [1:0] state;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #100 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  cardiotachometer dut (
    .clk(clk), .rst_n(rst_n), .qrs_in(qrs_in), .ext_rst(ext_rst),
    .ext_stop(ext_stop), .ext_ar(ext_ar), .ext_ai(ext_ai), .ext_en_n(ext_en_n),
    .data_bus(data_bus), .data_bus_drive(data_bus_drive), .address(address),
    .state(state), .cg(cg)
  );

  bit heart_on = 1'b0;
  initial forever begin
    @(negedge clk);
    if (heart_on) begin
      qrs_in = 1'b1;
      repeat (100_000) @(negedge clk);   // 20-ms QRS
      qrs_in = 1'b0;
      repeat (BEAT - 100_001) @(negedge clk);
    end
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    repeat (10) @(negedge clk);
    sig = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    check(state == 2'b10, "power-on Halt");
    pulse(ext_rst);
    check(state == 2'b00, "Start after EXT RST");
    t0 = cyc;
    heart_on = 1'b1;
    while (state == 2'b00) @(negedge clk);
    check(cyc - t0 >= 1024 * 4096 - 8192 && cyc - t0 <= 1024 * 4096 + 8192,
          $sformatf("clearing took %0d cycles, want ~%0d", cyc - t0, 1024 * 4096));
    check(address == 0 && state == 2'b11, "acquiring at address 0");
    t0 = cyc;
    while (address == 0) @(negedge clk);
    $display("first storage %0d cycles after clearing", cyc - t0);
    check(cyc - t0 >= 2048 * 12288 && cyc - t0 <= 2048 * 12288 + 3 * BEAT,
          "first storage follows the first 0.1-Hz edge within two beats");
    repeat (1000) @(negedge clk);
    // The switch is held for several strobe periods: leaving Write for Halt
    // takes two state clocks.
    @(negedge clk) ext_stop = 1'b1;
    repeat (200) @(negedge clk);
    ext_stop = 1'b0;
    repeat (10) @(negedge clk);
    check(state == 2'b10, "EXT STOP halts");
    pulse(ext_ar);
    for (int a = 0; a < 4; a++) begin
      @(negedge clk) ext_en_n = 1'b0;
      repeat (5) @(negedge clk);
      check(data_bus_drive && address == 10'(a), "readout addressing");
      if (a == 0)
        check(int'(data_bus) >= M_EXPECT - 1 && int'(data_bus) <= M_EXPECT + 1,
              $sformatf("stored beat count %0d, want %0d +-1", data_bus, M_EXPECT));
      else
        check(data_bus == 8'h00, $sformatf("byte %0d is %h, want 00", a, data_bus));
      ext_en_n = 1'b1;
      pulse(ext_ai);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
