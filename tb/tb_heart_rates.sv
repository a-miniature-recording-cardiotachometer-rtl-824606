// tb_heart_rates: the bench-test workload at full timing (all parameters at
// their defaults, 5-MHz clock).
//
// A steady synthetic heart is run at a series of rates spanning the bench
// test range and the field test range: 45, 60, 75, 90, 120, 150, 180 and
// 210 beats/min. The rate is changed right after each storage, so every
// stored byte covers beats at a single rate. After the last storage the
// recorder is stopped and the bytes are read back over the external port.
// Expected value per rate, from the divider ratios (count clock
// 5 MHz / 4096 / 3 / 2 = 203.45 Hz) and the -51 preset:
//   M = floor(60 / rate * 203.45) - 51, checked to within +-1 count.
// About 85 s of recorder time are simulated.
module tb_heart_rates;
  localparam int NRATES = 8;
  localparam int RATES [NRATES] = '{45, 60, 75, 90, 120, 150, 180, 210};
  logic clk = 1'b0, rst_n = 1'b0;
  logic qrs_in = 1'b0, ext_rst = 1'b0, ext_stop = 1'b0;
  logic ext_ar = 1'b0, ext_ai = 1'b0, ext_en_n = 1'b1;
  logic [7:0] data_bus;
  logic data_bus_drive, cg;
  logic [9:0] address;
  logic [1:0] state;
  int checks = 0, failures = 0;
  int beat_cycles = 5_000_000;

  always #100 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
      repeat (100_000) @(negedge clk);
      qrs_in = 1'b0;
      repeat (beat_cycles - 100_001) @(negedge clk);
    end
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    repeat (10) @(negedge clk);
    sig = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  function automatic int expected_m(input int rate);
    real period_s;
    period_s = 60.0 / rate;
    return int'($floor(period_s * 5.0e6 / 24576.0)) - 51;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pulse(ext_rst);
    beat_cycles = 60 * 5_000_000 / RATES[0];
    heart_on = 1'b1;
    while (state == 2'b00) @(negedge clk);
    for (int i = 0; i < NRATES; i++) begin
      while (address == 10'(i)) @(negedge clk);
      if (i + 1 < NRATES) beat_cycles = 60 * 5_000_000 / RATES[i + 1];
    end
    // The switch is held for several strobe periods: leaving Write for Halt
    // takes two state clocks.
    @(negedge clk) ext_stop = 1'b1;
    repeat (200) @(negedge clk);
    ext_stop = 1'b0;
    repeat (10) @(negedge clk);
    check(state == 2'b10, "halted");
    pulse(ext_ar);
    for (int i = 0; i < NRATES; i++) begin
      int m, e;
      @(negedge clk) ext_en_n = 1'b0;
      repeat (5) @(negedge clk);
      m = int'(data_bus);
      e = expected_m(RATES[i]);
      $display("%0d beats/min: stored %0d, expected %0d", RATES[i], m, e);
      check(data_bus_drive && m >= e - 1 && m <= e + 1,
            $sformatf("%0d beats/min stored %0d, expected %0d", RATES[i], m, e));
      ext_en_n = 1'b1;
      pulse(ext_ai);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
