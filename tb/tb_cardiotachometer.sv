// tb_cardiotachometer: end-to-end test of the recorder at scaled timing.
//
// Scaling: strobe /4, 1-kHz clock /16, stage III /3, 204-Hz /2, 0.1-Hz
// /1024, WE 6, AI 2, AR 2 and QRS pulse 2900 cycles. One 204-Hz period is
// then 96 cycles and the storage request period 49152 cycles (512 count
// periods). The memory, counter widths and the offset are unchanged.
//
// Sequence:
//  1. power-on Halt, EXT RST, memory clearing (1024 writes at the 1-kHz
//     rate, timed), EXT STOP before the first storage, readout of all 1024
//     bytes over the external port: all zero;
//  2. EXT RST again; a synthetic heart (random beat intervals, some with a
//     T-wave edge inside the QRS pulse) runs until memory is full and the
//     recorder halts by itself. Each storage is checked when it happens
//     against the beat interval the testbench generated:
//       M = (interval / 96 cycles - 51) mod 256, within +-1 count;
//  3. after more beats the address must not move; readout of all 1024
//     bytes must equal the values recorded at storage time.
// Mechanisms counted (each must occur): AR pulse on both R edges, clearing
// writes, storage cycles, phantom WE (PR without WE), Write entered by CG
// rising and by SRF rising, T-wave edges rejected, auto stop on Bit 11,
// EXT STOP, EXT RST, external readout.
module tb_cardiotachometer;
  localparam int P204 = 96;
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
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  cardiotachometer #(
    .DIV_STROBE(4), .DIV_1K(16), .DIV_III(3), .DIV_204(2), .DIV_SRQ(1024),
    .WE_WIDTH(6), .AI_WIDTH(2), .AR_WIDTH(2), .QRS_PULSE(2900)
  ) dut (
    .clk(clk), .rst_n(rst_n), .qrs_in(qrs_in), .ext_rst(ext_rst),
    .ext_stop(ext_stop), .ext_ar(ext_ar), .ext_ai(ext_ai), .ext_en_n(ext_en_n),
    .data_bus(data_bus), .data_bus_drive(data_bus_drive), .address(address),
    .state(state), .cg(cg)
  );

  localparam logic [1:0] S_START = 2'b00, S_WRITE = 2'b01, S_HALT = 2'b10, S_WRITE_N = 2'b11;

  // ---------------- synthetic heart ----------------
  bit     heart_on = 1'b0;
  longint last_beat = 0, rise_beat = 0;
  int     n_twave = 0;
  int     last_m = -1;        // expected count of the last completed CG interval

  initial forever begin
    int periods, interval;
    @(negedge clk);
    if (heart_on) begin
      // Mostly 51..110 count periods (M 0..59); every 8th beat anywhere in
      // 51..300 (M 0..249).
      periods  = ($urandom_range(0, 7) == 0) ? $urandom_range(51, 300)
                                             : $urandom_range(51, 110);
      interval = periods * P204 + $urandom_range(0, P204 - 1);
      qrs_in = 1'b1;
      last_beat = cyc;
      repeat (200) @(negedge clk);
      qrs_in = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        repeat (1000) @(negedge clk);
        qrs_in = 1'b1;            // T wave still above the trigger level
        n_twave++;
        repeat (150) @(negedge clk);
        qrs_in = 1'b0;
        repeat (interval - 1351) @(negedge clk);
      end else begin
        repeat (interval - 201) @(negedge clk);
      end
    end
  end

  // Expected beat count when CG falls: from the testbench's own beat times.
  logic cg_d = 1'b0;
  int   n_cg_fall = 0;
  always @(posedge clk) if (rst_n) begin
    cg_d <= cg;
    if (cg && !cg_d) rise_beat <= last_beat;
    if (!cg && cg_d) begin
      real periods_r;
      periods_r = real'(last_beat - rise_beat) / P204;
      last_m <= (int'(periods_r) - 51) & 255;
      n_cg_fall <= n_cg_fall + 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_ar_rise = 0, n_ar_fall = 0, n_clear_we = 0, n_store = 0, n_phantom = 0;
  int n_write_by_cg = 0, n_write_by_srf = 0, n_auto_stop = 0, n_ext_stop = 0;
  int n_ext_rst = 0, n_readout = 0;
  logic ar_d = 0, we_d = 0, pr_d = 0, r_d = 0, srf_d = 0;
  logic [1:0] state_d = 2'b10;
  longint srf_rise_t = 0, cg_rise_t = 0;
  logic [7:0] expected [1024];
  bit acquiring = 1'b0;

  always @(posedge clk) if (rst_n) begin
    ar_d <= dut.ar_int; we_d <= dut.we; pr_d <= dut.pr; r_d <= dut.r;
    srf_d <= dut.srf; state_d <= state;
    if (dut.ar_int && !ar_d) begin
      if (dut.r) n_ar_rise <= n_ar_rise + 1; else n_ar_fall <= n_ar_fall + 1;
    end
    if (dut.we && !we_d && dut.r) n_clear_we <= n_clear_we + 1;
    if (dut.pr && !pr_d && dut.q1) n_phantom <= n_phantom + 1;
    if (dut.srf && !srf_d) srf_rise_t <= cyc;
    if (cg && !cg_d) cg_rise_t <= cyc;
    if (state == S_WRITE && state_d == S_WRITE_N) begin
      if (srf_rise_t > cg_rise_t) n_write_by_srf <= n_write_by_srf + 1;
      else n_write_by_cg <= n_write_by_cg + 1;
    end
    // Storage: the address advances outside clearing. Check the byte being
    // written against the testbench's beat interval.
    if (dut.we && !we_d && !dut.r) begin
      int diff;
      diff = (int'(dut.count) - last_m) & 255;
      check(last_m >= 0 && (diff <= 1 || diff == 255),
            $sformatf("stored %0d, beat interval gives %0d", dut.count, last_m));
      expected[dut.addr[9:0]] = dut.count;
      check(acquiring, "storage only while acquiring");
      n_store <= n_store + 1;
    end
    if (state == S_HALT && state_d == S_WRITE_N && dut.bit11) n_auto_stop <= n_auto_stop + 1;
  end

  // ---------------- operator and readout ----------------
  task automatic pulse(ref logic sig, input logic active);
    @(negedge clk) sig = active;
    repeat (6) @(negedge clk);
    sig = ~active;
    repeat (6) @(negedge clk);
  endtask

  task automatic readout(input bit all_zero);
    pulse(ext_ar, 1'b1);
    check(address == 10'd0, "EXT AR resets the address");
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk) ext_en_n = 1'b0;
      repeat (5) @(negedge clk);
      check(data_bus_drive, "bus driven while EXT EN is low");
      check(address == 10'(a), $sformatf("readout address %0d vs %0d", address, a));
      if (all_zero) check(data_bus == 8'h00, $sformatf("cleared byte %0d is %h", a, data_bus));
      else check(data_bus == expected[a],
                 $sformatf("byte %0d: %h, stored %h", a, data_bus, expected[a]));
      ext_en_n = 1'b1;
      pulse(ext_ai, 1'b1);
      n_readout++;
    end
  endtask

  initial begin
    longint t0;
    int addr_hold;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(state == S_HALT, "power-on Halt");

    // ---- 1: clearing, stop, readout of zeros
    pulse(ext_rst, 1'b1);
    n_ext_rst++;
    check(state == S_START, "EXT RST enters Start");
    t0 = cyc;
    while (state == S_START) @(negedge clk);
    // 1024 writes at one per 16 cycles.
    check(cyc - t0 >= 1024 * 16 - 32 && cyc - t0 <= 1024 * 16 + 32,
          $sformatf("clearing took %0d cycles, want ~%0d", cyc - t0, 1024 * 16));
    check(n_clear_we == 1024, $sformatf("%0d clearing writes, want 1024", n_clear_we));
    check(state == S_WRITE_N && address == 0, "not-Write at address 0 after clearing");
    pulse(ext_stop, 1'b1);
    n_ext_stop++;
    check(state == S_HALT, "EXT STOP halts");
    readout(1'b1);

    // ---- 2: acquisition until memory is full
    pulse(ext_rst, 1'b1);
    n_ext_rst++;
    heart_on = 1'b1;
    while (state == S_START) @(negedge clk);
    acquiring = 1'b1;
    while (state != S_HALT) @(negedge clk);
    acquiring = 1'b0;
    check(n_store == 1024, $sformatf("%0d storage cycles, want 1024", n_store));
    check(dut.bit11 && address == 10'd0, "halted on address carry");
    addr_hold = dut.addr;
    repeat (100000) @(negedge clk);
    check(dut.addr == addr_hold && state == S_HALT, "no storage after Halt");
    heart_on = 1'b0;
    // ---- 3: readout
    readout(1'b0);

    $display("mechanisms: AR on R rise %0d, AR on R fall %0d, clearing writes %0d, stores %0d,",
             n_ar_rise, n_ar_fall, n_clear_we, n_store);
    $display("  phantom WE %0d, Write by CG %0d, Write by SRF %0d, T-waves %0d, auto stop %0d,",
             n_phantom, n_write_by_cg, n_write_by_srf, n_twave, n_auto_stop);
    $display("  EXT STOP %0d, EXT RST %0d, bytes read out %0d", n_ext_stop, n_ext_rst, n_readout);
    check(n_ar_rise >= 1 && n_ar_fall >= 1, "AR on both edges of R");
    check(n_clear_we >= 1024, "clearing writes");
    check(n_store >= 1, "storage cycles");
    check(n_phantom >= 1, "phantom WE");
    check(n_write_by_cg >= 1, "Write entered by CG rising");
    check(n_write_by_srf >= 1, "Write entered by SRF rising");
    check(n_twave >= 1 && n_cg_fall >= 1, "T-wave edges rejected");
    check(n_auto_stop == 1, "auto stop on Bit 11");
    check(n_ext_stop >= 1 && n_ext_rst >= 1 && n_readout >= 1024, "operator controls and readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
