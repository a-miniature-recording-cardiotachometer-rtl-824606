// cardiotachometer: miniature recording heart-rate meter, top level.
//
// The recorder measures the period of every second heart beat with an 8-bit
// counter and, once every ~10 s, stores the latest period in a 1K x 8 memory:
// 1024 readings, 2.8 hours of data. A count M corresponds to a beat period
// of (M + 51) / 204 s, i.e. M = 0 is 240 beats/min and M = 255 is 40
// beats/min.
//
// Data flow: qrs_in (logic-level QRS signal from the analog front end) ->
// counting_gate (CG true for every second beat interval) ->
// beat_period_accumulator (counts the 204-Hz clock while CG is true) ->
// memory_module at the address held by data_address_generator. The
// state_controller sequences it: EXT RST enters Start, where the memory is
// zero-filled at the 1-kHz rate until the address carry (Bit 11); it then
// acquires in not-Write/Write, storing one byte after each storage request,
// and halts when memory is full or on EXT STOP. clock_module supplies all
// rates from the 5-MHz clk.
//
// Readout: with the recorder halted, an external device pulses ext_ar
// (address to 000), holds ext_en_n low to read the byte on data_bus, and
// pulses ext_ai to advance the address. ext_ar, ext_ai and ext_en_n are ORed
// with their internal counterparts, as on the original. address shows
// address bits 9..0.
//
// All inputs are asynchronous and pass through two-flip-flop synchronisers
// (2 cycles of latency). Everything runs on clk; the original's asynchronous
// edges are edge detectors on clk. data_bus_drive replaces the tri-state
// enable of the bus. The parameters scale the divider ratios and pulse
// widths (in clk cycles) for simulation; their defaults are the original's.
module cardiotachometer
  import cardio_pkg::*;
#(
  parameter int unsigned DIV_STROBE = 32,
  parameter int unsigned DIV_1K     = 4096,
  parameter int unsigned DIV_III    = 3,
  parameter int unsigned DIV_204    = 2,
  parameter int unsigned DIV_SRQ    = 4096,
  parameter int unsigned WE_WIDTH   = 500,      // 100 us
  parameter int unsigned AI_WIDTH   = 50,       // 10 us
  parameter int unsigned AR_WIDTH   = 8,        // 1.5 us
  parameter int unsigned QRS_PULSE  = 750_000   // 150 ms
) (
  input  logic       clk,             // 5-MHz crystal clock
  input  logic       rst_n,           // power-on reset (enters Halt)
  input  logic       qrs_in,          // logic-level QRS signal
  input  logic       ext_rst,         // EXT RST switch
  input  logic       ext_stop,        // EXT STOP switch
  input  logic       ext_ar,          // external address reset
  input  logic       ext_ai,          // external address increment
  input  logic       ext_en_n,        // external memory enable, active low
  output logic [7:0] data_bus,
  output logic       data_bus_drive,
  output logic [9:0] address,
  output logic [1:0] state,           // {Q1, Q2}
  output logic       cg               // counting gate (monitor)
);
  logic qrs_s, rst_s, stop_s, ar_s, ai_s, en_n_s;
  logic clk_156k, clk_1k, clk_204, clk_01;
  logic srf, q1, q2, r, ar_int, we, ai_int, pr, bit11;
  logic [7:0]  count;
  logic [11:0] addr;
  logic [3:0]  mem_enable;
  ctrl_state_t ctrl_state;

  sync2 u_sync_qrs  (.clk(clk), .rst_n(rst_n), .d(qrs_in),   .q(qrs_s));
  sync2 u_sync_rst  (.clk(clk), .rst_n(rst_n), .d(ext_rst),  .q(rst_s));
  sync2 u_sync_stop (.clk(clk), .rst_n(rst_n), .d(ext_stop), .q(stop_s));
  sync2 u_sync_ar   (.clk(clk), .rst_n(rst_n), .d(ext_ar),   .q(ar_s));
  sync2 u_sync_ai   (.clk(clk), .rst_n(rst_n), .d(ext_ai),   .q(ai_s));
  sync2 #(.RESET_VALUE(1'b1)) u_sync_en (
    .clk(clk), .rst_n(rst_n), .d(ext_en_n), .q(en_n_s)
  );

  clock_module #(
    .DIV_STROBE(DIV_STROBE), .DIV_1K(DIV_1K), .DIV_III(DIV_III),
    .DIV_204(DIV_204), .DIV_SRQ(DIV_SRQ)
  ) u_clock (
    .clk(clk), .rst_n(rst_n), .hold(r),
    .clk_156k(clk_156k), .clk_1k(clk_1k), .clk_204(clk_204), .clk_01(clk_01)
  );

  counting_gate #(.QRS_PULSE(QRS_PULSE)) u_gate (
    .clk(clk), .rst_n(rst_n), .qrs(qrs_s), .qrs_pulse(), .cg(cg)
  );

  beat_period_accumulator u_acc (
    .clk(clk), .rst_n(rst_n), .clr(r), .preset(pr), .cg(cg),
    .clk_204(clk_204), .count(count)
  );

  state_controller #(
    .WE_WIDTH(WE_WIDTH), .AI_WIDTH(AI_WIDTH), .AR_WIDTH(AR_WIDTH)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .clk_156k(clk_156k), .clk_1k(clk_1k),
    .clk_01(clk_01), .cg(cg), .bit11(bit11), .ext_rst(rst_s),
    .ext_stop(stop_s), .ext_ai(ai_s), .srf(srf), .q1(q1), .q2(q2), .r(r),
    .state(ctrl_state), .ar(ar_int), .we(we), .ai(ai_int), .pr(pr)
  );

  data_address_generator u_addr (
    .clk(clk), .rst_n(rst_n), .ar(ar_int || ar_s), .ai(ai_int || ai_s),
    .en(clk_156k || !en_n_s), .addr(addr), .bit11(bit11),
    .mem_enable(mem_enable)
  );

  memory_module u_mem (
    .clk(clk), .mem_enable(mem_enable), .we(we), .addr(addr[7:0]),
    .wdata(count), .bus_data(data_bus), .bus_drive(data_bus_drive)
  );

  assign address = addr[9:0];
  assign state   = ctrl_state;
endmodule
