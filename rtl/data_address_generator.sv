// data_address_generator: memory address counter and memory enable decoder.
//
// A 12-bit binary counter holds the address of the next byte. AR (level)
// clears it; each rising edge of AI advances it by one. The memory is 1K
// bytes, so addresses use bits 9..0; bit 10, the eleventh counter output and
// called Bit 11 throughout, becomes true when the address wraps past 3FF.
// That carry ends memory clearing and, later, stops acquisition when memory
// is full. Bits 9..8 are decoded 2-to-4 into the four memory enable lines
// (000-0FF, 100-1FF, 200-2FF, 300-3FF); the selected line is active only
// while en is high. The counter and decoder are the original's; the
// synchronous edge detection of AI and the active-high en are this design's.
module data_address_generator #(
  parameter int unsigned CNT_W     = 12,  // counter length
  parameter int unsigned CARRY_BIT = 10   // bit index of "Bit 11"
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ar,          // address reset (level)
  input  logic             ai,          // address increment (rising edge)
  input  logic             en,          // memory enable strobe
  output logic [CNT_W-1:0] addr,
  output logic             bit11,       // address carry / auto stop
  output logic [3:0]       mem_enable   // one-hot chip-pair enables
);
  logic ai_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ai_d <= 1'b0;
      addr <= '0;
    end else begin
      ai_d <= ai;
      if (ar)             addr <= '0;
      else if (ai && !ai_d) addr <= addr + 1'b1;
    end
  end

  assign bit11 = addr[CARRY_BIT];

  // At most one chip pair is ever enabled.
  a_one_pair: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mem_enable));

  always_comb begin
    mem_enable = '0;
    if (en) mem_enable[addr[9:8]] = 1'b1;
  end
endmodule
