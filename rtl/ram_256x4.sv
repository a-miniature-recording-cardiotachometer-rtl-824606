// ram_256x4: one 256-word by 4-bit static RAM chip (the HM6562 of the
// original board).
//
// Writes happen on the rising clk edge when both ce (chip enable) and we are
// high. Reads are asynchronous, as on a static RAM: dout always shows the
// addressed word. The array is not initialised; the recorder clears it
// itself after every external reset. Clocked writes are this design's
// replacement for the chip's level-sensitive write strobe.
module ram_256x4 (
  input  logic       clk,
  input  logic       ce,
  input  logic       we,
  input  logic [7:0] a,
  input  logic [3:0] din,
  output logic [3:0] dout
);
  logic [3:0] mem [256];

  always_ff @(posedge clk) begin
    if (ce && we) mem[a] <= din;
  end

  assign dout = mem[a];
endmodule
