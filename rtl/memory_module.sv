// memory_module: 1K x 8 beat period store and its data bus.
//
// Eight 256x4 RAM chips are arranged as four pairs; each pair holds 256
// bytes (low nibble in one chip, high nibble in the other) and is selected by
// one of the four enable lines decoded from address bits 9..8. Address bits
// 7..0 go to every chip. The data bus works as follows:
//   we high           the write buffer drives wdata (the beat period count)
//                     onto the bus and every enabled pair stores it on each
//                     clk edge; the enable lines are strobed at 156 kHz, so a
//                     100-us WE aperture covers several strobes;
//   we low, enabled   the selected pair drives the stored byte onto the bus
//                     (external readout);
//   otherwise         nothing drives the bus (bus_drive low, bus_data 0).
// bus_drive stands in for the tri-state enables. The chip organisation and
// the buffer follow the original board; the driven/undriven flag in place of
// tri-state wires is this design's.
module memory_module (
  input  logic       clk,
  input  logic [3:0] mem_enable,  // decoded, strobed chip-pair enables
  input  logic       we,          // write enable aperture
  input  logic [7:0] addr,        // address bits 7..0
  input  logic [7:0] wdata,       // beat period accumulator
  output logic [7:0] bus_data,
  output logic       bus_drive
);
  logic [7:0] pair_dout [4];
  logic [7:0] rdata;

  for (genvar p = 0; p < 4; p++) begin : g_pair
    ram_256x4 u_lo (
      .clk (clk), .ce(mem_enable[p]), .we(we), .a(addr),
      .din (wdata[3:0]), .dout(pair_dout[p][3:0])
    );
    ram_256x4 u_hi (
      .clk (clk), .ce(mem_enable[p]), .we(we), .a(addr),
      .din (wdata[7:4]), .dout(pair_dout[p][7:4])
    );
  end

  always_comb begin
    rdata = '0;
    for (int p = 0; p < 4; p++)
      if (mem_enable[p]) rdata |= pair_dout[p];
  end

  assign bus_drive = we || (mem_enable != '0);
  assign bus_data  = we ? wdata : (bus_drive ? rdata : '0);
endmodule
