// beat_period_accumulator: 8-bit presettable binary counter that measures one
// heart beat period.
//
// R (clr) high holds the count at 8'h00, so zeros are written while memory is
// cleared. PR (preset) high loads the offset 8'hCD (-51). While CG is true
// every rising edge of the 204-Hz clock adds one; when CG falls the count is
// the beat period, 8'h00 for 0.25 s up to 8'hFF for 1.5 s:
//   count = (204 Hz * T_beat - 51) mod 256.
// clr has priority over preset, preset over counting. Counting wraps modulo
// 256 like the plain binary counter it replaces, so periods outside
// 0.25..1.5 s alias. All updates happen on clk; the 204-Hz input is a level
// whose rising edges are detected here.
module beat_period_accumulator
  import cardio_pkg::*;
#(
  parameter logic [7:0] OFFSET = PRESET_OFFSET
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,      // R
  input  logic       preset,   // PR
  input  logic       cg,       // counting gate
  input  logic       clk_204,  // 204-Hz count clock (level)
  output logic [7:0] count
);
  logic clk_204_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_204_d <= 1'b0;
      count     <= '0;
    end else begin
      clk_204_d <= clk_204;
      if (clr)                              count <= '0;
      else if (preset)                      count <= OFFSET;
      else if (cg && clk_204 && !clk_204_d) count <= count + 1'b1;
    end
  end
endmodule
