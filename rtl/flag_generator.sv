// flag_generator: storage request flag SRF.
//
// A toggle flip-flop changes state on every rising edge of the 0.1-Hz
// storage request clock (one edge every ~10 s). AI, issued after a byte has
// been stored, clears it directly and has priority over the toggle. In
// normal operation SRF is therefore set every 10 s and cleared by the write
// cycle that follows within two beats. The toggle and the direct clear are
// the original's; sampling both on clk is this design's.
module flag_generator (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_01,   // 0.1-Hz clock (level)
  input  logic ai,       // address increment: direct clear
  output logic srf       // storage request flag
);
  logic clk_01_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_01_d <= 1'b0;
      srf      <= 1'b0;
    end else begin
      clk_01_d <= clk_01;
      if (ai)                         srf <= 1'b0;
      else if (clk_01 && !clk_01_d)   srf <= ~srf;
    end
  end
endmodule
