// clock_module: divider chain that turns the 5-MHz crystal clock into the
// recorder's four timing signals.
//
// The chain follows the four stages of the original timing unit:
//   stage I   the 5-MHz oscillator itself, here the system clock clk;
//   stage II  a 12-bit binary counter on clk; its /32 tap is the 156-kHz
//             strobe (state controller clock and memory enable strobe), its
//             /4096 tap the "1-kHz" (1.22 kHz) memory-clear clock;
//   stage III a divide-by-3 advanced once per stage-II cycle (407 Hz);
//   stage IV  a 12-bit binary counter advanced by stage III; its /2 tap is
//             the "204-Hz" (203.5 Hz) count clock, its /4096 tap the "0.1-Hz"
//             (10.07 s period) storage request clock.
// While hold is high (the R signal, i.e. while memory is being cleared)
// stage IV is held at zero, so the first storage request comes half a
// 0.1-Hz period after clearing ends.
//
// Outputs are square-wave levels, not clocks: every consumer runs on clk and
// detects the edges it needs. The divide ratios are parameters so that
// simulations can shorten time; DIV_STROBE, DIV_1K, DIV_204 and DIV_SRQ must
// be powers of two with DIV_STROBE < DIV_1K and DIV_204 < DIV_SRQ. The ratios
// and taps are the original's; the synchronous form and the hold-to-zero
// reading of the stage IV "hold" input are this design's.
module clock_module #(
  parameter int unsigned DIV_STROBE = 32,    // 5 MHz / 32   = 156 kHz
  parameter int unsigned DIV_1K     = 4096,  // 5 MHz / 4096 = 1.22 kHz
  parameter int unsigned DIV_III    = 3,     // stage III
  parameter int unsigned DIV_204    = 2,     // stage III / 2 = 204 Hz
  parameter int unsigned DIV_SRQ    = 4096   // stage III / 4096 = 0.1 Hz
) (
  input  logic clk,        // 5-MHz crystal clock
  input  logic rst_n,      // power-on reset
  input  logic hold,       // R: holds stage IV at zero
  output logic clk_156k,   // 156-kHz strobe (level)
  output logic clk_1k,     // 1-kHz clear clock (level)
  output logic clk_204,    // 204-Hz count clock (level)
  output logic clk_01      // 0.1-Hz storage request clock (level)
);
  localparam int unsigned W2 = $clog2(DIV_1K);
  localparam int unsigned W3 = (DIV_III > 1) ? $clog2(DIV_III) : 1;
  localparam int unsigned W4 = $clog2(DIV_SRQ);
  localparam int unsigned TAP_STROBE = $clog2(DIV_STROBE) - 1;
  localparam int unsigned TAP_204    = $clog2(DIV_204) - 1;

  logic [W2-1:0] stage2;
  logic [W3-1:0] stage3;
  logic [W4-1:0] stage4;
  logic          stage2_wrap, stage3_wrap;

  assign stage2_wrap = (stage2 == {W2{1'b1}});
  assign stage3_wrap = stage2_wrap && (stage3 == W3'(DIV_III - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage2 <= '0;
      stage3 <= '0;
    end else begin
      stage2 <= stage2 + 1'b1;
      if (stage2_wrap) stage3 <= (stage3 == W3'(DIV_III - 1)) ? '0 : stage3 + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           stage4 <= '0;
    else if (hold)        stage4 <= '0;
    else if (stage3_wrap) stage4 <= stage4 + 1'b1;
  end

  assign clk_156k = stage2[TAP_STROBE];
  assign clk_1k   = stage2[W2-1];
  assign clk_204  = stage4[TAP_204];
  assign clk_01   = stage4[W4-1];
endmodule
