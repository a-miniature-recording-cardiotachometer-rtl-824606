// monostable: synchronous replacement for a monostable multivibrator.
//
// A one-cycle trigger starts an output pulse of exactly WIDTH clock cycles.
// Triggers that arrive while the pulse is running are ignored
// (non-retriggerable), so one event yields one pulse of fixed width. The
// pulse starts on the clock edge after the trigger. WIDTH must be at least 1.
// The counter form stands in for the original's monostable multivibrators;
// non-retriggering is this design's choice.
module monostable #(
  parameter int unsigned WIDTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);
  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH + 1) : 1;

  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         remaining <= '0;
    else if (trig && remaining == '0)   remaining <= CW'(WIDTH);
    else if (remaining != '0)           remaining <= remaining - 1'b1;
  end

  assign pulse = (remaining != '0);
endmodule
