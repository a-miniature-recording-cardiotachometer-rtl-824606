// reset_generator: address reset pulse AR.
//
// Two one-shots watch the R signal, one firing on its rising edge (entry to
// Start, before memory is cleared) and one on its falling edge (clearing
// finished); their outputs are ORed into AR. Each pulse lasts AR_WIDTH clk
// cycles, 1.5 us at 5 MHz, and starts one cycle after the edge of R. The two
// one-shots and the OR are the original's.
module reset_generator #(
  parameter int unsigned AR_WIDTH = 8   // ~1.5 us at 5 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic r,
  output logic ar
);
  logic r_d, ar_rise, ar_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_d <= 1'b0;
    else        r_d <= r;
  end

  monostable #(.WIDTH(AR_WIDTH)) u_rise (
    .clk(clk), .rst_n(rst_n), .trig(r && !r_d), .pulse(ar_rise)
  );
  monostable #(.WIDTH(AR_WIDTH)) u_fall (
    .clk(clk), .rst_n(rst_n), .trig(!r && r_d), .pulse(ar_fall)
  );

  assign ar = ar_rise || ar_fall;
endmodule
