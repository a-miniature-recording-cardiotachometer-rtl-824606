// sync2: two-flip-flop synchroniser for one asynchronous input.
//
// Every operator switch, the external readout control lines and the
// logic-level QRS signal reach the recorder asynchronously; each passes
// through one of these before any logic samples it. The output follows the
// input two clock cycles later. The synchronisers are this design's
// addition: the original has no single clock to synchronise to. The reset
// value is a parameter so that an active-low line can idle high.
module sync2 #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VALUE;
      q    <= RESET_VALUE;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
