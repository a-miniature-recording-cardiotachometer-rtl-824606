// counting_gate: QRS pulse former and counting-gate toggle.
//
// Input qrs is the logic-level output of the analog T-wave filter (already
// synchronised to clk). The rising edge of each QRS complex fires a
// non-retriggerable one-shot of QRS_PULSE cycles (150 ms at 5 MHz); later
// edges inside that pulse, such as a T wave that still crosses the trigger
// level, are ignored. Each pulse toggles the counting gate CG, so CG is true
// during every second beat interval and each true interval spans exactly one
// beat period. qrs_pulse rises one cycle after the QRS edge and CG toggles
// one cycle after that.
//
// The 150-ms pulse and the toggle flip-flop are the original's; that the
// one-shot is non-retriggerable, and its use as a blanking window, are this
// design's choices.
module counting_gate #(
  parameter int unsigned QRS_PULSE = 750_000   // 150 ms at 5 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic qrs,        // logic-level QRS signal (synchronised)
  output logic qrs_pulse,  // fixed-width QRS pulse
  output logic cg          // counting gate
);
  logic qrs_d, pulse_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qrs_d   <= 1'b0;
      pulse_d <= 1'b0;
      cg      <= 1'b0;
    end else begin
      qrs_d   <= qrs;
      pulse_d <= qrs_pulse;
      if (qrs_pulse && !pulse_d) cg <= ~cg;
    end
  end

  monostable #(.WIDTH(QRS_PULSE)) u_shot (
    .clk  (clk),
    .rst_n(rst_n),
    .trig (qrs && !qrs_d),
    .pulse(qrs_pulse)
  );
endmodule
