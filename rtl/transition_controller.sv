// transition_controller: the recorder's master state machine.
//
// Two JK flip-flops, Q1 and Q2, clocked by the rising edge of the 156-kHz
// strobe, hold the operating state {Q1,Q2} (see cardio_pkg::ctrl_state_t).
// With B = Bit 11 OR EXT STOP and X = (CG OR not Q1) AND SRF, the inputs are
//   J1 = (not X AND Q2) OR B      K1 = X AND Q2 AND not B
//   J2 = not Q1 AND B             K2 = Q1 AND B
// and R = not (Q1 OR Q2), high only in Start. This gives:
//   Start   -> not-Write  when Bit 11 (memory cleared);
//   not-Write -> Write    when SRF AND CG;
//   Write   -> not-Write  when SRF has been cleared (after the byte is stored);
//   not-Write -> Halt     when Bit 11 (memory full) or EXT STOP;
//   Halt is left only by EXT RST, which forces Start at once, whatever the
//   strobe, like the flip-flops' direct resets.
// Power-on reset puts the machine in Halt, where memory is only read.
// The flip-flop equations and states are the original's; reading the
// overbar of J1 as covering (CG + not Q1)*SRF only, the OR of EXT STOP into
// the Bit 11 term, and the Halt power-on state are this design's choices.
module transition_controller
  import cardio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,      // power-on reset: enter Halt
  input  logic        clk_156k,   // state clock (level)
  input  logic        ext_rst,    // EXT RST: force Start
  input  logic        ext_stop,   // EXT STOP
  input  logic        srf,
  input  logic        cg,
  input  logic        bit11,
  output logic        q1,
  output logic        q2,
  output logic        r,
  output ctrl_state_t state
);
  logic strobe_d, tick, b, x, j1, k1, j2, k2;

  assign tick = clk_156k && !strobe_d;
  assign b    = bit11 || ext_stop;
  assign x    = (cg || !q1) && srf;
  assign j1   = (!x && q2) || b;
  assign k1   = x && q2 && !b;
  assign j2   = !q1 && b;
  assign k2   = q1 && b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_d <= 1'b0;
      q1       <= 1'b1;
      q2       <= 1'b0;
    end else begin
      strobe_d <= clk_156k;
      if (ext_rst) begin
        q1 <= 1'b0;
        q2 <= 1'b0;
      end else if (tick) begin
        q1 <= (j1 && !q1) || (!k1 && q1);
        q2 <= (j2 && !q2) || (!k2 && q2);
      end
    end
  end

  // Halt is blocked: without EXT RST the machine stays there.
  a_halt_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    (q1 && !q2 && !ext_rst) |=> (q1 && !q2));
  // EXT RST always yields Start on the next cycle.
  a_ext_rst: assert property (@(posedge clk) disable iff (!rst_n)
    ext_rst |=> (!q1 && !q2));

  assign r     = !(q1 || q2);
  assign state = ctrl_state_t'({q1, q2});
endmodule
