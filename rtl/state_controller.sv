// state_controller: the recorder's control unit.
//
// Groups its four parts and wires them as the original does:
//   flag_generator        SRF, set every 10 s, cleared by AI;
//   transition_controller Q1, Q2 and R from SRF, CG, Bit 11 and the
//                         operator's EXT RST / EXT STOP;
//   reset_generator       AR pulses on both edges of R;
//   write_controller      WE, AI and PR from the 1-kHz clock or CG.
// ext_ai is the external address increment line; it is ORed with the
// internal AI before it clears SRF, as the external lines are ORed with
// their internal counterparts. ai/ar outputs are the internal signals only;
// the top ORs in the external ones for the address counter. All timing is
// in clk cycles; see the parts for the widths.
module state_controller
  import cardio_pkg::*;
#(
  parameter int unsigned WE_WIDTH = 500,
  parameter int unsigned AI_WIDTH = 50,
  parameter int unsigned AR_WIDTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_156k,
  input  logic        clk_1k,
  input  logic        clk_01,
  input  logic        cg,
  input  logic        bit11,
  input  logic        ext_rst,
  input  logic        ext_stop,
  input  logic        ext_ai,
  output logic        srf,
  output logic        q1,
  output logic        q2,
  output logic        r,
  output ctrl_state_t state,
  output logic        ar,
  output logic        we,
  output logic        ai,
  output logic        pr
);
  flag_generator u_flag (
    .clk(clk), .rst_n(rst_n), .clk_01(clk_01), .ai(ai || ext_ai), .srf(srf)
  );

  transition_controller u_trans (
    .clk(clk), .rst_n(rst_n), .clk_156k(clk_156k), .ext_rst(ext_rst),
    .ext_stop(ext_stop), .srf(srf), .cg(cg), .bit11(bit11),
    .q1(q1), .q2(q2), .r(r), .state(state)
  );

  reset_generator #(.AR_WIDTH(AR_WIDTH)) u_reset (
    .clk(clk), .rst_n(rst_n), .r(r), .ar(ar)
  );

  write_controller #(.WE_WIDTH(WE_WIDTH), .AI_WIDTH(AI_WIDTH)) u_write (
    .clk(clk), .rst_n(rst_n), .clk_1k(clk_1k), .r(r), .cg(cg), .q1(q1),
    .we(we), .ai(ai), .pr(pr)
  );
endmodule
