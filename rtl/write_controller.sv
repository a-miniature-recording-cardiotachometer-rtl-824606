// write_controller: WE, AI and PR pulse sequence.
//
// The trigger source is the 1-kHz clock while R is high (memory clearing)
// and the counting gate CG while R is low (acquisition). A falling edge of
// the selected source fires the first one-shot (WE_WIDTH cycles, 100 us at
// 5 MHz); the falling edge of that pulse fires the second (AI_WIDTH cycles,
// 10 us). The first pulse is output as WE and the second as AI only while Q1
// is low (Start and Write states); PR takes the second pulse ungated, so the
// beat period counter is preset after every fall of CG even when nothing is
// stored (a "phantom" WE). Both one-shots ignore triggers while running.
// Timing: WE rises 1 cycle after the source edge is seen, AI/PR start 1 cycle
// after WE ends. The tandem one-shots and gating follow the original; the
// non-retriggerable one-shots are this design's choice.
module write_controller #(
  parameter int unsigned WE_WIDTH = 500,  // 100 us at 5 MHz
  parameter int unsigned AI_WIDTH = 50    // 10 us at 5 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_1k,  // 1-kHz clear clock (level)
  input  logic r,       // reset state signal
  input  logic cg,      // counting gate
  input  logic q1,      // transition controller Q1; high blocks WE and AI
  output logic we,
  output logic ai,
  output logic pr
);
  logic src, src_d, shot1, shot1_d, shot2;

  assign src = r ? clk_1k : cg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_d   <= 1'b0;
      shot1_d <= 1'b0;
    end else begin
      src_d   <= src;
      shot1_d <= shot1;
    end
  end

  monostable #(.WIDTH(WE_WIDTH)) u_shot1 (
    .clk(clk), .rst_n(rst_n), .trig(!src && src_d), .pulse(shot1)
  );
  monostable #(.WIDTH(AI_WIDTH)) u_shot2 (
    .clk(clk), .rst_n(rst_n), .trig(!shot1 && shot1_d), .pulse(shot2)
  );

  // The two one-shots never overlap: AI/PR only starts once WE has ended.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(shot1 && shot2));

  assign we = shot1 && !q1;
  assign ai = shot2 && !q1;
  assign pr = shot2;
endmodule
