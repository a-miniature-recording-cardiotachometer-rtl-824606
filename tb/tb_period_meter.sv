// tb_period_meter: testbench helper that measures the period of a level
// signal in clock cycles.
//
// On every rising edge of clk while enable is high it counts cycles since the
// last rising edge of sig; at each rising edge it latches that count into
// period and increments edges. The first edge after enable only starts the
// count (period stays 0 until a full period has been seen).
module tb_period_meter (
  input  logic clk,
  input  logic enable,
  input  logic sig,
  output int   period,
  output int   edges
);
  logic sig_d = 1'b0;
  int   cnt = 0;
  initial begin
    period = 0;
    edges  = 0;
  end

  always @(posedge clk) begin
    if (!enable) begin
      cnt   <= 0;
      edges <= 0;
      sig_d <= sig;
    end else begin
      sig_d <= sig;
      if (sig && !sig_d) begin
        if (edges > 0) period <= cnt + 1;
        edges <= edges + 1;
        cnt   <= 0;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
