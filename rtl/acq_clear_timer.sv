// Counters acquire and clear timer.
// While ACQUIRE ('acq_en') is high it emits a one-clock 'tick' every 'period'
// clocks; each tick makes the counting chains swap their fast counters,
// transfer the stopped count and clear it. When ACQUIRE is low the timer is
// held at zero, so the first tick comes 'period' clocks after ACQUIRE rises.
// The document says the rate is set by a programmable timer gated by the
// acquisition enable; the counter structure is this design's own.
module acq_clear_timer #(
  parameter int unsigned PW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acq_en,
  input  logic [PW-1:0] period,
  output logic          tick
);
  logic [PW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!acq_en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= period - 1'b1) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
