// Test pulse generator controller.
// After 'start' it produces 'count' pulses (0 = run until 'stop') of
// 'width' clocks high every 'period' clocks on 'pulse', and drives the
// pulse amplitude word 'amp' to the external pulser circuit on 'amp_out'
// for as long as it runs. The amplitude itself is made by that analog
// circuit. Width, period, amplitude and finite or continuous pulse count
// are the document's; ports and timing are this design's (first pulse one
// clock after 'start'; 'width' >= 1 and 'period' > 'width' assumed).
module test_pulse_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic [15:0] width,
  input  logic [15:0] period,
  input  logic [15:0] count,
  input  logic [15:0] amp,
  output logic        pulse,
  output logic [15:0] amp_out,
  output logic        busy,
  output logic [15:0] sent
);
  logic [15:0] pcnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; pulse <= 1'b0; amp_out <= '0; busy <= 1'b0; sent <= '0;
    end else if (stop) begin
      busy <= 1'b0; pulse <= 1'b0; amp_out <= '0;
    end else if (!busy) begin
      pulse <= 1'b0;
      if (start) begin
        busy <= 1'b1; pcnt <= '0; sent <= '0; amp_out <= amp;
      end
    end else begin
      pcnt  <= (pcnt == period - 1'b1) ? 16'd0 : pcnt + 1'b1;
      pulse <= (pcnt < width);
      if (pcnt == 16'd0) sent <= sent + 1'b1;
      if (pcnt == period - 1'b1 && count != 0 && sent == count) begin
        busy <= 1'b0; amp_out <= '0; pulse <= 1'b0;
      end
    end
  end
endmodule
