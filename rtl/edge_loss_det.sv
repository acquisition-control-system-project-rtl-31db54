// Pulse edge and signal-loss detector for one front-end trigger line.
// The trigger input is registered on the fast counter clock; a rising edge
// (low in the previous sample, high now) gives a one-cycle 'pulse' that the
// dual fast counter uses as its count enable. Counting leading edges, not
// levels, follows the document. The signal-loss flag is this design's own
// reading of "signal loss": 'loss' rises when the input has been high for
// LOSS_CYCLES consecutive clocks (a stuck line) and falls when it goes low.
// Timing: 'pulse' comes two clocks after the edge reaches 'din'.
module edge_loss_det #(
  parameter int unsigned LOSS_CYCLES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic pulse,
  output logic loss
);
  localparam int unsigned CW = $clog2(LOSS_CYCLES + 1);
  logic          s0, s1;
  logic [CW-1:0] high_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0       <= 1'b0;
      s1       <= 1'b0;
      pulse    <= 1'b0;
      high_cnt <= '0;
      loss     <= 1'b0;
    end else begin
      s0    <= din;
      s1    <= s0;
      pulse <= s0 & ~s1;
      if (!s0) begin
        high_cnt <= '0;
        loss     <= 1'b0;
      end else if (high_cnt == CW'(LOSS_CYCLES - 1)) begin
        loss <= 1'b1;
      end else begin
        high_cnt <= high_cnt + 1'b1;
      end
    end
  end
endmodule
