// Trigger phase detector.
// Because the four trigger stages see overlapping four-sample OR windows,
// one event makes several stages fire. On the first cycle in which any
// stage fires, this block gives a one-clock 'trig' and 'phase', the lowest
// (earliest in time) stage index that fired, which ties the trigger to its
// sample with 1 ns resolution. It then ignores the stages until all of them
// are quiet again. The need for this circuit is the document's; the
// re-arm rule is this design's own. Timing: 'trig' and 'phase' are
// registered, one clock after 'stage_trig'.
module trig_phase_det (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] stage_trig,
  output logic       trig,
  output logic [1:0] phase
);
  logic armed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b1; trig <= 1'b0; phase <= '0;
    end else begin
      trig <= 1'b0;
      if (stage_trig == '0) begin
        armed <= 1'b1;
      end else if (armed) begin
        armed <= 1'b0;
        trig  <= 1'b1;
        phase <= stage_trig[0] ? 2'd0 : stage_trig[1] ? 2'd1 : stage_trig[2] ? 2'd2 : 2'd3;
      end
    end
  end
endmodule
