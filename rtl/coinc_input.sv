// Trigger register and coincidence window timer for one trigger source.
// The input is brought into the clock domain by two flops (the trigger
// register), its leading edge is detected, and every edge (re)opens a
// window of 'width' clocks during which 'win' is high; 'width' = 0 keeps
// the window shut. 'edge_p' is the one-clock leading-edge pulse, used by
// the rate meters. The document gives edge detection followed by a
// programmable coincidence-window timer; the retrigger rule and the
// two-flop input are this design's own. Timing: 'edge_p' and 'win' rise
// three clocks after the input edge.
module coinc_input (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig,
  input  logic [15:0] width,
  output logic        edge_p,
  output logic        win
);
  logic [2:0]  s;
  logic [15:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; cnt <= '0; edge_p <= 1'b0; win <= 1'b0;
    end else begin
      s      <= {s[1:0], trig};
      edge_p <= s[1] & ~s[2];
      if (s[1] & ~s[2] && width != 0) begin
        cnt <= width - 1'b1;
        win <= 1'b1;
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        win <= 1'b0;
      end
    end
  end
endmodule
