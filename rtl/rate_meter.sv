// Trigger rate meter.
// Counts one-clock event pulses 'ev' between two 'gate' pulses and, on
// each gate, stores the count in 'rate' and restarts from zero (an event in
// the gate cycle is counted in the new interval). With the PPS as gate the
// result is a rate in events per second. The document names trigger rate
// meters; the gate choice is this design's. The count saturates.
module rate_meter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ev,
  input  logic        gate,
  output logic [31:0] rate
);
  logic [31:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; rate <= '0;
    end else if (gate) begin
      rate <= cnt;
      cnt  <= 32'(ev);
    end else if (ev && cnt != '1) begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
