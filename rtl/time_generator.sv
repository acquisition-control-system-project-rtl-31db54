// Absolute and mark time generator.
// The external PPS and 10 MHz clock (from a CSAC or RTC) are synchronised
// to the reference clock with two flops each and their rising edges
// detected. Every 10 MHz edge advances the 32-bit mark time (tenths of a
// microsecond); every PPS edge advances the 32-bit absolute time (seconds),
// restarts the mark time at zero and stores the timestamp shift error: the
// number of 10 MHz edges seen in that second minus MARKS_PER_SEC (0 when
// the two references agree). 'sec_load' presets the seconds. 'pps_p' is
// the synchronised PPS pulse. Two 32-bit fields with 100 ns resolution,
// the synchronisation and the shift error are the document's; the error
// definition is this design's reading. Timing: 3 clocks from input edge.
module time_generator #(
  parameter int unsigned MARKS_PER_SEC = 10_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pps,
  input  logic        clk10m,
  input  logic        sec_load,
  input  logic [31:0] sec_val,
  output logic [31:0] abs_time,
  output logic [31:0] mark_time,
  output logic [31:0] mark_err,
  output logic        pps_p
);
  logic [2:0] ps, ms;
  logic       m_p, first;
  assign m_p = ms[1] & ~ms[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= '0; ms <= '0; pps_p <= 1'b0; abs_time <= '0; mark_time <= '0; mark_err <= '0;
      first <= 1'b1;
    end else begin
      ps    <= {ps[1:0], pps};
      ms    <= {ms[1:0], clk10m};
      pps_p <= ps[1] & ~ps[2];
      if (sec_load) abs_time <= sec_val;
      if (ps[1] & ~ps[2]) begin
        if (!sec_load) abs_time <= abs_time + 1'b1;
        // marks in the second just ended, including one on this clock
        if (!first) mark_err <= mark_time + 32'(m_p) - 32'(MARKS_PER_SEC);
        first     <= 1'b0;
        mark_time <= '0;
      end else if (m_p) begin
        mark_time <= mark_time + 1'b1;
      end
    end
  end
endmodule
