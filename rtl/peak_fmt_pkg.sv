// Data formatting of the analog peak reader, kept apart from the controller
// so that an instrument's record layout can be changed in one place, as the
// document recommends. A record is an optional HEADER (seconds, tenths of
// microsecond, timestamp shift error, event counter), one BODY entry per
// channel read (optional tenths-of-microsecond word, then the data word)
// and an optional FOOTER (hit map of all channels in 32-bit words, channel
// 0 in bit 0 of the first word; analog sum; maximum value; channel address
// of the maximum; elapsed read time in clock cycles). The data word layout
// below is this design's own.
package peak_fmt_pkg;
  localparam int unsigned ADC_W = 16;

  // data word: [31:24] channel address, [23] hit flag of that channel,
  // [22:16] zero, [15:0] ADC value
  function automatic logic [31:0] data_word(input logic [7:0] ch, input logic hit,
                                            input logic [ADC_W-1:0] adc);
    return {ch, hit, 7'd0, adc};
  endfunction

  localparam int unsigned PK_HDR_WORDS  = 4;
  localparam int unsigned PK_FTR_FIXED  = 4;   // sum, max, max address, elapsed
endpackage
