// Types and constants shared by the acquisition modules.
// stamp_t is the event time stamp that the trigger manager latches on every
// Trig-Out and hands to every event writer: 32-bit seconds ("abs time"),
// 32-bit tenths of a microsecond ("mark time") and the 32-bit sequential
// event counter, as the document specifies. The event header layout used
// by the counter and sampler event stacks (word order) is this design's own.
package acq_pkg;
  typedef struct packed {
    logic [31:0] abs_time;
    logic [31:0] mark_time;
    logic [31:0] ev_cnt;
  } stamp_t;

  localparam int unsigned HDR_WORDS = 3;

  function automatic logic [31:0] hdr_word(input stamp_t s, input int unsigned i);
    case (i)
      0:       return s.abs_time;
      1:       return s.mark_time;
      default: return s.ev_cnt;
    endcase
  endfunction
endpackage
