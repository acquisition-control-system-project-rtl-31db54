// Hit-info generator for the peak reader.
// Builds a 64-bit map of the channels whose peaks should be read. Modes, as
// the document lists them:
//   1: only the OR word (four-sample OR) of the sample that gave the first
//      trigger;
//   2: that word plus the OR words of every later stage that triggers;
//   3: that word plus every later OR word, triggering or not.
// Integration starts at the first trigger ('trig', with its 'phase'). If
// 'win_en' is set it stops after 'win_len' clocks, otherwise it runs until
// 'clr'. 'active' is high while integrating; 'hit_info' holds the map until
// 'clr'. Inputs or_word/stage_trig must be aligned and 'trig' one clock
// after them, as the majority trigger and phase detector give them. Mode
// encoding (2'd1..3, 0 treated as 1) is this design's choice.
module hit_info_gen #(
  parameter int unsigned NCH = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [1:0]          mode,
  input  logic                win_en,
  input  logic [15:0]         win_len,
  input  logic [3:0][NCH-1:0] or_word,
  input  logic [3:0]          stage_trig,
  input  logic                trig,
  input  logic [1:0]          phase,
  output logic [NCH-1:0]      hit_info,
  output logic                active
);
  // trig/phase come one clock after or_word; keep the previous OR words
  logic [3:0][NCH-1:0] or_q;
  logic [15:0]         wcnt;
  logic                started;
  logic [NCH-1:0]      add_c;

  always_comb begin
    add_c = '0;
    for (int p = 0; p < 4; p++) begin
      if (mode == 2'd3) add_c |= or_word[p];
      else if (mode == 2'd2 && stage_trig[p]) add_c |= or_word[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      or_q <= '0; hit_info <= '0; active <= 1'b0; started <= 1'b0; wcnt <= '0;
    end else begin
      or_q <= or_word;
      if (clr) begin
        hit_info <= '0; active <= 1'b0; started <= 1'b0; wcnt <= '0;
      end else if (!started && trig) begin
        started  <= 1'b1;
        active   <= 1'b1;
        hit_info <= or_q[phase] | add_c;
        wcnt     <= 16'd1;
      end else if (active) begin
        hit_info <= hit_info | add_c;
        wcnt     <= wcnt + 1'b1;
        if (win_en && wcnt >= win_len) active <= 1'b0;
      end
    end
  end
endmodule
