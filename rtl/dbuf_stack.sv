// Double-buffered event stack.
// Two banks of DEPTH words. The writer fills one bank with whole events
// ('wr_en' per word, 'wr_last' on the last word of an event) while the
// reader empties the other, so acquisition needs no dead time for readout.
// After an event is committed, a bank that can no longer hold another event
// of EV_MAX words is handed to the reader and the writer moves to the other
// bank. 'flush' hands over a partly filled bank between events. The writer
// must only start an event while 'wr_ready' is high; words written while it
// is low are dropped and counted in 'overflow'. The reader sees 'rd_avail'
// words in the full bank, 'rd_data' is the oldest one (combinational read)
// and 'rd_en' pops it; when the bank is empty it returns to the writer.
// The document gives the double-bank idea; the hand-over rule, sizes and
// ports are this design's own.
module dbuf_stack #(
  parameter int unsigned W      = 32,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned EV_MAX = 64,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          wr_last,
  output logic          wr_ready,
  input  logic          flush,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic [CW-1:0] rd_avail,
  output logic [15:0]   overflow
);
  logic [W-1:0]  mem [2][DEPTH];
  logic [CW-1:0] cnt [2];
  logic [1:0]    full;
  logic          wbank, rbank, in_ev;
  logic [AW-1:0] rptr;
  logic          room;

  assign room     = !full[wbank] && (CW'(DEPTH) - cnt[wbank] >= CW'(EV_MAX));
  assign wr_ready = room && !in_ev;
  assign rd_avail = full[rbank] ? cnt[rbank] - CW'(rptr) : '0;
  assign rd_data  = mem[rbank][rptr];

  logic wr_ok;
  assign wr_ok = wr_en && (in_ev ? !full[wbank] && cnt[wbank] < CW'(DEPTH) : room);

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wbank][cnt[wbank][AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt[0] <= '0; cnt[1] <= '0;
      full <= '0; wbank <= 1'b0; rbank <= 1'b0; in_ev <= 1'b0;
      rptr <= '0; overflow <= '0;
    end else begin
      // writer side
      if (wr_en && !wr_ok && !in_ev) overflow <= overflow + 1'b1;
      if (wr_ok) begin
        cnt[wbank] <= cnt[wbank] + 1'b1;
        in_ev      <= !wr_last;
        if (wr_last && (CW'(DEPTH) - cnt[wbank] - 1'b1 < CW'(EV_MAX))) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end else if (flush && !in_ev && !full[wbank] && cnt[wbank] != '0) begin
        full[wbank] <= 1'b1;
        wbank       <= ~wbank;
      end
      // reader side (only ever touches a full bank, never the writer's)
      if (rd_en && full[rbank]) begin
        if (CW'(rptr) + 1'b1 == cnt[rbank]) begin
          full[rbank] <= 1'b0;
          cnt[rbank]  <= '0;
          rptr        <= '0;
          rbank       <= ~rbank;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  // the reader must not pop an empty stack
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_avail != '0);
endmodule
