// Counter acquisition block for one channel.
// Two independent chains take the count word transferred at every timer
// tick: (1) a free-run ring memory records each count word, and (2) a count
// adder register accumulates the words into a 32-bit background-rate sum
// that is pushed to its own double-buffered stack every 'rate_ticks' ticks.
// When ACQUIRE falls, the ring stops and an event is copied to the event
// stack: a header (seconds, tenths of microsecond, event counter) followed
// by 'ev_len' count words, the newest of which is 'ev_offset' ticks older
// than the last one written. Acquisition resumes once the copy is done and
// ACQUIRE is high again. The structure follows the document's figure of the
// counters module; header layout, word widths, sizes and the offset rule are
// this design's own. Events are skipped (and counted by the stack) when the
// event stack has no free bank.
module counter_acq_block
  import acq_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned RING     = 64,
  parameter int unsigned EV_DEPTH = 128,
  parameter int unsigned RT_DEPTH = 16,
  localparam int unsigned RAW     = $clog2(RING)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           acq,
  input  logic           tick,
  input  logic [W-1:0]   word,
  input  logic [15:0]    rate_ticks,
  input  logic [RAW:0]   ev_len,
  input  logic [RAW-1:0] ev_offset,
  input  stamp_t         stamp,
  input  logic           flush,
  // event stack read port
  input  logic           ev_rd,
  output logic [31:0]    ev_data,
  output logic [$clog2(EV_DEPTH+1)-1:0] ev_avail,
  // rate stack read port
  input  logic           rt_rd,
  output logic [31:0]    rt_data,
  output logic [$clog2(RT_DEPTH+1)-1:0] rt_avail,
  output logic           xfer_busy
);
  typedef enum logic [1:0] {RUN, HDR, BODY, WAITACQ} st_t;
  st_t st;

  logic           acq_q, running;
  logic [RAW-1:0] wr_ptr, rd_addr;
  logic [W-1:0]   rd_word;
  logic [RAW:0]   idx;
  logic [1:0]     hidx;
  logic           body_v;
  logic [31:0]    ev_wdata;
  logic           ev_we, ev_last, ev_ready;

  assign running   = (st == RUN) && acq;
  assign xfer_busy = (st != RUN);

  ring_memory #(.W(W), .DEPTH(RING)) u_ring (
    .clk, .rst_n, .wr_en(tick && running), .wr_data(word),
    .rd_addr, .rd_data(rd_word), .wr_ptr
  );

  // ----- count adder register and rate stack
  logic [31:0] rate_acc;
  logic [15:0] tick_cnt;
  logic        rt_we;
  logic [31:0] rt_wdata;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_acc <= '0; tick_cnt <= '0; rt_we <= 1'b0; rt_wdata <= '0;
    end else begin
      rt_we <= 1'b0;
      if (tick && acq) begin
        if (tick_cnt + 1'b1 >= rate_ticks) begin
          rt_we    <= 1'b1;
          rt_wdata <= rate_acc + 32'(word);
          rate_acc <= '0;
          tick_cnt <= '0;
        end else begin
          rate_acc <= rate_acc + 32'(word);
          tick_cnt <= tick_cnt + 1'b1;
        end
      end
    end
  end

  dbuf_stack #(.W(32), .DEPTH(RT_DEPTH), .EV_MAX(1)) u_rt (
    .clk, .rst_n, .wr_en(rt_we), .wr_data(rt_wdata), .wr_last(1'b1), .wr_ready(),
    .flush, .rd_en(rt_rd), .rd_data(rt_data), .rd_avail(rt_avail), .overflow()
  );

  // ----- event transfer from the ring to the event stack
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= RUN; acq_q <= 1'b0; idx <= '0; hidx <= '0; rd_addr <= '0; body_v <= 1'b0;
    end else begin
      acq_q  <= acq;
      body_v <= 1'b0;
      case (st)
        RUN: if (acq_q && !acq) begin
          st      <= ev_ready ? HDR : WAITACQ;
          hidx    <= '0;
          idx     <= '0;
          rd_addr <= wr_ptr - RAW'(ev_offset) - RAW'(ev_len);
        end
        HDR: begin
          hidx <= hidx + 1'b1;
          if (hidx == 2'(HDR_WORDS - 1)) st <= BODY;
        end
        BODY: begin
          if (idx != ev_len) begin
            body_v  <= 1'b1;
            idx     <= idx + 1'b1;
            rd_addr <= rd_addr + 1'b1;
          end
          if (idx == ev_len && !body_v) st <= WAITACQ;
        end
        WAITACQ: if (acq) st <= RUN;
      endcase
    end
  end

  always_comb begin
    ev_we    = 1'b0;
    ev_last  = 1'b0;
    ev_wdata = '0;
    if (st == HDR) begin
      ev_we    = 1'b1;
      ev_wdata = hdr_word(stamp, 32'(hidx));
      ev_last  = (hidx == 2'(HDR_WORDS - 1)) && (ev_len == '0);
    end else if (body_v) begin
      ev_we    = 1'b1;
      ev_wdata = 32'(rd_word);
      ev_last  = (idx == ev_len);
    end
  end

  dbuf_stack #(.W(32), .DEPTH(EV_DEPTH), .EV_MAX(HDR_WORDS + RING)) u_ev (
    .clk, .rst_n, .wr_en(ev_we), .wr_data(ev_wdata), .wr_last(ev_last), .wr_ready(ev_ready),
    .flush, .rd_en(ev_rd), .rd_data(ev_data), .rd_avail(ev_avail), .overflow()
  );
endmodule
