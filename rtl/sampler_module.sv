// Sampler module: 1 GS/s sampling of all trigger lines and fast trigger.
// Four capture stages, each on its own 250 MHz clock shifted by a quarter
// period (clk_ph[0..3]), sample the NCH front-end trigger lines, giving one
// 1 ns sample each; the phase synchroniser makes all four start and stop on
// the same frame. The four samples are re-registered on clk_ph[0], which is
// the clock of everything else here, as one frame of four samples. Frames
// are written to a free-run ring memory (one 4*NCH-bit row per frame) and
// fed to the pixel-majority trigger, the trigger phase detector and the
// hit-info generator. When ACQUIRE ('acq') falls the capture stops, the
// ring freezes, and an event is copied to a double-buffered stack: a header
// of four words (seconds, tenths of microsecond, event counter, info) and
// 'ev_rows_in' frames (at most MAX_ROWS) of 4*NCH/32 words each, ending 'ev_offset' frames before
// the newest frame so that the trigger pipeline latency is compensated.
// Info word: [31] a trigger was seen, [17:16] its phase, [15:0] frames
// written after the trigger frame reached the ring. Sample s of frame row r
// is bit (32*j + c) where j = (s*NCH + c)/32, i.e. words run sample by
// sample, channel 0 first. The blocks and the four-phase scheme follow the
// document; sizes, word layout and the header are this design's own.
module sampler_module
  import acq_pkg::*;
#(
  parameter int unsigned NCH      = 64,
  parameter int unsigned RING     = 64,
  parameter int unsigned MAX_ROWS = 32,
  parameter int unsigned DEPTH    = 1024,
  localparam int unsigned RAW     = $clog2(RING),
  localparam int unsigned CW      = $clog2(NCH + 1),
  localparam int unsigned WPR     = 4 * NCH / 32
) (
  input  logic [3:0]      clk_ph,
  input  logic            rst_n,
  input  logic [NCH-1:0]  trig_in,
  input  logic            acq,
  input  logic [CW-1:0]   thr,
  input  logic [RAW-1:0]  ev_rows_in,
  input  logic [RAW-1:0]  ev_offset,
  input  logic [1:0]      hit_mode,
  input  logic            win_en,
  input  logic [15:0]     win_len,
  input  logic            hit_clr,
  input  stamp_t          stamp,
  input  logic            flush,
  input  logic            rd_en,
  output logic [31:0]     rd_data,
  output logic [15:0]     rd_avail,
  output logic            trigger,
  output logic [1:0]      trig_phase,
  output logic [NCH-1:0]  hit_info,
  output logic            hit_active,
  output logic            busy
);
  logic clk;
  assign clk = clk_ph[0];

  typedef enum logic [2:0] {RUN, DRAIN, HDR, LOAD, BODY, WAITACQ} st_t;
  st_t st;

  // ----- four-phase capture
  logic [3:0]          en;
  logic                run;
  logic [3:0][NCH-1:0] cap, frame;
  logic                cap_v, frame_v;

  assign run = acq && (st == RUN);
  phase_sync #(.N(4)) u_psync (.clk_ph, .rst_n, .acq(run), .en);

  for (genvar i = 0; i < 4; i++) begin : g_cap
    logic [NCH-1:0] q;
    always_ff @(posedge clk_ph[i] or negedge rst_n) begin
      if (!rst_n)     q <= '0;
      else if (en[i]) q <= trig_in;
    end
    assign cap[i] = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_v <= 1'b0; frame_v <= 1'b0; frame <= '0;
    end else begin
      cap_v   <= en[0];
      frame_v <= cap_v;
      frame   <= cap;
    end
  end

  // ----- fast trigger chain
  logic [3:0]          stage_trig;
  logic [3:0][NCH-1:0] or_word;

  majority_trigger #(.NCH(NCH)) u_maj (
    .clk, .rst_n, .valid(frame_v), .samp(frame), .thr, .stage_trig, .or_word
  );
  trig_phase_det u_pdet (.clk, .rst_n, .stage_trig, .trig(trigger), .phase(trig_phase));
  hit_info_gen #(.NCH(NCH)) u_hit (
    .clk, .rst_n, .clr(hit_clr), .mode(hit_mode), .win_en, .win_len, .or_word, .stage_trig,
    .trig(trigger), .phase(trig_phase), .hit_info, .active(hit_active)
  );

  // ----- ring memory
  logic [RAW-1:0]       wr_ptr, rd_addr;
  logic [4*NCH-1:0]     rd_row;
  ring_memory #(.W(4 * NCH), .DEPTH(RING)) u_ring (
    .clk, .rst_n, .wr_en(frame_v), .wr_data(frame), .rd_addr, .rd_data(rd_row), .wr_ptr
  );

  // trigger bookkeeping for the info word
  logic        tseen;
  logic [1:0]  tphase;
  logic [15:0] since;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tseen <= 1'b0; tphase <= '0; since <= '0;
    end else if (st == WAITACQ && acq) begin
      tseen <= 1'b0; since <= '0;
    end else if (trigger && !tseen) begin
      tseen <= 1'b1; tphase <= trig_phase;
      // the trigger frame entered the ring 5 clocks ago (pipeline latency)
      since <= frame_v ? 16'd5 : 16'd4;
    end else if (tseen && frame_v) begin
      since <= since + 1'b1;
    end
  end

  // ----- event transfer (event length clamped to what the stack reserves)
  logic [RAW-1:0] ev_rows;
  assign ev_rows = (32'(ev_rows_in) > MAX_ROWS) ? RAW'(MAX_ROWS) : ev_rows_in;
  logic          acq_q;
  logic [1:0]    hidx;
  logic [RAW-1:0] row;
  logic [$clog2(WPR)-1:0] widx;
  logic          we, wlast, wready;
  logic [31:0]   wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= RUN; acq_q <= 1'b0; hidx <= '0; row <= '0; widx <= '0; rd_addr <= '0;
    end else begin
      acq_q <= acq;
      case (st)
        RUN:   if (acq_q && !acq) st <= DRAIN;
        DRAIN: if (!frame_v && !cap_v && en == '0) begin
          st      <= wready ? HDR : WAITACQ;
          hidx    <= '0;
          row     <= '0;
          widx    <= '0;
          rd_addr <= wr_ptr - ev_offset - ev_rows;
        end
        HDR: begin
          hidx <= hidx + 1'b1;
          if (hidx == 2'd3) st <= (ev_rows == '0) ? WAITACQ : LOAD;
        end
        LOAD: st <= BODY;
        BODY: begin
          widx <= widx + 1'b1;
          if (widx == $clog2(WPR)'(WPR - 1)) begin
            row     <= row + 1'b1;
            rd_addr <= rd_addr + 1'b1;
            st      <= (row + 1'b1 == ev_rows) ? WAITACQ : LOAD;
          end
        end
        WAITACQ: if (acq) st <= RUN;
        default: st <= RUN;
      endcase
    end
  end

  always_comb begin
    we = 1'b0; wlast = 1'b0; wdata = '0;
    if (st == HDR) begin
      we = 1'b1;
      if (hidx == 2'd3) begin
        wdata = {tseen, 13'd0, tphase, since};
        wlast = (ev_rows == '0);
      end else begin
        wdata = hdr_word(stamp, 32'(hidx));
      end
    end else if (st == BODY) begin
      we    = 1'b1;
      wdata = rd_row[32 * widx +: 32];
      wlast = (widx == $clog2(WPR)'(WPR - 1)) && (row + 1'b1 == ev_rows);
    end
  end

  logic [$clog2(DEPTH+1)-1:0] avail;
  dbuf_stack #(.W(32), .DEPTH(DEPTH), .EV_MAX(4 + WPR * MAX_ROWS)) u_stack (
    .clk, .rst_n, .wr_en(we), .wr_data(wdata), .wr_last(wlast), .wr_ready(wready),
    .flush, .rd_en, .rd_data, .rd_avail(avail), .overflow()
  );
  assign rd_avail = 16'(avail);
  assign busy     = (st != RUN);
endmodule
