// Analog peak reader with a pipelined read-out manager.
// Reading a peak-detector channel means: select it on the front-end mux,
// let the mux settle, start the ADC, wait for the conversion, store the
// value. The read-out manager overlaps these phases over three channels in
// fixed-length slots of 'slot_cycles' clocks: while channel n settles on
// the mux, channel n-1 converts and channel n-2 is written to the stack.
// At each slot boundary the ADC result of the converting channel is taken
// (the boundary waits while 'adc_busy' is high), the settled channel gets
// 'adc_start', and one clock later the mux moves to the next channel
// ('ch_addr' with a 'ch_clk' strobe). The channel list comes from the hit
// map (sampler hit info or the front end's own hits, chosen by 'hit_src'):
// a channel is read when its hit bit is set, or its pair channel's (address
// xor 1) when 'comp_en' is set, or always when 'read_all' is set. With
// 'prescan' the map is first scanned into an address list (one channel per
// clock) and the list is then addressed directly; otherwise the next
// selected channel is searched for in place. Records are formatted per
// peak_fmt_pkg and written through a one-word holding register, so the
// last word of every record is marked for the double-buffered stack.
// 'ch_clr' pulses at the end to clear the peak detectors. The pipeline,
// hit skipping, pre-scan, complementary channel, header/body/footer fields
// and double-buffered stack are the document's; the slot mechanism, field
// layout and sizes are this design's own. 'slot_cycles' must be >= 4.
module peak_reader
  import acq_pkg::*;
  import peak_fmt_pkg::*;
#(
  parameter int unsigned NCH   = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned HW   = (NCH + 31) / 32,
  localparam int unsigned EVM  = PK_HDR_WORDS + 2 * NCH + HW + PK_FTR_FIXED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NCH-1:0]   hit_smp,
  input  logic [NCH-1:0]   hit_fe,
  input  logic             hit_src,
  input  logic             read_all,
  input  logic             comp_en,
  input  logic             prescan,
  input  logic             hdr_en,
  input  logic             ftr_en,
  input  logic             time_en,
  input  logic [7:0]       slot_cycles,
  input  stamp_t           stamp,
  input  logic [31:0]      mark_err,
  input  logic [31:0]      mark_now,
  // front-end mux and ADC
  output logic [7:0]       ch_addr,
  output logic             ch_clk,
  output logic             ch_clr,
  output logic             adc_start,
  input  logic             adc_busy,
  input  logic [ADC_W-1:0] adc_data,
  // stack read port
  input  logic             flush,
  input  logic             rd_en,
  output logic [31:0]      rd_data,
  output logic [15:0]      rd_avail,
  output logic             busy,
  output logic             done,
  output logic [15:0]      dropped
);
  typedef enum logic [2:0] {IDLE, PSCAN, HDR, RUN, FTR, FIN} st_t;
  st_t st;

  logic [NCH-1:0] hitmap, selmap;
  logic [7:0]     pos, lidx, lcount, scan;
  logic [7:0]     list [NCH];
  logic           use_list;

  // ----- next channel to read
  logic       nx_v;
  logic [7:0] nx_ch;
  always_comb begin
    nx_v  = 1'b0;
    nx_ch = '0;
    if (use_list) begin
      nx_v  = lidx < lcount;
      nx_ch = list[lidx[$clog2(NCH)-1:0]];
    end else begin
      for (int c = NCH - 1; c >= 0; c--)
        if (selmap[c] && 8'(c) >= pos) begin
          nx_v  = 1'b1;
          nx_ch = 8'(c);
        end
    end
  end

  function automatic logic [NCH-1:0] sel_of(input logic [NCH-1:0] h, input logic all, input logic comp);
    logic [NCH-1:0] s;
    for (int c = 0; c < NCH; c++)
      s[c] = all | h[c] | (comp & ((c ^ 1) < NCH) & h[(c ^ 1) % NCH]);
    return s;
  endfunction

  // ----- pipeline registers: A settling, B converting, C writing
  logic       a_v, b_v, c_v;
  logic [7:0] a_ch, b_ch, c_ch;
  logic [ADC_W-1:0] c_dat;
  logic [7:0] slot;
  logic [1:0] cw;           // words of C still to push
  logic [31:0] sum, maxv, elapsed;
  logic [7:0]  maxa;
  logic [3:0]  fidx;
  logic [1:0]  hidx;

  // ----- writer controller: one-word holding register
  logic        push, fin;
  logic [31:0] pdata, hold;
  logic        hold_v, we, wlast, wready;
  logic [31:0] wdata;
  assign we    = (push && hold_v) || (fin && hold_v);
  assign wdata = hold;
  assign wlast = fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v <= 1'b0; hold <= '0;
    end else if (fin) begin
      hold_v <= 1'b0;
    end else if (push) begin
      hold_v <= 1'b1; hold <= pdata;
    end
  end

  logic boundary;
  assign boundary = (st == RUN) && (slot >= slot_cycles - 1'b1) && !adc_busy;

  always_comb begin
    push  = 1'b0;
    pdata = '0;
    fin   = 1'b0;
    case (st)
      HDR: begin
        push = 1'b1;
        case (hidx)
          2'd0: pdata = stamp.abs_time;
          2'd1: pdata = stamp.mark_time;
          2'd2: pdata = mark_err;
          default: pdata = stamp.ev_cnt;
        endcase
      end
      RUN: if (c_v && cw != 0 && !boundary) begin
        push  = 1'b1;
        pdata = (cw == 2'd2) ? mark_now : data_word(c_ch, hitmap[c_ch[$clog2(NCH)-1:0]], c_dat);
      end
      FTR: begin
        push = 1'b1;
        if (32'(fidx) < HW) pdata = 32'(hitmap >> (32 * fidx));
        else case (32'(fidx) - HW)
          0:       pdata = sum;
          1:       pdata = maxv;
          2:       pdata = 32'(maxa);
          default: pdata = elapsed;
        endcase
      end
      FIN: fin = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; hitmap <= '0; selmap <= '0; pos <= '0; lidx <= '0; lcount <= '0; scan <= '0;
      use_list <= 1'b0; a_v <= 1'b0; b_v <= 1'b0; c_v <= 1'b0; a_ch <= '0; b_ch <= '0; c_ch <= '0;
      c_dat <= '0; slot <= '0; cw <= '0; sum <= '0; maxv <= '0; maxa <= '0; elapsed <= '0;
      fidx <= '0; hidx <= '0; ch_addr <= '0; ch_clk <= 1'b0; ch_clr <= 1'b0; adc_start <= 1'b0;
      done <= 1'b0; dropped <= '0;
    end else begin
      ch_clk    <= 1'b0;
      ch_clr    <= 1'b0;
      adc_start <= 1'b0;
      done      <= 1'b0;
      if (st != IDLE) elapsed <= elapsed + 1'b1;
      case (st)
        IDLE: if (start) begin
          if (!wready) begin
            dropped <= dropped + 1'b1;
          end else begin
            hitmap   <= hit_src ? hit_fe : hit_smp;
            selmap   <= sel_of(hit_src ? hit_fe : hit_smp, read_all, comp_en);
            pos <= '0; lidx <= '0; lcount <= '0; scan <= '0;
            use_list <= 1'b0;
            sum <= '0; maxv <= '0; maxa <= '0; elapsed <= 32'd1; hidx <= '0; fidx <= '0;
            a_v <= 1'b0; b_v <= 1'b0; c_v <= 1'b0; cw <= '0; slot <= '0;
            st <= prescan ? PSCAN : (hdr_en ? HDR : RUN);
          end
        end
        PSCAN: begin
          if (selmap[scan[$clog2(NCH)-1:0]]) begin
            list[lcount[$clog2(NCH)-1:0]] <= scan;
            lcount <= lcount + 1'b1;
          end
          scan <= scan + 1'b1;
          if (32'(scan) == NCH - 1) begin
            use_list <= 1'b1;
            st <= hdr_en ? HDR : RUN;
          end
        end
        HDR: begin
          hidx <= hidx + 1'b1;
          if (hidx == 2'd3) st <= RUN;
        end
        RUN: begin
          slot <= slot + 1'b1;
          if (push) cw <= cw - 1'b1;
          if (boundary) begin
            slot <= '0;
            // C <= B (take the finished conversion), B <= A (start it)
            c_v   <= b_v;
            c_ch  <= b_ch;
            c_dat <= adc_data;
            cw    <= b_v ? (time_en ? 2'd2 : 2'd1) : 2'd0;
            if (b_v) begin
              sum <= sum + 32'(adc_data);
              if (32'(adc_data) > maxv || maxv == '0) begin
                maxv <= 32'(adc_data);
                maxa <= b_ch;
              end
            end
            b_v       <= a_v;
            b_ch      <= a_ch;
            adc_start <= a_v;
            if (!a_v && !b_v && !nx_v) st <= ftr_en ? FTR : FIN;
          end else if (slot == 8'd0) begin
            // A <= next channel, one clock after the conversion started
            a_v <= nx_v;
            if (nx_v) begin
              a_ch    <= nx_ch;
              ch_addr <= nx_ch;
              ch_clk  <= 1'b1;
              pos     <= nx_ch + 1'b1;
              lidx    <= lidx + 1'b1;
            end
          end
        end
        FTR: begin
          fidx <= fidx + 1'b1;
          if (32'(fidx) == HW + PK_FTR_FIXED - 1) st <= FIN;
        end
        FIN: begin
          ch_clr <= 1'b1;
          done   <= 1'b1;
          st     <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  logic [$clog2(DEPTH+1)-1:0] avail;
  dbuf_stack #(.W(32), .DEPTH(DEPTH), .EV_MAX(EVM)) u_stack (
    .clk, .rst_n, .wr_en(we), .wr_data(wdata), .wr_last(wlast), .wr_ready(wready),
    .flush, .rd_en, .rd_data, .rd_avail(avail), .overflow()
  );
  assign rd_avail = 16'(avail);
endmodule
