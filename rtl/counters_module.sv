// Counters module: 64 fast photon-counting chains and the slow trigger.
// Each front-end trigger line goes through an edge/signal-loss detector and
// a dual fast counter, both on 'clk_fast' (500 MHz in the document). The
// acquire-and-clear timer on 'clk' ticks every 'period' clocks while ACQUIRE
// is high; each tick toggles which counter of every pair counts. The toggle
// is synchronised into the fast domain; three 'clk' cycles later the stopped
// counters hold still and their values are captured into 'clk' flops (a
// transfer), after which the stopped counters get a two-cycle asynchronous
// clear. While ACQUIRE is low both counters of every pair are held clear.
// Every transfer feeds the per-channel acquisition blocks (ring memory,
// count adder, event and rate stacks) and the slow trigger (sum, moving
// average, threshold, delay line). A data-out mux routes one channel's
// stacks, chosen by 'rd_ch', to the reader. The chain follows the
// document's figure; clock-crossing details and widths are this design's.
// 'clk_fast' must be at least as fast as 'clk'; 'period' must be at least 8
// and short enough that no counter passes 2**W-1 in one period.
module counters_module
  import acq_pkg::*;
#(
  parameter int unsigned NCH       = 64,
  parameter int unsigned W         = 8,
  parameter bit          SHIFT_ENC = 1'b0,
  parameter int unsigned RING      = 64,
  parameter int unsigned EV_DEPTH  = 128,
  parameter int unsigned RT_DEPTH  = 16,
  localparam int unsigned RAW      = $clog2(RING),
  localparam int unsigned SW       = W + $clog2(NCH),
  localparam int unsigned CHW      = $clog2(NCH)
) (
  input  logic           clk,
  input  logic           clk_fast,
  input  logic           rst_n,
  input  logic [NCH-1:0] trig_in,
  input  logic           acq,
  input  logic [15:0]    period,
  input  logic [15:0]    rate_ticks,
  input  logic [RAW:0]   ev_len,
  input  logic [RAW-1:0] ev_offset,
  input  logic [2:0]     avg_log2,
  input  logic [SW-1:0]  thr,
  input  logic [5:0]     delay,
  input  stamp_t         stamp,
  input  logic           flush,
  input  logic [CHW-1:0] rd_ch,
  input  logic           ev_rd,
  output logic [31:0]    ev_data,
  output logic [15:0]    ev_avail,
  input  logic           rt_rd,
  output logic [31:0]    rt_data,
  output logic [15:0]    rt_avail,
  output logic [NCH-1:0] loss,
  output logic [SW-1:0]  average,
  output logic           trigger,
  output logic           trigger_dly,
  output logic           xfer,
  output logic           busy
);
  // ----- control in the clk domain
  logic       tick, sel_c;
  logic [2:0] wait_sr;
  logic [1:0] clr_c;
  logic [1:0] clr_cnt;

  acq_clear_timer #(.PW(16)) u_timer (.clk, .rst_n, .acq_en(acq), .period, .tick);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_c <= 1'b0; wait_sr <= '0; clr_c <= 2'b11; clr_cnt <= '0; xfer <= 1'b0;
    end else begin
      wait_sr <= {wait_sr[1:0], tick};
      xfer    <= wait_sr[2];
      if (tick) sel_c <= ~sel_c;
      if (!acq) begin
        clr_c <= 2'b11;
      end else if (xfer) begin
        clr_c[~sel_c] <= 1'b1;   // clear the counter just read
        clr_cnt       <= 2'd2;
      end else if (clr_cnt != 0) begin
        clr_cnt <= clr_cnt - 1'b1;
        if (clr_cnt == 1) clr_c <= 2'b00;
      end else begin
        clr_c <= 2'b00;
      end
    end
  end

  // ----- sel into the fast domain
  logic [1:0] sel_sync;
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) sel_sync <= '0;
    else        sel_sync <= {sel_sync[0], sel_c};
  end

  logic [NCH-1:0][W-1:0] word_f, word_q;
  logic [NCH-1:0]        pulse;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    edge_loss_det u_edge (.clk(clk_fast), .rst_n, .din(trig_in[c]), .pulse(pulse[c]), .loss(loss[c]));
    dual_fast_counter #(.W(W), .SHIFT_ENC(SHIFT_ENC)) u_cnt (
      .clk_fast, .cnt_en(pulse[c]), .sel(sel_sync[1]), .clr(clr_c), .word(word_f[c])
    );
  end

  // stopped counters are stable when wait_sr[2] is high
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          word_q <= '0;
    else if (wait_sr[2]) word_q <= word_f;
  end

  // ----- per-channel acquisition blocks and output mux
  logic [NCH-1:0][31:0] ev_d, rt_d;
  logic [NCH-1:0][$clog2(EV_DEPTH+1)-1:0] ev_a;
  logic [NCH-1:0][$clog2(RT_DEPTH+1)-1:0] rt_a;
  logic [NCH-1:0] bsy;

  for (genvar c = 0; c < NCH; c++) begin : g_acq
    counter_acq_block #(.W(W), .RING(RING), .EV_DEPTH(EV_DEPTH), .RT_DEPTH(RT_DEPTH)) u_blk (
      .clk, .rst_n, .acq, .tick(xfer), .word(word_q[c]), .rate_ticks, .ev_len, .ev_offset,
      .stamp, .flush,
      .ev_rd(ev_rd && rd_ch == CHW'(c)), .ev_data(ev_d[c]), .ev_avail(ev_a[c]),
      .rt_rd(rt_rd && rd_ch == CHW'(c)), .rt_data(rt_d[c]), .rt_avail(rt_a[c]),
      .xfer_busy(bsy[c])
    );
  end

  assign ev_data  = ev_d[rd_ch];
  assign rt_data  = rt_d[rd_ch];
  assign ev_avail = 16'(ev_a[rd_ch]);
  assign rt_avail = 16'(rt_a[rd_ch]);
  assign busy     = |bsy;

  slow_trigger #(.NCH(NCH), .W(W), .DMAX(64)) u_trig (
    .clk, .rst_n, .clear(!acq), .valid(xfer), .words(word_q), .avg_log2, .thr, .delay,
    .average, .trigger, .trigger_dly
  );
endmodule
