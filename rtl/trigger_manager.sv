// Timestamp and unique trigger manager.
// Three trigger sources (counters module, sampler module, external input)
// each pass a trigger register and a coincidence window timer. The three
// window levels index a programmable 8-entry truth table 'coinc_lut' (bit
// {ext,smp,cnt} of the table says whether that combination is a trigger),
// so any OR / AND / majority rule of the enabled sources can be chosen.
// While acquisition is armed, the rising edge of the table output is
// Trig-Out: the seconds and tenths-of-microsecond time and the event
// counter are stored in 'stamp' (the counter then advances), ACQUIRE to the
// counters and sampler modules drops for 'acq_hold' clocks, the time the
// modules need to move the event from ring memory to stack, and then rises
// again while 'run' is set. The end of each acquisition starts that
// module's reset delay and reset pulse timers. Rate meters count each
// source and Trig-Out per PPS second. The time generator synchronises PPS
// and 10 MHz. Blocks and signals follow the document's figure; the truth
// table, hold time and gate choice are this design's own.
module trigger_manager
  import acq_pkg::*;
#(
  parameter int unsigned MARKS_PER_SEC = 10_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        trig_cnt,
  input  logic        trig_smp,
  input  logic        trig_ext,
  input  logic [7:0]  coinc_lut,
  input  logic [15:0] win_cnt,
  input  logic [15:0] win_smp,
  input  logic [15:0] win_ext,
  input  logic        cnt_en,
  input  logic        smp_en,
  input  logic [15:0] acq_hold,
  input  logic [15:0] rst_delay,
  input  logic [15:0] rst_width,
  input  logic        pps,
  input  logic        clk10m,
  input  logic        sec_load,
  input  logic [31:0] sec_val,
  output logic        trig_out,
  output logic        acq_cnt,
  output logic        acq_smp,
  output logic        rst_cnt,
  output logic        rst_smp,
  output stamp_t      stamp,
  output logic [31:0] mark_err,
  output logic [31:0] abs_time,
  output logic [31:0] mark_time,
  output logic [3:0][31:0] rates
);
  logic [2:0] win, edges;
  coinc_input u_in_cnt (.clk, .rst_n, .trig(trig_cnt), .width(win_cnt), .edge_p(edges[0]), .win(win[0]));
  coinc_input u_in_smp (.clk, .rst_n, .trig(trig_smp), .width(win_smp), .edge_p(edges[1]), .win(win[1]));
  coinc_input u_in_ext (.clk, .rst_n, .trig(trig_ext), .width(win_ext), .edge_p(edges[2]), .win(win[2]));

  logic pps_p;
  time_generator #(.MARKS_PER_SEC(MARKS_PER_SEC)) u_time (
    .clk, .rst_n, .pps, .clk10m, .sec_load, .sec_val, .abs_time, .mark_time, .mark_err, .pps_p
  );

  logic        cond, cond_q, acq;
  logic [15:0] hold;
  logic [31:0] evcnt;
  assign cond = coinc_lut[win];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cond_q <= 1'b0; acq <= 1'b0; hold <= '0; evcnt <= '0; trig_out <= 1'b0; stamp <= '0;
    end else begin
      cond_q   <= cond;
      trig_out <= 1'b0;
      if (acq && cond && !cond_q) begin
        trig_out        <= 1'b1;
        acq             <= 1'b0;
        hold            <= acq_hold;
        stamp.abs_time  <= abs_time;
        stamp.mark_time <= mark_time;
        stamp.ev_cnt    <= evcnt;
        evcnt           <= evcnt + 1'b1;
      end else if (!acq) begin
        if (hold != 0) hold <= hold - 1'b1;
        else           acq  <= run;
      end else if (!run) begin
        acq <= 1'b0;
      end
    end
  end

  assign acq_cnt = acq && cnt_en;
  assign acq_smp = acq && smp_en;

  logic acq_cnt_q, acq_smp_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_cnt_q <= 1'b0; acq_smp_q <= 1'b0;
    end else begin
      acq_cnt_q <= acq_cnt; acq_smp_q <= acq_smp;
    end
  end

  reset_timer u_rst_cnt (.clk, .rst_n, .start(acq_cnt_q && !acq_cnt), .delay(rst_delay), .width(rst_width), .rst_out(rst_cnt));
  reset_timer u_rst_smp (.clk, .rst_n, .start(acq_smp_q && !acq_smp), .delay(rst_delay), .width(rst_width), .rst_out(rst_smp));

  rate_meter u_rate0 (.clk, .rst_n, .ev(edges[0]), .gate(pps_p), .rate(rates[0]));
  rate_meter u_rate1 (.clk, .rst_n, .ev(edges[1]), .gate(pps_p), .rate(rates[1]));
  rate_meter u_rate2 (.clk, .rst_n, .ev(edges[2]), .gate(pps_p), .rate(rates[2]));
  rate_meter u_rate3 (.clk, .rst_n, .ev(trig_out), .gate(pps_p), .rate(rates[3]));
endmodule
