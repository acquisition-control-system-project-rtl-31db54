// Acquisition and control system for a 64-pixel cosmic-ray detector.
// The 64 front-end trigger lines feed the counters module (fast photon
// counting, slow trigger for long events) and the sampler module (1 GS/s
// four-phase sampling, pixel-majority trigger for nanosecond events, hit
// info). The trigger manager forms Trig-Out from the two module triggers
// and an external trigger, timestamps it, and drives ACQUIRE and the
// acquisition reset. At the end of every sampler acquisition the peak
// reader reads the front-end peak detectors through the external mux and
// ADC. The host talks over a UART to the communication controller, which
// configures everything through the configuration registers and flags and
// unloads the event stacks over the device bus. SPI, I2C, a second (service)
// UART and the test-pulse controller serve the instrument's service
// electronics.
// Clocks: 'clk' is the 250 MHz system clock and phase 0 of the sampler,
// clk_ph[1..3] are the same frequency shifted by 90, 180 and 270 degrees,
// 'clk_fast' is the 500 MHz counter clock. 'clk10m'/'pps' come from an
// external time reference. The partitioning follows the document's system
// figure; the register and address map below and the UART host link are
// this design's own.
//
// Configuration registers (word address = register number):
//   0 [15:0] counter transfer period, [31:16] ticks per rate word
//   1 [6:0]  counter event length, [13:8] counter event offset
//   2 [13:0] slow trigger threshold, [18:16] log2 average length, [29:24] delay
//   3 [5:0]  counter channel for stack readout
//   4 [6:0]  majority threshold, [13:8] sampler event rows, [21:16] row offset,
//     [25:24] hit mode, [26] hit window enable
//   5 [15:0] hit window length
//   6 [7:0]  peak slot clocks, [8] read all, [9] complementary, [10] pre-scan,
//     [11] header, [12] footer, [13] body time word, [14] front-end hits
//   7 [7:0]  coincidence truth table, [8] counters enable, [9] sampler enable
//   8 counter window [15:0], sampler window [31:16]
//   9 external window [15:0], acquire hold [31:16]
//  10 reset delay [15:0], reset width [31:16]
//  11 test pulse width [15:0], period [31:16]
//  12 test pulse count [15:0], amplitude [31:16]
//  13 SPI write data; 14 [5:0] SPI length, [15:8] SPI divider, [23:16] I2C divider
//  15 [1:0] I2C command, [2] I2C nack, [15:8] I2C write byte; 16 seconds preset
//  17 [7:0] byte to send on the service UART
// Flags: 0 run, 1 flush stacks, 2 test pulse start, 3 test pulse stop,
//   4 SPI start, 5 I2C command, 6 load seconds, 7 service UART send
//   (2, 4, 5, 6, 7 act on rising edge)
// Read-only addresses: 0x100 counter event pop, 0x101 rate pop, 0x102/0x103
//   their word counts, 0x104 slow-trigger average; 0x200 sampler pop, 0x201
//   count, 0x202/0x203 hit info; 0x300 peak pop, 0x301 count, 0x302 dropped;
//   0x400 seconds, 0x401 tenths of us, 0x402 shift error, 0x403-0x405 last
//   stamp, 0x408-0x40B trigger rates; 0x500 SPI read data, 0x501 I2C result,
//   0x502 service UART {received byte count [31:16], last byte [7:0]}.
module acq_system_top
  import acq_pkg::*;
#(
  parameter int unsigned NCH           = 64,
  parameter int unsigned CLKS_PER_BIT  = 25,
  parameter int unsigned MARKS_PER_SEC = 10_000_000,
  parameter int unsigned TIMEOUT       = 250_000
) (
  input  logic           clk,
  input  logic [3:1]     clk_ph,
  input  logic           clk_fast,
  input  logic           rst_n,
  input  logic [NCH-1:0] trig_in,
  input  logic           trig_ext_in,
  output logic           trig_ext_out,
  output logic           acquire_fe,
  output logic           acq_reset_fe,
  input  logic           pps,
  input  logic           clk10m,
  input  logic           host_rx,
  output logic           host_tx,
  output logic [7:0]     ch_addr,
  output logic           ch_clk,
  output logic           ch_clr,
  output logic           adc_start,
  input  logic           adc_busy,
  input  logic [15:0]    adc_data,
  input  logic [NCH-1:0] hit_fe,
  output logic           spi_sclk,
  output logic           spi_mosi,
  input  logic           spi_miso,
  output logic           spi_cs_n,
  output logic           i2c_scl_o,
  output logic           i2c_sda_o,
  input  logic           i2c_sda_i,
  output logic           svc_uart_tx,
  input  logic           svc_uart_rx,
  output logic           test_pulse,
  output logic [15:0]    test_amp,
  input  logic [31:0]    lines_in,
  output logic [31:0]    flags
);
  localparam int unsigned CHW = $clog2(NCH);
  localparam logic [31:0][31:0] CFG_RESET = {
    32'd0, 32'd0, 32'd0, 32'd0, 32'd0, 32'd0, 32'd0, 32'd0,   // 31..24
    32'd0, 32'd0, 32'd0, 32'd0, 32'd0, 32'd0, 32'd0,          // 23..17
    32'd0,                                                    // 16 seconds
    32'h0000_0000,                                            // 15 I2C
    32'h0004_0420,                                            // 14 SPI/I2C
    32'd0,                                                    // 13
    32'h0800_0000,                                            // 12 tp count 0, amp
    32'h0040_0004,                                            // 11 tp width/period
    32'h0002_0000,                                            // 10 reset
    32'h0200_0010,                                            //  9 ext win, hold
    32'h0010_0010,                                            //  8 windows
    32'h0000_03FE,                                            //  7 OR of all, both on
    32'h0000_1808,                                            //  6 slot 8, hdr, ftr
    32'h0000_0000,                                            //  5
    32'h0104_0804,                                            //  4 thr 4, 8 rows, off 4, mode 1
    32'h0000_0000,                                            //  3
    32'h0000_0100,                                            //  2 thr 256
    32'h0000_0010,                                            //  1 ev len 16
    32'h0010_0040                                             //  0 period 64, 16 ticks
  };

  // ----- host link and communication controller
  logic        rx_v, tx_v, tx_rdy;
  logic [7:0]  rx_d, tx_d;
  logic [15:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata, status;
  logic        bus_we, bus_re;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_urx (.clk, .rst_n, .rx(host_rx), .valid(rx_v), .data(rx_d), .frame_err());
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_utx (.clk, .rst_n, .valid(tx_v), .data(tx_d), .ready(tx_rdy), .tx(host_tx));

  io_comm_controller #(.TIMEOUT(TIMEOUT), .NFLAGS(32)) u_comm (
    .clk, .rst_n, .rx_valid(rx_v), .rx_data(rx_d), .tx_valid(tx_v), .tx_data(tx_d), .tx_ready(tx_rdy),
    .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .flags, .lines(lines_in), .status,
    .timeouts(), .in_transaction()
  );

  logic [31:0][31:0] cfg;
  cfg_regs #(.N(32), .RESET(CFG_RESET)) u_cfg (
    .clk, .rst_n, .we(bus_we), .waddr(bus_addr), .wdata(bus_wdata), .re(1'b0), .raddr('0),
    .rdata(), .regs(cfg)
  );

  logic [31:0] flags_q;
  logic [31:0] flag_rise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= '0;
    else        flags_q <= flags;
  end
  assign flag_rise = flags & ~flags_q;

  // ----- trigger manager
  stamp_t      stamp;
  logic        acq_cnt, acq_smp, rst_cnt, rst_smp, trig_out;
  logic        trig_cnt, trig_smp;
  logic [31:0] mark_err, abs_time, mark_time;
  logic [3:0][31:0] rates;

  trigger_manager #(.MARKS_PER_SEC(MARKS_PER_SEC)) u_tm (
    .clk, .rst_n, .run(flags[0]), .trig_cnt, .trig_smp, .trig_ext(trig_ext_in),
    .coinc_lut(cfg[7][7:0]), .win_cnt(cfg[8][15:0]), .win_smp(cfg[8][31:16]), .win_ext(cfg[9][15:0]),
    .cnt_en(cfg[7][8]), .smp_en(cfg[7][9]), .acq_hold(cfg[9][31:16]),
    .rst_delay(cfg[10][15:0]), .rst_width(cfg[10][31:16]),
    .pps, .clk10m, .sec_load(flag_rise[6]), .sec_val(cfg[16]),
    .trig_out, .acq_cnt, .acq_smp, .rst_cnt, .rst_smp, .stamp, .mark_err, .abs_time, .mark_time, .rates
  );
  assign trig_ext_out = trig_out;
  assign acquire_fe   = acq_cnt | acq_smp;
  assign acq_reset_fe = rst_cnt | rst_smp;

  // ----- counters module
  logic        cnt_ev_rd, cnt_rt_rd, cnt_busy, cnt_xfer;
  logic [31:0] cnt_ev_data, cnt_rt_data;
  logic [15:0] cnt_ev_avail, cnt_rt_avail;
  logic [NCH-1:0] loss;
  logic [8+CHW-1:0] average;

  counters_module #(.NCH(NCH)) u_cnt (
    .clk, .clk_fast, .rst_n, .trig_in, .acq(acq_cnt), .period(cfg[0][15:0]), .rate_ticks(cfg[0][31:16]),
    .ev_len(cfg[1][6:0]), .ev_offset(cfg[1][13:8]), .avg_log2(cfg[2][18:16]), .thr(cfg[2][8+CHW-1:0]),
    .delay(cfg[2][29:24]), .stamp, .flush(flags[1]), .rd_ch(cfg[3][CHW-1:0]),
    .ev_rd(cnt_ev_rd), .ev_data(cnt_ev_data), .ev_avail(cnt_ev_avail),
    .rt_rd(cnt_rt_rd), .rt_data(cnt_rt_data), .rt_avail(cnt_rt_avail),
    .loss, .average, .trigger(), .trigger_dly(trig_cnt), .xfer(cnt_xfer), .busy(cnt_busy)
  );

  // ----- sampler module
  logic           smp_rd, smp_busy, hit_active;
  logic [31:0]    smp_data;
  logic [15:0]    smp_avail;
  logic [NCH-1:0] hit_info;
  logic [1:0]     trig_phase;
  logic           acq_smp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acq_smp_q <= 1'b0;
    else        acq_smp_q <= acq_smp;
  end

  sampler_module #(.NCH(NCH)) u_smp (
    .clk_ph({clk_ph, clk}), .rst_n, .trig_in, .acq(acq_smp), .thr(cfg[4][$clog2(NCH+1)-1:0]),
    .ev_rows_in(cfg[4][13:8]), .ev_offset(cfg[4][21:16]), .hit_mode(cfg[4][25:24]), .win_en(cfg[4][26]),
    .win_len(cfg[5][15:0]), .hit_clr(acq_smp && !acq_smp_q), .stamp, .flush(flags[1]),
    .rd_en(smp_rd), .rd_data(smp_data), .rd_avail(smp_avail), .trigger(trig_smp), .trig_phase,
    .hit_info, .hit_active, .busy(smp_busy)
  );

  // ----- peak reader, started at the end of each sampler acquisition
  logic        pk_rd, pk_busy;
  logic [31:0] pk_data;
  logic [15:0] pk_avail, pk_dropped;

  peak_reader #(.NCH(NCH)) u_pk (
    .clk, .rst_n, .start(acq_smp_q && !acq_smp), .hit_smp(hit_info), .hit_fe, .hit_src(cfg[6][14]),
    .read_all(cfg[6][8]), .comp_en(cfg[6][9]), .prescan(cfg[6][10]), .hdr_en(cfg[6][11]),
    .ftr_en(cfg[6][12]), .time_en(cfg[6][13]), .slot_cycles(cfg[6][7:0]), .stamp, .mark_err,
    .mark_now(mark_time), .ch_addr, .ch_clk, .ch_clr, .adc_start, .adc_busy, .adc_data,
    .flush(flags[1]), .rd_en(pk_rd), .rd_data(pk_data), .rd_avail(pk_avail), .busy(pk_busy),
    .done(), .dropped(pk_dropped)
  );

  // ----- service controllers
  logic        spi_busy, i2c_busy, i2c_ack, tp_busy;
  logic [31:0] spi_rdata;
  logic [7:0]  i2c_rbyte;

  spi_master u_spi (
    .clk, .rst_n, .start(flag_rise[4]), .wdata(cfg[13]), .len(cfg[14][5:0]), .div(cfg[14][15:8]),
    .rdata(spi_rdata), .busy(spi_busy), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n)
  );
  i2c_master u_i2c (
    .clk, .rst_n, .cmd_valid(flag_rise[5]), .cmd(cfg[15][1:0]), .wbyte(cfg[15][15:8]), .nack(cfg[15][2]),
    .div(cfg[14][23:16]), .busy(i2c_busy), .rbyte(i2c_rbyte), .ack(i2c_ack),
    .scl_o(i2c_scl_o), .sda_o(i2c_sda_o), .sda_i(i2c_sda_i)
  );
  test_pulse_gen u_tp (
    .clk, .rst_n, .start(flag_rise[2]), .stop(flags[3]), .width(cfg[11][15:0]), .period(cfg[11][31:16]),
    .count(cfg[12][15:0]), .amp(cfg[12][31:16]), .pulse(test_pulse), .amp_out(test_amp), .busy(tp_busy),
    .sent()
  );

  // service UART: one byte per flag 7 edge; received bytes are counted and
  // the last one is kept
  logic        svc_pend, svc_rdy, svc_rv;
  logic [7:0]  svc_rbyte, svc_rd;
  logic [15:0] svc_rcnt;
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_svc_tx (.clk, .rst_n, .valid(svc_pend), .data(cfg[17][7:0]),
    .ready(svc_rdy), .tx(svc_uart_tx));
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_svc_rx (.clk, .rst_n, .rx(svc_uart_rx), .valid(svc_rv),
    .data(svc_rd), .frame_err());
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      svc_pend <= 1'b0; svc_rbyte <= '0; svc_rcnt <= '0;
    end else begin
      if (flag_rise[7])          svc_pend <= 1'b1;
      else if (svc_pend && svc_rdy) svc_pend <= 1'b0;
      if (svc_rv) begin svc_rbyte <= svc_rd; svc_rcnt <= svc_rcnt + 1'b1; end
    end
  end

  // ----- status word and device bus read side
  assign status = {20'd0, |loss, acq_smp, acq_cnt, tp_busy, i2c_busy, spi_busy,
                   pk_busy, smp_busy, cnt_busy, hit_active, smp_avail != 0, pk_avail != 0};

  // a pop of an empty stack returns 0 and is not passed on
  assign cnt_ev_rd = bus_re && bus_addr == 16'h0100 && cnt_ev_avail != 0;
  assign cnt_rt_rd = bus_re && bus_addr == 16'h0101 && cnt_rt_avail != 0;
  assign smp_rd    = bus_re && bus_addr == 16'h0200 && smp_avail != 0;
  assign pk_rd     = bus_re && bus_addr == 16'h0300 && pk_avail != 0;

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    if (bus_addr < 16'd32) rd_mux = cfg[bus_addr[4:0]];
    else case (bus_addr)
      16'h0100: rd_mux = (cnt_ev_avail != 0) ? cnt_ev_data : '0;
      16'h0101: rd_mux = (cnt_rt_avail != 0) ? cnt_rt_data : '0;
      16'h0102: rd_mux = 32'(cnt_ev_avail);
      16'h0103: rd_mux = 32'(cnt_rt_avail);
      16'h0104: rd_mux = 32'(average);
      16'h0200: rd_mux = (smp_avail != 0) ? smp_data : '0;
      16'h0201: rd_mux = 32'(smp_avail);
      16'h0202: rd_mux = 32'(hit_info);
      16'h0203: rd_mux = 32'(hit_info >> 32);
      16'h0300: rd_mux = (pk_avail != 0) ? pk_data : '0;
      16'h0301: rd_mux = 32'(pk_avail);
      16'h0302: rd_mux = 32'(pk_dropped);
      16'h0400: rd_mux = abs_time;
      16'h0401: rd_mux = mark_time;
      16'h0402: rd_mux = mark_err;
      16'h0403: rd_mux = stamp.abs_time;
      16'h0404: rd_mux = stamp.mark_time;
      16'h0405: rd_mux = stamp.ev_cnt;
      16'h0408: rd_mux = rates[0];
      16'h0409: rd_mux = rates[1];
      16'h040A: rd_mux = rates[2];
      16'h040B: rd_mux = rates[3];
      16'h0500: rd_mux = spi_rdata;
      16'h0501: rd_mux = {23'd0, i2c_ack, i2c_rbyte};
      16'h0502: rd_mux = {svc_rcnt, 8'd0, svc_rbyte};
      default:  rd_mux = 32'hDEAD_BEEF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bus_rdata <= '0;
    else if (bus_re) bus_rdata <= rd_mux;
  end
endmodule
