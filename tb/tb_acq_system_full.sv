// Full-size testbench: acq_system_top with every parameter at its default
// (64 pixels, UART at 25 clocks per bit, 10 MHz marks per second, full
// command timeout). Pins, clocks and the host, ADC and SPI models are the
// same as in the end-to-end testbench. One complete acquisition is run:
// read the lines and a configuration register, start the run, make a
// sampler trigger with 8 pixels, check Trig-Out, the ACQUIRE drop and
// restart and the acquisition reset, stop the run, flush, then read the
// sampler event header and the peak-detector words over the host link.
// Two workloads follow: one pixel pulsing at 250 MHz for 12 us must give
// 1024 counts per background-rate word (16 transfers of 256 ns), and five
// sampler triggers 10 us apart (100 kHz) must all become Trig-Outs and
// complete events with no refused peak readout.
// The PPS input is held low (a simulated second would be too long).
`timescale 1ns/1ps
module tb_acq_system_full;
  import io_cmd_pkg::*;
  localparam int NCH = 64, CPB = 25;   // the top's default UART rate
  logic clk = 1, clk_fast = 0, rst_n = 0;
  logic [3:1] clk_ph = 0;
  logic [NCH-1:0] trig_in = 0, hit_fe = 0;
  logic trig_ext_in = 0, trig_ext_out, acquire_fe, acq_reset_fe, pps = 0, clk10m = 0;
  logic host_rx = 1, host_tx;
  logic [7:0] ch_addr;
  logic ch_clk, ch_clr, adc_start, adc_busy = 0;
  logic [15:0] adc_data = 0, test_amp;
  logic spi_sclk, spi_mosi, spi_miso, spi_cs_n, i2c_scl_o, i2c_sda_o, test_pulse;
  logic [31:0] lines_in = 32'h0000_5A5A, flags;
  wire i2c_sda_i = i2c_sda_o;
  logic svc_uart_tx;
  wire  svc_uart_rx = svc_uart_tx;   // service UART looped back

  acq_system_top dut (
    .clk, .clk_ph, .clk_fast, .rst_n, .trig_in, .trig_ext_in, .trig_ext_out, .acquire_fe,
    .acq_reset_fe, .pps, .clk10m, .host_rx, .host_tx, .ch_addr, .ch_clk, .ch_clr, .adc_start,
    .adc_busy, .adc_data, .hit_fe, .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n, .i2c_scl_o,
    .i2c_sda_o, .i2c_sda_i, .svc_uart_tx, .svc_uart_rx, .test_pulse, .test_amp, .lines_in, .flags);

  // 250 MHz, four phases 90 degrees apart, 500 MHz counter clock, 10 MHz
  always #2 clk = ~clk;
  initial begin #1; forever #2 clk_ph[1] = ~clk_ph[1]; end
  initial begin #2; forever #2 clk_ph[2] = ~clk_ph[2]; end
  initial begin #3; forever #2 clk_ph[3] = ~clk_ph[3]; end
  always #1 clk_fast = ~clk_fast;
  always #50 clk10m = ~clk10m;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- mechanism counters
  int n_trig_out = 0, n_trig_cnt = 0, n_trig_smp = 0, n_ext_seen = 0, n_acq_start = 0,
      n_acq_stop = 0, n_reset = 0, n_adc = 0, n_ch_clr = 0, n_xfer = 0, n_spi = 0,
      n_i2c_start = 0, n_tp = 0, n_busy_pause = 0, n_coinc = 0, n_timeout = 0, n_flush = 0,
      n_pps = 0, n_cnt_words = 0, n_smp_words = 0, n_pk_words = 0;
  logic aq = 0, rq = 0, tq = 0, cq = 0, sq = 0, xq = 0, ppq = 0, tpq = 0;
  logic [31:0] evids[$];
  always @(posedge clk) if (rst_n) begin
    if (trig_ext_out && !tq) begin evids.push_back(n_trig_out); n_trig_out++; end
    if (dut.trig_cnt && !cq) n_trig_cnt++;
    if (dut.trig_smp && !sq) n_trig_smp++;
    if (acquire_fe && !aq) n_acq_start++;
    if (!acquire_fe && aq) n_acq_stop++;
    if (acq_reset_fe && !rq) n_reset++;
    if (dut.cnt_xfer && !xq) n_xfer++;
    if (pps && !ppq) n_pps++;
    if (test_pulse && !tpq) n_tp++;
    if (ch_clr) n_ch_clr++;
    aq = acquire_fe; rq = acq_reset_fe; tq = trig_ext_out; cq = dut.trig_cnt;
    sq = dut.trig_smp; xq = dut.cnt_xfer; ppq = pps; tpq = test_pulse;
  end
  always @(negedge i2c_sda_o) if (i2c_scl_o && rst_n) n_i2c_start++;

  // ---------------- peak ADC model: 3 busy clocks, value tagged with the channel
  always @(posedge clk) if (adc_start) begin
    automatic logic [7:0] a = ch_addr;
    n_adc++;
    adc_busy <= 1;
    repeat (3) @(posedge clk);
    adc_data <= {8'hA0, a}; adc_busy <= 0;
  end

  // ---------------- SPI slave: returns 0x5A3C, records what it received
  logic [31:0] spi_rx, spi_sh;
  always @(negedge spi_cs_n) begin spi_sh = 32'h5A3C_0000; spi_rx = 0; n_spi++; end
  assign spi_miso = spi_sh[31];
  always @(posedge spi_sclk) spi_rx = {spi_rx[30:0], spi_mosi};
  always @(negedge spi_sclk) spi_sh = {spi_sh[30:0], 1'b0};

  // ---------------- host side of the UART
  byte unsigned devq[$];
  initial begin
    logic [7:0] b;
    wait (rst_n);
    forever begin
      @(negedge host_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = host_tx; end
      repeat (CPB) @(posedge clk);
      chk(host_tx == 1, "device stop bit");
      devq.push_back(b);
    end
  end
  task automatic hsend(byte unsigned b);
    @(negedge clk);
    host_rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin host_rx = b[i]; repeat (CPB) @(negedge clk); end
    host_rx = 1; repeat (CPB + 1) @(negedge clk);
  endtask
  task automatic hget(output byte unsigned b);
    int n = 0;
    while (devq.size() == 0 && n < 20000) begin @(negedge clk); n++; end
    if (devq.size() == 0) begin b = 0; chk(0, "device byte missing"); end
    else b = devq.pop_front();
  endtask
  task automatic hexp(byte unsigned e, string m);
    byte unsigned b; hget(b); chk(b == e, $sformatf("%s: %02h, expected %02h", m, b, e));
  endtask
  task automatic hcmd(byte unsigned op, logic [15:0] addr, byte unsigned len, output logic [31:0] val);
    byte unsigned b, st;
    hsend(ATN); hexp(ATN_RET, "ATN_RET");
    hsend(op); hsend(addr[15:8]); hsend(addr[7:0]); hsend(len);
    hexp(BUSY, "BUSY"); hexp(READY, "READY"); hexp(op | 8'h80, "response op");
    hget(st); chk(st == 0, "response status");
    val = 0; repeat (4) begin hget(b); val = {val[23:0], b}; end
  endtask
  task automatic wr(logic [15:0] addr, logic [31:0] d);
    logic [31:0] v;
    hcmd(OP_WRITE, addr, 1, v); hexp(READY, "write READY");
    for (int k = 3; k >= 0; k--) hsend(d[8*k +: 8]);
    hexp(READY, "write end");
  endtask
  task automatic rd(logic [15:0] addr, int n, bit fix, bit pause, ref logic [31:0] w[$]);
    logic [31:0] v; byte unsigned b;
    hcmd(fix ? OP_READ_FIX : OP_READ, addr, 8'(n), v);
    hexp(BUSY, "read BUSY"); hexp(READY, "read READY");
    for (int i = 0; i < n; i++) begin
      v = 0;
      for (int k = 0; k < 4; k++) begin
        hget(b); v = {v[23:0], b};
        if (pause && i == 1 && k == 0) begin
          int n0;
          hsend(BUSY); repeat (100) @(negedge clk); n0 = devq.size();
          repeat (300) @(negedge clk);
          if (devq.size() == n0) n_busy_pause++;
          hsend(READY);
        end
      end
      w.push_back(v);
    end
    hexp(READY, "read end");
  endtask
  task automatic rd1(logic [15:0] addr, output logic [31:0] v);
    logic [31:0] w[$]; rd(addr, 1, 1, 0, w); v = w[0];
  endtask
  task automatic flag(int f, bit on);
    logic [31:0] v; hcmd(on ? OP_SET_FLAG : OP_CLR_FLAG, 16'(f), 0, v);
  endtask

  // ---------------- stimulus helpers
  task automatic smp_hit(int first, int n);   // n adjacent pixels, 3 ns pulse
    @(posedge clk); #0.5;
    for (int i = 0; i < n; i++) trig_in[first + i] = 1;
    #3;
    for (int i = 0; i < n; i++) trig_in[first + i] = 0;
  endtask
  task automatic burst(int first, int n, int pulses);  // 4 ns high / 4 ns low
    repeat (pulses) begin
      for (int i = 0; i < n; i++) trig_in[first + i] = 1; #4;
      for (int i = 0; i < n; i++) trig_in[first + i] = 0; #4;
    end
  endtask
  task automatic wait_rearm();
    int n = 0;
    while (!acquire_fe && n < 20000) begin @(negedge clk); n++; end
    repeat (200) @(negedge clk);
  endtask

  // empty one stack: read its word count and pop that many, until zero
  task automatic drain(logic [15:0] cnt_addr, logic [15:0] pop_addr);
    logic [31:0] v; logic [31:0] w[$];
    for (int k = 0; k < 8; k++) begin
      rd1(cnt_addr, v);
      if (v == 0) break;
      w.delete(); rd(pop_addr, (v > 255) ? 255 : v, 1, 0, w);
    end
  endtask
  task automatic drain_all();
    flag(1, 1); repeat (10) @(negedge clk); flag(1, 0);
    drain(16'h0201, 16'h0200); drain(16'h0301, 16'h0300); drain(16'h0103, 16'h0101);
    flag(1, 1); repeat (10) @(negedge clk); flag(1, 0);
    drain(16'h0201, 16'h0200); drain(16'h0301, 16'h0300); drain(16'h0103, 16'h0101);
  endtask
  logic fast_on = 0;
  always #2 if (fast_on) trig_in[5] = ~trig_in[5]; else trig_in[5] = 0;

  initial begin
    #4000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    logic [31:0] w[$];
    int n, cmax, ntr;
    repeat (5) @(negedge clk); rst_n = 1; repeat (20) @(negedge clk);
    hcmd(OP_RD_LINES, 0, 0, v);  chk(v == lines_in, "lines read");
    rd1(16'd6, v); chk(v == 32'h0000_1808, "config reset value");
    flag(0, 1);
    repeat (50) @(negedge clk);
    chk(acquire_fe, "ACQUIRE after run flag");
    n = n_trig_out; smp_hit(20, 8);
    repeat (40) @(negedge clk);
    chk(n_trig_out == n + 1 && n_trig_smp >= 1, "sampler trigger made Trig-Out");
    chk(!acquire_fe, "ACQUIRE dropped after trigger");
    wait_rearm();
    chk(acquire_fe && n_reset >= 1, "ACQUIRE restarted, reset pulse sent");
    flag(0, 0); repeat (400) @(negedge clk);
    flag(1, 1); repeat (10) @(negedge clk); flag(1, 0);
    rd1(16'h0201, v); n_smp_words = v;
    chk(v >= 4, $sformatf("sampler event words %0d", v));
    w.delete(); rd(16'h0200, 4, 1, 0, w);
    chk(w[2] == 0, $sformatf("first event id %0d", w[2]));
    chk(w[3][31] == 1 && w[3][17:16] == dut.trig_phase, "sampler info word: trigger seen and phase");
    rd1(16'h0301, v); n_pk_words = v;
    chk(v > 0, $sformatf("peak words %0d", v));
    w.delete(); rd(16'h0300, (v > 8) ? 8 : v, 1, 0, w);
    n = 0;
    foreach (w[i]) if (w[i][15:8] == 8'hA0 && w[i][31:24] == w[i][7:0]) n++;
    chk(n > 0, $sformatf("peak data words tagged with their channel (%0d)", n));
    // workload: photon counting at 250 MHz on one pixel (2 ns high, 2 ns low)
    wr(16'd3, 32'd5);
    drain_all();
    flag(0, 1); repeat (20) @(negedge clk);
    n = n_trig_out;
    #0.5 fast_on = 1; #12000; fast_on = 0;
    repeat (20) @(negedge clk);
    flag(0, 0); repeat (400) @(negedge clk);
    chk(n_trig_out == n, "one fast pixel makes no trigger");
    flag(1, 1); repeat (10) @(negedge clk); flag(1, 0);
    rd1(16'h0103, v);
    chk(v >= 2, $sformatf("rate words %0d", v));
    w.delete(); if (v != 0) rd(16'h0101, v, 1, 0, w);
    cmax = 0; foreach (w[i]) if (w[i] > cmax) cmax = w[i];
    // 16 transfers of 64 clocks at 4 ns = 4.096 us -> 1024 pulses at 250 MHz
    chk(cmax >= 1023 && cmax <= 1025, $sformatf("250 MHz pixel: %0d counts per rate word, expected 1024", cmax));
    hcmd(OP_RD_STATUS, 0, 0, v); chk(v[11] == 0, "no signal loss at 250 MHz");
    // workload: 100 kHz trigger rate, five sampler triggers 10 us apart
    drain_all();
    flag(0, 1); repeat (20) @(negedge clk);
    n = n_trig_out;
    repeat (5) begin smp_hit(30, 8); #10000; end
    ntr = n_trig_out - n;
    chk(ntr == 5, $sformatf("100 kHz: %0d of 5 triggers taken", ntr));
    flag(0, 0); repeat (400) @(negedge clk);
    flag(1, 1); repeat (10) @(negedge clk); flag(1, 0);
    // five triggered events plus the one closed by stopping the run
    rd1(16'h0201, v); chk(v == 6 * 68, $sformatf("100 kHz: sampler words %0d, expected %0d", v, 6 * 68));
    w.delete(); rd(16'h0200, 204, 1, 0, w); rd(16'h0200, 204, 1, 0, w);
    n = 0; for (int e = 0; e < 6; e++) if (w[68 * e + 3][31]) n++;
    chk(n == 5, $sformatf("100 kHz: %0d events flagged as triggered", n));
    rd1(16'h0302, v); chk(v == 0, "100 kHz: no peak readout refused");
    $display("workloads: 250 MHz counting -> %0d per rate word; 100 kHz -> %0d of 5 triggers", cmax, ntr);
    $display("mechanisms: trig_out=%0d sampler_trig=%0d acquire_start=%0d acquire_stop=%0d reset_pulse=%0d",
             n_trig_out, n_trig_smp, n_acq_start, n_acq_stop, n_reset);
    $display("mechanisms: adc_conv=%0d ch_clr=%0d counter_xfer=%0d words smp/pk=%0d/%0d",
             n_adc, n_ch_clr, n_xfer, n_smp_words, n_pk_words);
    chk(n_trig_out == 6 && n_acq_stop >= 1 && n_adc > 0 && n_ch_clr > 0 && n_xfer > 0,
        "every exercised mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
