// End-to-end testbench for acq_system_top, driven only through its pins.
// A host model talks to the device over the UART (4 clocks per bit here)
// with the ATN / COMMAND / RESPONSE / PAYLOAD protocol, a peak-ADC model
// answers the peak reader, an SPI slave answers the SPI master, the I2C
// lines are left without a slave, and a PPS/10 MHz source runs with a
// scaled second (200 marks). Scenario: configure, start the run, then make
// a sampler trigger (8 pixels together), a counter trigger (16 pixels at a
// high rate, truth table set to the counters only), an external trigger,
// a counters AND sampler coincidence, flush and read back all three event
// stacks with a BUSY pause inside a READ payload, use SPI, I2C, the looped-back
// service UART and the test pulser, read time and rates, and provoke a command timeout. Every
// mechanism is counted and printed; any mechanism that never happened is a
// failure, as is any mismatch in the data read back.
`timescale 1ns/1ps
module tb_acq_system_top;
  import io_cmd_pkg::*;
  localparam int NCH = 64, CPB = 4;
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

  acq_system_top #(.NCH(NCH), .CLKS_PER_BIT(CPB), .MARKS_PER_SEC(200), .TIMEOUT(3000)) dut (
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
  initial forever begin #19800 pps = 1; #200 pps = 0; end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- mechanism counters
  int n_trig_out = 0, n_trig_cnt = 0, n_trig_smp = 0, n_ext_seen = 0, n_acq_start = 0,
      n_acq_stop = 0, n_reset = 0, n_adc = 0, n_ch_clr = 0, n_xfer = 0, n_spi = 0,
      n_i2c_start = 0, n_tp = 0, n_busy_pause = 0, n_coinc = 0, n_timeout = 0, n_flush = 0,
      n_pps = 0, n_svc_uart = 0, n_cnt_words = 0, n_smp_words = 0, n_pk_words = 0;
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

  initial begin
    #3000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v, t0;
    logic [31:0] w[$];
    int n;
    repeat (5) @(negedge clk); rst_n = 1; repeat (20) @(negedge clk);
    hcmd(OP_RD_LINES, 0, 0, v);  chk(v == lines_in, "lines read");
    hcmd(OP_RD_STATUS, 0, 0, v); chk(v[10:9] == 0, "not acquiring after reset");
    rd1(16'd4, v); chk(v == 32'h0104_0804, "config reset value");
    // configuration: OR of the sampler and counter triggers, ext trigger ignored,
    // wide coincidence windows, shorter acquire hold
    wr(16'd7, 32'h0000_03CC);
    wr(16'd8, 32'h0100_0100);
    wr(16'd9, 32'h0100_0010);
    wr(16'd10, 32'h0008_0004);
    wr(16'd2, 32'h0000_0100);
    flag(0, 1);
    repeat (50) @(negedge clk);
    chk(acquire_fe, "ACQUIRE after run flag");
    // 1. sampler trigger: 8 pixels together
    n = n_trig_out; smp_hit(8, 8);
    repeat (40) @(negedge clk);
    chk(n_trig_out == n + 1 && n_trig_smp >= 1, "sampler trigger made Trig-Out");
    chk(!acquire_fe, "ACQUIRE dropped after trigger");
    wait_rearm();
    chk(n_adc >= 8, $sformatf("peak reader converted %0d channels", n_adc));
    // 2. counter trigger: 16 pixels at 125 MHz, only the counters in the table
    wr(16'd7, 32'h0000_03AA);
    n = n_trig_out; burst(32, 16, 120);
    repeat (40) @(negedge clk);
    chk(n_trig_cnt >= 1 && n_trig_out >= n + 1, "counter (slow) trigger made Trig-Out");
    wait_rearm();
    // 3. external trigger
    wr(16'd7, 32'h0000_03F0);
    n = n_trig_out;
    @(negedge clk); trig_ext_in = 1; repeat (3) @(negedge clk); trig_ext_in = 0;
    repeat (40) @(negedge clk);
    if (n_trig_out == n + 1) n_ext_seen++;
    chk(n_ext_seen == 1, "external trigger made Trig-Out");
    wait_rearm();
    // 4. coincidence: counters AND sampler
    wr(16'd7, 32'h0000_0388);
    n = n_trig_out; smp_hit(0, 8);
    repeat (300) @(negedge clk);
    chk(n_trig_out == n, "AND: sampler alone is not enough");
    fork burst(40, 16, 120); join
    repeat (40) @(negedge clk);
    if (n_trig_out > n) n_coinc++;
    chk(n_coinc == 1, "counters AND sampler coincidence");
    wait_rearm();
    // 5. stop the run, flush, read back the stacks
    flag(0, 0); repeat (400) @(negedge clk);
    chk(!acquire_fe, "run stopped");
    flag(1, 1); n_flush++; repeat (10) @(negedge clk); flag(1, 0);
    rd1(16'h0102, v); n_cnt_words = v;
    chk(v >= 3 + 16, $sformatf("counter event words %0d", v));
    w.delete(); rd(16'h0100, 19, 1, 1, w);
    chk(evids.size() > 0 && w[2] inside {evids}, $sformatf("counter event header ev_cnt %0d", w[2]));
    rd1(16'h0103, v); chk(v > 0, $sformatf("counter rate words %0d", v));
    rd1(16'h0201, v); n_smp_words = v;
    chk(v >= 4, $sformatf("sampler event words %0d", v));
    w.delete(); rd(16'h0200, 4, 1, 0, w);
    chk(w[2] inside {evids}, $sformatf("sampler event header ev_cnt %0d", w[2]));
    rd1(16'h0301, v); n_pk_words = v;
    chk(v > 0, $sformatf("peak words %0d", v));
    w.delete(); rd(16'h0300, (v > 12) ? 12 : v, 1, 0, w);
    n = 0;
    foreach (w[i]) if (w[i][15:8] == 8'hA0 && w[i][31:24] == w[i][7:0]) n++;
    chk(n > 0, $sformatf("peak data words tagged with their channel (%0d)", n));
    rd1(16'h0302, v); chk(v == 0, "no peak readout dropped");
    hcmd(OP_RD_STATUS, 0, 0, v); chk(v[11] == 0, "no counter loss flagged");
    // 6. service controllers
    wr(16'd13, 32'h0000_00C5); wr(16'd14, 32'h0004_0108);
    flag(4, 1); repeat (100) @(negedge clk); flag(4, 0);
    chk(spi_rx[7:0] == 8'hC5, $sformatf("SPI slave got %02h", spi_rx[7:0]));
    rd1(16'h0500, v); chk(v == 32'h5A, $sformatf("SPI read %h", v));
    wr(16'd15, 32'h0000_0000); flag(5, 1); repeat (100) @(negedge clk); flag(5, 0);
    wr(16'd15, 32'h0000_A002); flag(5, 1); repeat (200) @(negedge clk); flag(5, 0);
    rd1(16'h0501, v); chk(v[8] == 1, "I2C: no slave, no ACK");
    wr(16'd15, 32'h0000_0001); flag(5, 1); repeat (100) @(negedge clk); flag(5, 0);
    wr(16'd17, 32'h0000_00E7); flag(7, 1); repeat (100) @(negedge clk); flag(7, 0);
    rd1(16'h0502, v); if (v == 32'h0001_00E7) n_svc_uart++;
    chk(v == 32'h0001_00E7, $sformatf("service UART loop-back %h", v));
    wr(16'd12, 32'h0800_0003); n = n_tp;
    flag(2, 1); repeat (400) @(negedge clk); flag(2, 0);
    chk(n_tp == n + 3, $sformatf("test pulses %0d", n_tp - n));
    // 7. time and rates
    wr(16'd16, 32'd1000);
    t0 = n_pps; while (n_pps == t0) @(negedge clk);   // keep the next PPS out of the way
    flag(6, 1); flag(6, 0);
    rd1(16'h0400, v); chk(v == 1000, $sformatf("seconds preset %0d", v));
    t0 = n_pps; while (n_pps == t0) @(negedge clk); repeat (20) @(negedge clk);
    rd1(16'h0400, v); chk(v == 1001, $sformatf("seconds advance %0d", v));
    rd1(16'h0402, v); chk(v == 0, $sformatf("mark error %0d", v));
    // 8. command timeout, then the link works again
    hsend(ATN); hexp(ATN_RET, "ATN_RET"); hsend(OP_RD_LINES);
    repeat (4000) @(negedge clk);
    n_timeout = dut.u_comm.timeouts;
    hcmd(OP_RD_LINES, 0, 0, v); chk(v == lines_in, "link after timeout");

    $display("mechanisms: trig_out=%0d counter_trig=%0d sampler_trig=%0d ext_trig=%0d coincidence=%0d",
             n_trig_out, n_trig_cnt, n_trig_smp, n_ext_seen, n_coinc);
    $display("mechanisms: acquire_start=%0d acquire_stop=%0d reset_pulse=%0d counter_xfer=%0d",
             n_acq_start, n_acq_stop, n_reset, n_xfer);
    $display("mechanisms: adc_conv=%0d ch_clr=%0d flush=%0d busy_pause=%0d timeout=%0d pps=%0d",
             n_adc, n_ch_clr, n_flush, n_busy_pause, n_timeout, n_pps);
    $display("mechanisms: spi=%0d i2c_start=%0d service_uart=%0d test_pulse=%0d words cnt/smp/pk=%0d/%0d/%0d",
             n_spi, n_i2c_start, n_svc_uart, n_tp, n_cnt_words, n_smp_words, n_pk_words);
    chk(n_trig_out > 0 && n_trig_cnt > 0 && n_trig_smp > 0 && n_ext_seen > 0 && n_coinc > 0,
        "every trigger mechanism happened");
    chk(n_acq_start > 1 && n_acq_stop > 1 && n_reset > 1 && n_xfer > 0, "acquisition mechanisms happened");
    chk(n_adc > 0 && n_ch_clr > 0 && n_flush > 0 && n_busy_pause > 0 && n_timeout > 0 && n_pps > 0,
        "readout and link mechanisms happened");
    chk(n_spi > 0 && n_i2c_start >= 1 && n_svc_uart > 0 && n_tp > 0, "service mechanisms happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
