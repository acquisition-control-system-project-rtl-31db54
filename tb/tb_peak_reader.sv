// Testbench for peak_reader with a behavioural ADC (conversion of 5
// clocks, result = 100*channel + 7 of the channel on the mux when the
// conversion starts). Runs hit-driven reading, pre-scan, complementary
// channels, read-all and the body time word, and checks the whole record
// (header, body, footer) against values computed here, that conversions
// start exactly one slot apart (pipelined), and the total read time.
module tb_peak_reader;
  import acq_pkg::*;
  localparam int NCH = 64, CONV = 5, SLOT = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NCH-1:0] hit_smp = '0, hit_fe = '0;
  logic hit_src = 0, read_all = 0, comp_en = 0, prescan = 0, hdr_en = 1, ftr_en = 1, time_en = 0;
  logic [7:0]  slot_cycles = SLOT;
  stamp_t      stamp = '{abs_time: 32'd11, mark_time: 32'd22, ev_cnt: 32'd33};
  logic [31:0] mark_err = 32'd44, mark_now = 32'd55;
  logic [7:0]  ch_addr;
  logic        ch_clk, ch_clr, adc_start, adc_busy = 0;
  logic [15:0] adc_data = 0, rd_avail, dropped;
  logic        flush = 0, rd_en = 0, busy, done;
  logic [31:0] rd_data;
  int checks = 0, failures = 0, cyc = 0, last_start = -1, nclr = 0;
  always #2 clk = ~clk;
  peak_reader #(.NCH(NCH)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  // behavioural ADC and slot-spacing monitor
  int conv_left = 0; logic [7:0] conv_ch;
  int spacing_bad = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ch_clr) nclr++;
    if (conv_left > 0) begin
      conv_left--;
      if (conv_left == 0) begin adc_busy <= 0; adc_data <= 16'(100 * conv_ch + 7); end
    end
    if (rst_n && adc_start) begin
      conv_left = CONV; conv_ch = ch_addr; adc_busy <= 1;
      if (last_start >= 0 && cyc - last_start != SLOT) spacing_bad++;
      last_start = cyc;
    end
  end
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(string name, logic [NCH-1:0] hits, int t0, int nchk);
    int n, chl[$], sum, mx, mxa, c0, c1, idx, per;
    for (int c = 0; c < NCH; c++)
      if (read_all || hits[c] || (comp_en && hits[c ^ 1])) chl.push_back(c);
    hit_smp = hits; last_start = -1; spacing_bad = 0;
    start = 1; @(negedge clk); start = 0; c0 = cyc;
    while (!done) @(negedge clk);
    c1 = cyc;
    chk(spacing_bad == 0, {name, ": conversions one slot apart"});
    chk(c1 - c0 <= (chl.size() + 3) * SLOT + (prescan ? NCH : 0) + 20,
        $sformatf("%s: %0d channels took %0d clocks", name, chl.size(), c1 - c0));
    flush = 1; @(negedge clk); flush = 0; @(negedge clk);
    per = time_en ? 2 : 1;
    n = rd_avail;
    chk(n == 4 + per * chl.size() + 2 + 4, $sformatf("%s: words %0d", name, n));
    sum = 0; mx = 0; mxa = 0; idx = 0;
    foreach (chl[k]) begin
      sum += 100 * chl[k] + 7;
      if (100 * chl[k] + 7 > mx) begin mx = 100 * chl[k] + 7; mxa = chl[k]; end
    end
    for (int i = 0; i < n; i++) begin
      logic [31:0] e;
      if (i < 4) e = (i == 0) ? 11 : (i == 1) ? 22 : (i == 2) ? 44 : 33;
      else if (i < 4 + per * chl.size()) begin
        int k, c;
        k = (i - 4) / per; c = chl[k];
        if (time_en && (i - 4) % 2 == 0) e = 55;
        else e = {8'(c), hits[c], 7'd0, 16'(100 * c + 7)};
      end else begin
        int f;
        f = i - 4 - per * chl.size();
        case (f)
          0: e = hits[31:0]; 1: e = hits[63:32]; 2: e = sum; 3: e = mx; 4: e = mxa;
          default: e = 'x;
        endcase
        if (f == 5) begin
          chk(rd_data >= 32'(c1 - c0 - 3) && rd_data <= 32'(c1 - c0 + 1),
              $sformatf("%s: elapsed %0d vs %0d", name, rd_data, c1 - c0));
          e = rd_data;
        end
      end
      if (i < nchk || i >= 4 + per * chl.size()) chk(rd_data == e, $sformatf("%s: word %0d = %h exp %h", name, i, rd_data, e));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
  endtask
  initial begin
    logic [NCH-1:0] h;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    h = '0; h[3] = 1; h[10] = 1; h[11] = 1; h[40] = 1; h[63] = 1;
    run("hits", h, 0, 1000);
    prescan = 1; run("prescan", h, 0, 1000); prescan = 0;
    comp_en = 1; run("complementary", h, 0, 1000); comp_en = 0;
    time_en = 1; run("time word", h, 0, 1000); time_en = 0;
    read_all = 1; run("read all", h, 0, 1000); read_all = 0;
    run("no hits", '0, 0, 1000);
    chk(nclr == 6, $sformatf("peak detectors cleared %0d times", nclr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
