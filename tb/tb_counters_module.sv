// Testbench for counters_module (8 channels): random trigger pulses on the
// fast clock; after ACQUIRE falls, each channel's event must hold count
// words whose sum equals the number of leading edges the testbench made in
// that channel. Also checks the slow trigger fires, a stuck-high channel
// raises its loss flag, and the per-channel readout mux.
module tb_counters_module;
  import acq_pkg::*;
  localparam int NCH = 8;
  logic clk = 0, clk_fast = 0, rst_n = 0, acq = 0, flush = 0, ev_rd = 0, rt_rd = 0;
  logic [NCH-1:0] trig_in = '0, loss;
  logic [15:0] period = 16, rate_ticks = 4, ev_avail, rt_avail;
  logic [6:0]  ev_len = 32;
  logic [5:0]  ev_offset = 0, delay = 2;
  logic [2:0]  avg_log2 = 1;
  logic [10:0] thr = 11'd12, average;
  stamp_t      stamp = '{abs_time: 32'd9, mark_time: 32'd99, ev_cnt: 32'd3};
  logic [2:0]  rd_ch = 0;
  logic [31:0] ev_data, rt_data;
  logic        trigger, trigger_dly, xfer, busy;
  int checks = 0, failures = 0, edges[NCH], ntrig = 0, nxfer = 0;
  bit gen = 0;
  always #1 clk_fast = ~clk_fast;
  always #2 clk = ~clk;
  counters_module #(.NCH(NCH), .RING(64), .EV_DEPTH(128), .RT_DEPTH(16)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (trigger) ntrig++;
    if (xfer) nxfer++;
  end
  // pulse generator: high 2-3 fast clocks, low at least 2
  for (genvar c = 0; c < NCH; c++) begin : g_gen
    initial begin
      edges[c] = 0;
      forever begin
        @(negedge clk_fast);
        if (gen && $urandom_range(0, 9) < c + 1) begin
          trig_in[c] = 1; edges[c]++;
          repeat ($urandom_range(2, 3)) @(negedge clk_fast);
          trig_in[c] = 0;
          repeat (2) @(negedge clk_fast);
        end
      end
    end
  end
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; acq = 1;
    repeat (16 * 10) @(negedge clk);
    gen = 1;
    repeat (16 * 20) @(negedge clk);
    gen = 0;
    repeat (16 * 8) @(negedge clk);
    acq = 0;
    repeat (200) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0; @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      int n, s;
      rd_ch = 3'(c); @(negedge clk);
      n = ev_avail; s = 0;
      chk(n == 3 + 32, $sformatf("ch %0d event words %0d", c, n));
      for (int i = 0; i < n; i++) begin
        if (i == 0) chk(ev_data == 9, "header seconds");
        if (i == 2) chk(ev_data == 3, "header event counter");
        if (i >= 3) s += int'(ev_data);
        ev_rd = 1; @(negedge clk); ev_rd = 0;
      end
      chk(s == edges[c], $sformatf("ch %0d counted %0d, made %0d", c, s, edges[c]));
      chk(rt_avail == 9, $sformatf("ch %0d rate words %0d", c, rt_avail));
    end
    chk(nxfer >= 37, $sformatf("transfers %0d", nxfer));
    chk(ntrig >= 1, "slow trigger fired");
    // stuck line
    acq = 1; trig_in[5] = 1; repeat (100) @(negedge clk);
    chk(loss == 8'b0010_0000, $sformatf("loss flags %b", loss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
