// Testbench for counter_acq_block: feeds count words at every tick, stops
// ACQUIRE and checks the event (header + the ev_len words ending ev_offset
// ticks before the stop) and the rate words (sums over rate_ticks ticks).
module tb_counter_acq_block;
  import acq_pkg::*;
  logic clk = 0, rst_n = 0, acq = 0, tick = 0, flush = 0, ev_rd = 0, rt_rd = 0, xfer_busy;
  logic [7:0]  word = 0;
  logic [15:0] rate_ticks = 4;
  logic [6:0]  ev_len = 10;
  logic [5:0]  ev_offset = 3;
  stamp_t      stamp;
  logic [31:0] ev_data, rt_data;
  logic [7:0]  ev_avail;
  logic [4:0]  rt_avail;
  int checks = 0, failures = 0;
  int hist[$];
  always #1 clk = ~clk;
  counter_acq_block #(.W(8), .RING(64), .EV_DEPTH(128), .RT_DEPTH(16)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    stamp = '{abs_time: 32'd77, mark_time: 32'd1234, ev_cnt: 32'd5};
    repeat (2) @(negedge clk); rst_n = 1; acq = 1; @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      word = 8'($urandom_range(0, 255)); tick = 1; hist.push_back(word);
      @(negedge clk); tick = 0; repeat (3) @(negedge clk);
    end
    acq = 0;
    repeat (5) @(negedge clk);
    chk(xfer_busy, "busy after stop");
    repeat (30) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0; @(negedge clk);
    n = ev_avail;
    chk(n == 3 + 10, $sformatf("event words %0d", n));
    for (int i = 0; i < n; i++) begin
      int exp;
      if (i == 0) exp = 77; else if (i == 1) exp = 1234; else if (i == 2) exp = 5;
      else exp = hist[40 - 3 - 10 + (i - 3)];
      chk(ev_data == 32'(exp), $sformatf("event word %0d: %0d != %0d", i, ev_data, exp));
      ev_rd = 1; @(negedge clk); ev_rd = 0;
    end
    // 40 ticks -> 10 rate words, each the sum of 4 consecutive words
    n = rt_avail;
    chk(n == 10, $sformatf("rate words %0d", n));
    for (int i = 0; i < n; i++) begin
      int s;
      s = hist[4*i] + hist[4*i+1] + hist[4*i+2] + hist[4*i+3];
      chk(rt_data == 32'(s), $sformatf("rate %0d: %0d != %0d", i, rt_data, s));
      rt_rd = 1; @(negedge clk); rt_rd = 0;
    end
    // restart acquisition: block leaves WAITACQ
    acq = 1; repeat (3) @(negedge clk);
    chk(!xfer_busy, "running again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
