// Testbench for trigger_manager: OR and AND coincidence rules, Trig-Out
// timing, stored stamp and event counter, ACQUIRE hold time, reset pulses
// after each acquisition, per-source enables and the rate meters (with a
// scaled second of 20 marks).
module tb_trigger_manager;
  import acq_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, trig_cnt = 0, trig_smp = 0, trig_ext = 0;
  logic [7:0]  coinc_lut = 8'hEE;
  logic [15:0] win_cnt = 8, win_smp = 8, win_ext = 8, acq_hold = 30, rst_delay = 4, rst_width = 3;
  logic cnt_en = 1, smp_en = 1, pps = 0, clk10m = 0, sec_load = 0;
  logic [31:0] sec_val = 0, mark_err, abs_time, mark_time;
  logic trig_out, acq_cnt, acq_smp, rst_cnt, rst_smp;
  stamp_t stamp;
  logic [3:0][31:0] rates;
  int checks = 0, failures = 0, cyc = 0, ntrig = 0, tcyc = 0, nrst_c = 0, nrst_s = 0;
  logic [31:0] mark_at_trig;
  always #2 clk = ~clk;
  initial forever #20 clk10m = ~clk10m;
  trigger_manager #(.MARKS_PER_SEC(20)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic rc_q = 0, rs_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (trig_out) begin ntrig++; tcyc = cyc; mark_at_trig = mark_time; end
    if (rst_cnt && !rc_q) nrst_c++;
    if (rst_smp && !rs_q) nrst_s++;
    rc_q = rst_cnt; rs_q = rst_smp;
  end
  task automatic pulse(ref logic s);
    s = 1; repeat (2) @(negedge clk); s = 0;
  endtask
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int c0, n0;
    repeat (3) @(negedge clk); rst_n = 1;
    pps = 1; repeat (3) @(negedge clk); pps = 0;
    run = 1; repeat (5) @(negedge clk);
    chk(acq_cnt && acq_smp, "acquiring");
    // OR rule: a counter trigger alone fires
    c0 = cyc; pulse(trig_cnt); repeat (6) @(negedge clk);
    chk(ntrig == 1, "OR: counter trigger fires");
    chk(tcyc - c0 <= 6, $sformatf("trig-out latency %0d", tcyc - c0));
    chk(!acq_cnt && !acq_smp, "ACQUIRE dropped");
    chk(stamp.ev_cnt == 0 && stamp.mark_time == mark_at_trig, "stamp stored");
    repeat (40) @(negedge clk);
    chk(acq_cnt && acq_smp, "ACQUIRE back after hold");
    chk(nrst_c == 1 && nrst_s == 1, "reset pulses after acquisition");
    pulse(trig_smp); repeat (40) @(negedge clk);
    chk(ntrig == 2 && stamp.ev_cnt == 1, "sampler trigger, event counter advances");
    // table 0xEE has no entry for the external input alone
    pulse(trig_ext); repeat (40) @(negedge clk);
    chk(ntrig == 2, "external alone ignored by table 0xEE");
    // AND of counter and sampler
    coinc_lut = 8'h88;
    pulse(trig_cnt); repeat (20) @(negedge clk);
    chk(ntrig == 2, "AND: one source is not enough");
    pulse(trig_cnt); repeat (3) @(negedge clk); pulse(trig_smp); repeat (40) @(negedge clk);
    chk(ntrig == 3, "AND: both inside the window");
    pulse(trig_cnt); repeat (12) @(negedge clk); pulse(trig_smp); repeat (40) @(negedge clk);
    chk(ntrig == 3, "AND: outside the window");
    // sampler disabled
    smp_en = 0; @(negedge clk);
    chk(acq_cnt && !acq_smp, "sampler acquisition disabled");
    // rates over the next second
    n0 = ntrig;
    pps = 1; repeat (3) @(negedge clk); pps = 0; repeat (5) @(negedge clk);
    chk(rates[0] == 4 && rates[1] == 3 && rates[2] == 1 && rates[3] == 3,
        $sformatf("rates %0d %0d %0d %0d", rates[0], rates[1], rates[2], rates[3]));
    run = 0; repeat (3) @(negedge clk);
    chk(!acq_cnt, "stop when run cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
