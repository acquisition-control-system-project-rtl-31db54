// Testbench for test_pulse_gen: a finite burst (count 3, width 4, period
// 10) checked for pulse count, width, spacing, amplitude word and busy;
// then continuous mode (count 0) stopped with 'stop' after several pulses.
module tb_test_pulse_gen;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, pulse, busy;
  logic [15:0] width = 4, period = 10, count = 3, amp = 16'h1234, amp_out, sent;
  int checks = 0, failures = 0, npulse = 0, hi = 0, cyc = 0, last_rise = -1, bad_w = 0, bad_p = 0;
  logic pq = 0;
  always #2 clk = ~clk;
  test_pulse_gen dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pulse && !pq) begin
      npulse++;
      if (last_rise >= 0 && cyc - last_rise != period) bad_p++;
      last_rise = cyc; hi = 0;
      chk(amp_out == amp, "amplitude word while pulsing");
    end
    if (pulse) hi++;
    if (!pulse && pq && hi != width) bad_w++;
    pq = pulse;
  end
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    chk(!pulse && !busy, "idle");
    start = 1; @(negedge clk); start = 0;
    chk(busy, "busy after start");
    repeat (60) @(negedge clk);
    chk(npulse == 3 && sent == 3, $sformatf("finite burst: %0d pulses, sent %0d", npulse, sent));
    chk(bad_w == 0 && bad_p == 0, "width and period");
    chk(!busy && amp_out == 0, "burst ends");
    count = 0; width = 2; period = 7; npulse = 0; last_rise = -1;
    start = 1; @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    chk(busy && npulse >= 13, $sformatf("continuous mode (%0d pulses)", npulse));
    stop = 1; @(negedge clk); stop = 0; repeat (20) @(negedge clk);
    chk(!busy && !pulse && bad_w == 0 && bad_p == 0, "stopped, width and period kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
