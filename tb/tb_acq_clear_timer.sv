// Testbench for acq_clear_timer: tick spacing equals the period, first
// tick 'period' clocks after enable, no ticks while disabled.
module tb_acq_clear_timer;
  logic clk = 0, rst_n = 0, acq_en = 0, tick;
  logic [15:0] period = 16'd10;
  int checks = 0, failures = 0, cyc = 0, last = -1, nt = 0;
  always #1 clk = ~clk;
  acq_clear_timer dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) begin
    cyc++;
    if (tick && rst_n) begin
      if (last >= 0) chk(cyc - last == int'(period), $sformatf("spacing %0d", cyc - last));
      last = cyc; nt++;
    end
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    chk(nt == 0, "no tick while disabled");
    acq_en = 1; t0 = cyc;
    wait (tick); @(posedge clk);
    chk(cyc - t0 == 10, $sformatf("first tick after %0d", cyc - t0));
    repeat (55) @(negedge clk);
    chk(nt == 6, $sformatf("ticks %0d", nt));
    acq_en = 0; last = -1; period = 7; nt = 0;
    repeat (20) @(negedge clk);
    chk(nt == 0, "stops when disabled");
    acq_en = 1; repeat (50) @(negedge clk);
    chk(nt == 7, $sformatf("ticks at period 7: %0d", nt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
