// Testbench for slow_trigger: random count words, reference moving average
// computed in the testbench, trigger on the first crossing with the fixed
// 4-clock latency, and the delay line.
module tb_slow_trigger;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, trigger, trigger_dly;
  logic [63:0][7:0] words;
  logic [2:0]  avg_log2 = 2;
  logic [13:0] thr = 14'd6000, average;
  logic [5:0]  delay = 6'd7;
  int checks = 0, failures = 0, cyc = 0, tcyc = -1, dcyc = -1, ntrig = 0;
  int sums[$];
  always #1 clk = ~clk;
  slow_trigger #(.NCH(64), .W(8), .DMAX(64)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) begin
    cyc++;
    if (trigger && rst_n) begin tcyc = cyc; ntrig++; end
    if (trigger_dly && rst_n) dcyc = cyc;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int vcyc, exp_cross, exp_n;
    bit above;
    exp_cross = -1; exp_n = 0; above = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int s, a;
      s = 0;
      for (int c = 0; c < 64; c++) begin
        words[c] = 8'($urandom_range(0, t < 15 ? 100 : 255));
        s += words[c];
      end
      sums.push_back(s);
      valid = 1; @(negedge clk); vcyc = cyc; valid = 0;
      repeat (5) @(negedge clk);
      a = 0;
      for (int k = 0; k < 4; k++) if (t - k >= 0) a += sums[t - k];
      a = a / 4;
      chk(int'(average) == a, $sformatf("t=%0d average %0d != %0d", t, average, a));
      if (a > 6000 && !above) exp_n++;
      above = (a > 6000);
      if (exp_cross < 0 && a > 6000) begin
        exp_cross = t;
        chk(tcyc - vcyc == 4, $sformatf("trigger latency %0d", tcyc - vcyc));
      end
      repeat (5) @(negedge clk);
    end
    chk(exp_cross >= 0, "threshold crossed");
    chk(ntrig == exp_n, $sformatf("one trigger per crossing, got %0d of %0d", ntrig, exp_n));
    chk(dcyc - tcyc == 7, $sformatf("delay %0d", dcyc - tcyc));
    clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    chk(average == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
