// Testbench for rate_meter: random events between gates; each gate must
// publish exactly the number of events since the previous gate.
module tb_rate_meter;
  logic clk = 0, rst_n = 0, ev = 0, gate = 0;
  logic [31:0] rate;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;
  rate_meter dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    repeat (3) @(negedge clk); rst_n = 1;
    gate = 1; @(negedge clk); gate = 0;
    for (int g = 0; g < 10; g++) begin
      n = 0;
      for (int i = 0; i < 100; i++) begin
        ev = ($urandom_range(0, 9) < g); if (ev) n++;
        @(negedge clk);
      end
      ev = 0; gate = 1; @(negedge clk); gate = 0;
      chk(rate == 32'(n), $sformatf("gate %0d rate %0d exp %0d", g, rate, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
