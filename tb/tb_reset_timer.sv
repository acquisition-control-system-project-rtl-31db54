// Testbench for reset_timer: pulse starts 'delay' clocks after start and
// lasts 'width' clocks; a restart during the delay moves it.
module tb_reset_timer;
  logic clk = 0, rst_n = 0, start = 0, rst_out;
  logic [15:0] delay = 5, width = 3;
  int checks = 0, failures = 0, cyc = 0, rise = -1, len = 0;
  always #2 clk = ~clk;
  reset_timer dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rst_out && !q) rise = cyc;
    if (rst_out) len++;
    q = rst_out;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int s;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      delay = 16'(3 + 4 * r); width = 16'(2 + r); len = 0;
      start = 1; @(negedge clk); start = 0; s = cyc;
      repeat (30) @(negedge clk);
      chk(rise - s == int'(delay) + 1, $sformatf("delay %0d got %0d", delay, rise - s));
      chk(len == int'(width), $sformatf("width %0d got %0d", width, len));
    end
    len = 0; delay = 10; width = 4;
    start = 1; @(negedge clk); start = 0; repeat (4) @(negedge clk);
    start = 1; @(negedge clk); start = 0; s = cyc;
    repeat (30) @(negedge clk);
    chk(rise - s == 11 && len == 4, "restart moves the pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
