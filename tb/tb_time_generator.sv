// Testbench for time_generator with a scaled second (MARKS_PER_SEC = 50):
// a 10 MHz-like reference of period 10 clocks and a PPS every 500 clocks.
// Checks seconds, mark time restart, zero shift error when the references
// agree, a shift error of -5 when a PPS comes 50 clocks early, and the
// seconds preset.
module tb_time_generator;
  logic clk = 0, rst_n = 0, pps = 0, clk10m = 0, sec_load = 0, pps_p;
  logic [31:0] sec_val = 0, abs_time, mark_time, mark_err;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;
  initial forever begin #21 clk10m = ~clk10m; end   // period 42 units ~ 10.5 clocks
  time_generator #(.MARKS_PER_SEC(50)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic pulse_pps;
    pps = 1; repeat (3) @(negedge clk); pps = 0;
  endtask
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    pulse_pps;
    for (int s = 1; s <= 3; s++) begin
      #(50 * 42 - 12);
      pulse_pps;
      repeat (4) @(negedge clk);
      chk(abs_time == 32'(s + 1), $sformatf("seconds %0d", abs_time));
      chk(mark_time <= 1, $sformatf("mark restarted %0d", mark_time));
      chk($signed(mark_err) >= -1 && $signed(mark_err) <= 1, $sformatf("error %0d", $signed(mark_err)));
    end
    #(45 * 42 - 12);
    pulse_pps; repeat (4) @(negedge clk);
    chk($signed(mark_err) >= -6 && $signed(mark_err) <= -4, $sformatf("early PPS error %0d", $signed(mark_err)));
    #(20 * 42);
    chk(mark_time >= 19 && mark_time <= 21, $sformatf("mark time %0d", mark_time));
    @(negedge clk); sec_val = 1000; sec_load = 1; @(negedge clk); sec_load = 0; @(negedge clk);
    chk(abs_time == 1000, $sformatf("seconds preset %0d", abs_time));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
