// Testbench for coinc_input: window length, retrigger extension, no
// window for width 0, edge pulses only on leading edges.
module tb_coinc_input;
  logic clk = 0, rst_n = 0, trig = 0, edge_p, win;
  logic [15:0] width = 10;
  int checks = 0, failures = 0, nedge = 0, wlen = 0;
  always #2 clk = ~clk;
  coinc_input dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (edge_p) nedge++;
    if (win) wlen++;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    trig = 1; repeat (30) @(negedge clk); trig = 0; repeat (5) @(negedge clk);
    chk(nedge == 1, "one edge for a long pulse");
    chk(wlen == 10, $sformatf("window %0d", wlen));
    wlen = 0;
    trig = 1; @(negedge clk); trig = 0; repeat (5) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0; repeat (20) @(negedge clk);
    chk(nedge == 3, "two more edges");
    chk(wlen == 16, $sformatf("retriggered window %0d", wlen));
    wlen = 0; width = 0;
    trig = 1; @(negedge clk); trig = 0; repeat (20) @(negedge clk);
    chk(wlen == 0, "width 0 keeps window shut");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
