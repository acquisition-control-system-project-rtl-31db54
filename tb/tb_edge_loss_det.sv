// Testbench for edge_loss_det: counts leading-edge pulses for a pattern of
// input pulses of various widths and checks the stuck-high loss flag.
module tb_edge_loss_det;
  logic clk = 0, rst_n = 0, din = 0, pulse, loss;
  int checks = 0, failures = 0, npulse = 0;
  always #1 clk = ~clk;
  edge_loss_det #(.LOSS_CYCLES(10)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n && pulse) npulse++;
  initial begin
    #50000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // five pulses of width 1..5 clocks, separated by gaps
    for (int w = 1; w <= 5; w++) begin
      din = 1; repeat (w) @(negedge clk); din = 0; repeat (3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(npulse == 5, $sformatf("pulses %0d != 5", npulse));
    chk(!loss, "no loss on short pulses");
    // a one-cycle pulse must give exactly one-cycle output
    din = 1; repeat (9) @(negedge clk);
    chk(!loss, "loss not yet after 9 clocks");
    repeat (4) @(negedge clk);
    chk(loss, "loss after stuck high");
    chk(npulse == 6, "stuck line counted once");
    din = 0; repeat (3) @(negedge clk);
    chk(!loss, "loss clears when line falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
