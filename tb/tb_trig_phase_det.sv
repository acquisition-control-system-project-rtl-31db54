// Testbench for trig_phase_det: stage patterns, one trigger per burst,
// phase = earliest stage of the first frame that fired.
module tb_trig_phase_det;
  logic clk = 0, rst_n = 0, trig;
  logic [3:0] stage_trig = '0;
  logic [1:0] phase;
  int checks = 0, failures = 0, ntrig = 0;
  always #2 clk = ~clk;
  trig_phase_det dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n && trig) ntrig++;
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      logic [3:0] first;
      int nbefore, exp_ph;
      first = 4'($urandom_range(1, 15));
      exp_ph = first[0] ? 0 : first[1] ? 1 : first[2] ? 2 : 3;
      nbefore = ntrig;
      stage_trig = first; @(negedge clk);
      chk(trig && phase == 2'(exp_ph), $sformatf("burst %0d phase %0d exp %0d", r, phase, exp_ph));
      stage_trig = 4'hF; repeat (3) @(negedge clk);
      stage_trig = 4'($urandom_range(1, 15)); @(negedge clk);
      stage_trig = '0; repeat (2) @(negedge clk);
      chk(ntrig == nbefore + 1, "one trigger per burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
