// Testbench for majority_trigger: random sparse frames of four 64-bit
// samples; a reference model ORs each sample with the three before it,
// counts ones and compares with the threshold. Stage triggers and OR words
// must match the model exactly 4 clocks after the frame (fixed latency).
module tb_majority_trigger;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [3:0][63:0] samp = '0, or_word;
  logic [6:0] thr = 7'd5;
  logic [3:0] stage_trig;
  int checks = 0, failures = 0, cyc = 0, nfire = 0;
  logic [63:0] s[$];
  logic [3:0]  exp_t[int];
  logic [3:0][63:0] exp_o[int];
  always #2 clk = ~clk;
  majority_trigger #(.NCH(64)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (exp_t.exists(cyc - 5)) begin
      chk(stage_trig == exp_t[cyc - 5], $sformatf("cyc %0d stage_trig %b exp %b", cyc, stage_trig, exp_t[cyc - 5]));
      chk(or_word == exp_o[cyc - 5], $sformatf("cyc %0d or words", cyc));
      if (stage_trig != 0) nfire++;
    end
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3; i++) s.push_back('0);
    for (int f = 0; f < 300; f++) begin
      logic [3:0] t;
      logic [3:0][63:0] o;
      for (int p = 0; p < 4; p++) begin
        logic [63:0] w;
        w = '0;
        for (int b = 0; b < 64; b++) if ($urandom_range(0, 99) < (f % 20 < 3 ? 6 : 1)) w[b] = 1'b1;
        samp[p] = w; s.push_back(w);
      end
      for (int p = 0; p < 4; p++) begin
        int n;
        o[p] = s[s.size() - 4 + p] | s[s.size() - 5 + p] | s[s.size() - 6 + p] | s[s.size() - 7 + p];
        n = $countones(o[p]);
        t[p] = (n >= thr);
      end
      valid = 1;
      exp_t[cyc] = t; exp_o[cyc] = o;
      @(negedge clk);
    end
    valid = 0;
    repeat (8) @(negedge clk);
    chk(nfire > 5, $sformatf("trigger exercised %0d", nfire));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
