// Testbench for phase_sync: four 250 MHz-like clocks a quarter period
// apart; after ACQUIRE rises or falls, enable i must change exactly i
// quarter periods after enable 0, i.e. in the same sample frame.
module tb_phase_sync;
  logic [3:0] clk_ph, en;
  logic rst_n = 0, acq = 0;
  int checks = 0, failures = 0;
  realtime tch[4];
  logic [3:0] ck = '0;
  for (genvar i = 0; i < 4; i++) begin : g_clk
    initial begin
      #(2 * i);
      forever begin ck[i] = 1'b1; #4; ck[i] = 1'b0; #4; end
    end
  end
  assign clk_ph = ck;
  phase_sync #(.N(4)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic [3:0] en_prev = '0;
  always @(en) begin
    for (int i = 0; i < 4; i++) if (en[i] != en_prev[i]) tch[i] = $realtime;
    en_prev = en;
  end
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk_ph[0]); rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      repeat ($urandom_range(2, 5)) @(posedge clk_ph[0]);
      #1 acq = ~acq;
      repeat (4) @(posedge clk_ph[0]);
      for (int i = 0; i < 4; i++) chk(en[i] == acq, $sformatf("en[%0d] follows", i));
      for (int i = 1; i < 4; i++)
        chk(tch[i] - tch[0] == 2.0 * i, $sformatf("phase %0d lag %0f", i, tch[i] - tch[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
