// Testbench for cfg_regs with N=8: reset values, write then read back of
// every register, one-clock read latency, writes above N ignored and reads
// above N returning zero, parallel 'regs' output.
module tb_cfg_regs;
  localparam int N = 8;
  localparam logic [N-1:0][31:0] RST = {32'h7, 32'h6, 32'h5, 32'h4, 32'h3, 32'h2, 32'h1, 32'hABCD};
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [N-1:0][31:0] regs;
  int checks = 0, failures = 0;
  logic [31:0] model [N];
  always #2 clk = ~clk;
  cfg_regs #(.N(N), .RESET(RST)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic rd(int a, output logic [31:0] v);
    @(negedge clk); raddr = 16'(a); re = 1; @(negedge clk); re = 0; v = rdata;
  endtask
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin rd(i, v); chk(v == RST[i], $sformatf("reset value %0d", i)); model[i] = RST[i]; end
    for (int n = 0; n < 40; n++) begin
      int a = $urandom_range(0, N + 3);
      @(negedge clk); waddr = 16'(a); wdata = $urandom; we = 1; @(negedge clk); we = 0;
      if (a < N) model[a] = wdata;
      a = $urandom_range(0, N + 3);
      rd(a, v);
      chk(v == ((a < N) ? model[a] : 0), $sformatf("read %0d", a));
    end
    for (int i = 0; i < N; i++) chk(regs[i] == model[i], $sformatf("parallel output %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
