// Testbench for uart_rx at 8 clocks per bit. A line driver sends 8N1
// frames back to back (two idle clocks between them) and one frame with a
// bad stop bit; received bytes and the frame error counter are checked.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rx = 1, valid;
  logic [7:0] data, frame_err;
  int checks = 0, failures = 0, nrx = 0;
  byte unsigned expq[$];
  always #2 clk = ~clk;
  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (rst_n && valid) begin
    nrx++;
    chk(expq.size() != 0 && expq.pop_front() == data, $sformatf("byte %02h", data));
  end
  task automatic frame(logic [7:0] b, int cpb, bit stop);
    rx = 0; repeat (cpb) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (cpb) @(negedge clk); end
    rx = stop; repeat (cpb) @(negedge clk);
    rx = 1; repeat (2) @(negedge clk);
  endtask
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk); rst_n = 1; repeat (5) @(negedge clk);
    for (int n = 0; n < 24; n++) begin
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      expq.push_back(b);
      frame(b, CPB, 1);
    end
    chk(frame_err == 0, "no frame errors");
    frame(8'h55, CPB, 0);
    rx = 1; repeat (20) @(negedge clk);
    chk(frame_err == 1, $sformatf("bad stop bit counted (%0d)", frame_err));
    expq.push_back(8'hA7); frame(8'hA7, CPB, 1);
    repeat (20) @(negedge clk);
    chk(expq.size() == 0 && nrx >= 25, $sformatf("all bytes received (%0d)", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
