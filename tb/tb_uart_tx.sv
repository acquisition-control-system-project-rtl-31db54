// Testbench for uart_tx (8N1, LSB first) at 8 clocks per bit. A line
// decoder waits for the start bit, samples every bit in its middle and
// checks data and stop bit against the queue of offered bytes; the
// 'ready' handshake, idle-high line and back-to-back bytes are checked.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, valid = 0, ready, tx;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  byte unsigned sentq[$];
  always #2 clk = ~clk;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // line decoder
  initial begin
    logic [7:0] b;
    wait (rst_n);
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      chk(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      chk(tx == 1, "stop bit");
      chk(sentq.size() != 0 && sentq.pop_front() == b, $sformatf("byte %02h", b));
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    chk(tx == 1 && ready, "idle line high and ready");
    for (int n = 0; n < 20; n++) begin
      data = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      valid = 1;
      do @(posedge clk); while (!ready);
      sentq.push_back(data);
      @(negedge clk); valid = 0;
      if (n % 5 == 4) repeat (40) @(negedge clk);
    end
    repeat (12 * CPB) @(negedge clk);
    chk(sentq.size() == 0, "all bytes seen on the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
