// Testbench for io_comm_controller at byte level. A host model sends
// ATN, COMMAND and payload bytes as one-clock rx_valid strobes and collects
// every device byte (tx_ready toggles to add back-pressure). A bus model
// holds 256 words with a registered read. Checked: ATN_RET, BUSY/READY
// before each response, response bytes, SET/CLR flag, lines/status/flags
// reads, WRITE and READ payloads with incrementing and fixed addresses,
// (len=0 meaning 256 words is not exercised), a BUSY pause from the
// host during a READ payload, a bad opcode status, and the receive timeout.
module tb_io_comm_controller;
  import io_cmd_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, tx_ready = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic tx_valid, bus_we, bus_re, in_transaction;
  logic [15:0] bus_addr, timeouts;
  logic [31:0] bus_wdata, bus_rdata, lines = 32'hCAFE_0001, status = 32'h0000_00A5;
  logic [31:0] flags;
  logic [31:0] mem [256];
  int checks = 0, failures = 0, nwe = 0;
  byte unsigned rxq[$];
  bit paused = 0;
  always #2 clk = ~clk;
  io_comm_controller #(.TIMEOUT(200), .NFLAGS(32)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  // bus model
  always @(posedge clk) begin
    if (bus_we) begin mem[bus_addr[7:0]] <= bus_wdata; nwe++; end
    if (bus_re) bus_rdata <= mem[bus_addr[7:0]];
  end
  // device byte sink with back-pressure
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) rxq.push_back(tx_data);
    tx_ready <= !paused && ($urandom_range(0, 3) != 0);
  end
  task automatic send(byte unsigned b);
    @(negedge clk); rx_data = b; rx_valid = 1; @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask
  task automatic get(output byte unsigned b);
    int n = 0;
    while (rxq.size() == 0 && n < 5000) begin @(negedge clk); n++; end
    if (rxq.size() == 0) begin b = 8'hxx; chk(0, "device byte missing"); end
    else b = rxq.pop_front();
  endtask
  task automatic expect_b(byte unsigned e, string m);
    byte unsigned b; get(b); chk(b == e, $sformatf("%s: got %02h exp %02h", m, b, e));
  endtask
  task automatic command(byte unsigned op, logic [15:0] addr, byte unsigned len,
                         output logic [31:0] val, output byte unsigned st);
    byte unsigned b;
    send(ATN); expect_b(ATN_RET, "ATN_RET");
    send(op); send(addr[15:8]); send(addr[7:0]); send(len);
    expect_b(BUSY, "BUSY"); expect_b(READY, "READY");
    expect_b(op | 8'h80, "resp op"); get(st); val = 0;
    repeat (4) begin get(b); val = {val[23:0], b}; end
  endtask
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] v; byte unsigned s, b; int t0;
    for (int i = 0; i < 256; i++) mem[i] = 32'h1000_0000 + i;
    repeat (3) @(negedge clk); rst_n = 1;
    // stray bytes outside a transaction are ignored
    send(8'h12); send(READY); repeat (20) @(negedge clk);
    chk(rxq.size() == 0 && !in_transaction, "idle ignores non-ATN bytes");
    command(OP_SET_FLAG, 16'h0003, 0, v, s);
    chk(s == 0 && flags[3], "set flag 3");
    command(OP_SET_FLAG, 16'h0007, 0, v, s);
    command(OP_RD_FLAGS, 0, 0, v, s);
    chk(v == 32'h88, $sformatf("flags read %h", v));
    command(OP_CLR_FLAG, 16'h0003, 0, v, s);
    chk(!flags[3] && flags[7], "clear flag 3");
    command(OP_RD_LINES, 0, 0, v, s);   chk(v == lines, "lines read");
    command(OP_RD_STATUS, 0, 0, v, s);  chk(v == status, "status read");
    command(8'h77, 0, 0, v, s);         chk(s == 1, "bad opcode status");
    // WRITE 3 words from 0x0040
    command(OP_WRITE, 16'h0040, 3, v, s);
    expect_b(READY, "write READY");
    for (int w = 0; w < 3; w++) begin
      logic [31:0] d;
      d = 32'hA000_0000 + w * 32'h0101_0101;
      for (int k = 3; k >= 0; k--) send(d[8*k +: 8]);
    end
    expect_b(READY, "write end READY");
    for (int w = 0; w < 3; w++)
      chk(mem[8'h40 + w] == 32'hA000_0000 + w * 32'h0101_0101, $sformatf("write word %0d", w));
    // WRITE_FIX 2 words to 0x0050
    command(OP_WRITE_FIX, 16'h0050, 2, v, s);
    expect_b(READY, "write READY");
    for (int k = 3; k >= 0; k--) send(8'h11 * (k + 1));
    for (int k = 3; k >= 0; k--) send(8'h22);
    expect_b(READY, "write end READY");
    chk(mem[8'h50] == 32'h2222_2222 && mem[8'h51] == 32'h1000_0051, "fixed-address write");
    // READ 4 words from 0x0040, host pauses with BUSY after the first bytes
    command(OP_READ, 16'h0040, 4, v, s);
    expect_b(BUSY, "read BUSY"); expect_b(READY, "read READY");
    for (int w = 0; w < 4; w++) begin
      logic [31:0] d;
      d = 0;
      for (int k = 0; k < 4; k++) begin
        get(b); d = {d[23:0], b};
        if (w == 1 && k == 1) begin
          int n0;
          n0 = 0;
          send(BUSY); repeat (200) @(negedge clk); n0 = rxq.size();
          repeat (200) @(negedge clk);
          chk(rxq.size() == n0 && n0 <= 1, "BUSY pauses the payload");
          send(READY);
        end
      end
      chk(d == mem[8'h40 + w], $sformatf("read word %0d %h", w, d));
    end
    expect_b(READY, "read end READY");
    // READ_FIX 3 words from 0x0005
    command(OP_READ_FIX, 16'h0005, 3, v, s);
    expect_b(BUSY, "read BUSY"); expect_b(READY, "read READY");
    for (int w = 0; w < 3; w++) begin
      logic [31:0] d;
      d = 0;
      for (int k = 0; k < 4; k++) begin get(b); d = {d[23:0], b}; end
      chk(d == 32'h1000_0005, "fixed-address read");
    end
    expect_b(READY, "read end READY");
    // timeout in the middle of a command
    send(ATN); expect_b(ATN_RET, "ATN_RET");
    send(OP_RD_LINES); repeat (400) @(negedge clk);
    chk(timeouts == 1 && !in_transaction, "command timeout");
    // and the link still works afterwards
    command(OP_RD_LINES, 0, 0, v, s);   chk(v == lines, "lines after timeout");
    repeat (50) @(negedge clk);
    chk(rxq.size() == 0, "no extra bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
