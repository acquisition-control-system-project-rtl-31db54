// Testbench for i2c_master with an open-drain bus and a slave model at
// address 0x50. The slave detects START/STOP (SDA edges while SCL is
// high), shifts bits on rising SCL, acknowledges its address and written
// bytes, and returns 0x5A, 0xC3 on reads. Sequence: START, write address
// (write), write a register byte, repeated START, address (read), read with
// ACK, read with NACK, STOP; then a write to an absent address (no ACK).
module tb_i2c_master;
  logic clk = 0, rst_n = 0, cmd_valid = 0, nack = 0, busy, ack, scl_o, sda_o;
  logic [1:0] cmd = 0;
  logic [7:0] wbyte = 0, rbyte, div = 3;
  logic slv_sda = 1;
  wire  scl = scl_o;
  wire  sda = sda_o & slv_sda;
  wire  sda_i = sda;
  int checks = 0, failures = 0, nstart = 0, nstop = 0, bitn = -1, nbyte = 0;
  bit rd = 0, sel = 0;
  logic [7:0] sh = 0, txb = 0, rxbytes[$], macks[$];
  logic [7:0] rdata[2] = '{8'h5A, 8'hC3};
  int rptr = 0;
  always #2 clk = ~clk;
  i2c_master dut (.clk, .rst_n, .cmd_valid, .cmd, .wbyte, .nack, .div, .busy, .rbyte, .ack,
                  .scl_o, .sda_o, .sda_i);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  // slave model
  always @(negedge sda) if (scl === 1'b1 && rst_n) begin nstart++; bitn = -1; nbyte = 0; rd = 0; sel = 0; slv_sda = 1; end
  always @(posedge sda) if (scl === 1'b1 && rst_n) begin nstop++; sel = 0; end
  always @(posedge scl) if (rst_n && bitn >= 0) begin
    if (bitn < 8) sh = {sh[6:0], sda};
    else if (rd && nbyte > 1) begin macks.push_back({7'd0, sda}); if (sda) sel = 0; end
  end
  always @(negedge scl) if (rst_n) begin
    slv_sda = 1;
    bitn = (bitn == 8) ? 0 : bitn + 1;
    if (bitn == 8) begin
      nbyte++;
      if (nbyte == 1) begin sel = (sh[7:1] == 7'h50); rd = sh[0]; end
      else if (!rd && sel) rxbytes.push_back(sh);
      if (sel && !(rd && nbyte > 1)) slv_sda = 0;   // ACK
    end else if (bitn == 0 && rd && sel && nbyte >= 1) begin
      txb = rdata[rptr % 2]; if (bitn == 0) rptr++;
    end
    if (bitn < 8 && rd && sel && nbyte >= 1) slv_sda = txb[7 - bitn];
  end
  task automatic do_cmd(logic [1:0] c, logic [7:0] b, logic n);
    @(negedge clk); cmd = c; wbyte = b; nack = n; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    wait (!busy); @(negedge clk);
  endtask
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    chk(scl && sda, "bus idle high");
    do_cmd(0, 0, 0);             chk(nstart == 1, "START seen");
    do_cmd(2, 8'hA0, 0);         chk(ack == 0, "address acknowledged");
    do_cmd(2, 8'h3C, 0);         chk(ack == 0, "data acknowledged");
    chk(rxbytes.size() == 1 && rxbytes[0] == 8'h3C, "slave received register byte");
    do_cmd(0, 0, 0);             chk(nstart == 2, "repeated START seen");
    do_cmd(2, 8'hA1, 0);         chk(ack == 0, "read address acknowledged");
    do_cmd(3, 0, 0);             chk(rbyte == 8'h5A, $sformatf("first read %02h", rbyte));
    do_cmd(3, 0, 1);             chk(rbyte == 8'hC3, $sformatf("second read %02h", rbyte));
    chk(macks.size() == 2 && macks[0] == 0 && macks[1] == 1, "master ACK then NACK");
    do_cmd(1, 0, 0);             chk(nstop == 1 && scl && sda, "STOP seen, bus released");
    do_cmd(0, 0, 0);
    do_cmd(2, 8'h42, 0);         chk(ack == 1, "absent address not acknowledged");
    do_cmd(1, 0, 0);             chk(nstop == 2, "second STOP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
