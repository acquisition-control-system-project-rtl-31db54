// Testbench for spi_master with a mode-0 slave model: the slave samples
// MOSI on rising sclk and shifts its own word out on MISO after falling
// sclk (first bit valid when cs_n falls). Lengths 1, 8, 13, 24 and 32 and
// dividers 0, 1 and 3 are checked for MOSI bits, right-aligned rdata,
// clock count, chip select and the sclk period.
module tb_spi_master;
  logic clk = 0, rst_n = 0, start = 0, busy, sclk, mosi, miso, cs_n;
  logic [31:0] wdata = 0, rdata;
  logic [5:0]  len = 8;
  logic [7:0]  div = 1;
  int checks = 0, failures = 0, nclk = 0, last_rise = 0, period = 0, cyc = 0;
  logic [31:0] slv_rx, slv_tx, slv_sh;
  always #2 clk = ~clk;
  spi_master dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) cyc++;
  // slave model
  always @(negedge cs_n) begin slv_sh = slv_tx; nclk = 0; slv_rx = 0; end
  assign miso = cs_n ? 1'bz : slv_sh[31];
  always @(posedge sclk) if (!cs_n) begin
    slv_rx = {slv_rx[30:0], mosi}; nclk++;
    if (nclk == 2) period = cyc - last_rise;
    last_rise = cyc;
  end
  always @(negedge sclk) if (!cs_n) slv_sh = {slv_sh[30:0], 1'b0};
  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic xfer(int l, int d);
    logic [31:0] w, mask;
    w = $urandom; slv_tx = $urandom; len = 6'(l); div = 8'(d); wdata = w;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (busy == 0); repeat (3) @(negedge clk);
    mask = (l == 32) ? 32'hFFFF_FFFF : (32'd1 << l) - 1;
    chk(nclk == l, $sformatf("len %0d: %0d clocks", l, nclk));
    chk((slv_rx & mask) == (w & mask), $sformatf("len %0d: slave got %h", l, slv_rx));
    chk(rdata == (slv_tx >> (32 - l)), $sformatf("len %0d: rdata %h", l, rdata));
    chk(cs_n == 1 && sclk == 0, "idle bus");
    if (l > 1) chk(period == 2 * (d + 1), $sformatf("div %0d: sclk period %0d", d, period));
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    chk(cs_n && !busy, "reset state");
    xfer(8, 1); xfer(1, 0); xfer(13, 3); xfer(24, 0); xfer(32, 1); xfer(16, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
