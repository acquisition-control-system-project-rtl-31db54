// Testbench for dbuf_stack: random events written while the reader drains
// whole banks at random moments; every word must come out once, in order.
// Also checks the bank hand-over point, flush and the overflow count when
// both banks are full.
module tb_dbuf_stack;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_last = 0, wr_ready, flush = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0]  rd_avail;
  logic [15:0] overflow;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  always #1 clk = ~clk;
  dbuf_stack #(.W(32), .DEPTH(16), .EV_MAX(5)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic write_ev(int len, int tag);
    for (int i = 0; i < len; i++) begin
      wr_en = 1; wr_data = tag * 100 + i; wr_last = (i == len - 1);
      q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0; wr_last = 0;
  endtask
  task automatic drain;
    int n;
    n = rd_avail;
    for (int i = 0; i < n; i++) begin
      logic [31:0] e;
      e = q.pop_front();
      chk(rd_data == e, $sformatf("read %0d expected %0d", rd_data, e));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
  endtask
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // 3 events of 4 words: 12 words, 16-12 = 4 < 5 -> bank handed over
    write_ev(4, 1); write_ev(4, 2);
    chk(rd_avail == 0, "bank not yet handed over");
    write_ev(4, 3); @(negedge clk);
    chk(rd_avail == 12, $sformatf("handed over with %0d words", rd_avail));
    // fill the second bank, then a third event must be refused
    write_ev(5, 4); write_ev(5, 5); write_ev(5, 6); @(negedge clk);
    chk(!wr_ready, "both banks full");
    wr_en = 1; wr_last = 1; wr_data = 999; @(negedge clk); wr_en = 0; wr_last = 0;
    chk(overflow == 1, "overflow counted");
    drain; @(negedge clk);
    chk(rd_avail == 15, $sformatf("second bank %0d words", rd_avail));
    drain; @(negedge clk);
    chk(wr_ready, "writer ready again");
    // random traffic with flushes
    for (int e = 0; e < 60; e++) begin
      write_ev(1 + $urandom_range(0, 4), 10 + e);
      if ($urandom_range(0, 3) == 0) begin flush = 1; @(negedge clk); flush = 0; @(negedge clk); end
      if (rd_avail != 0 && $urandom_range(0, 1) == 0) drain;
      while (!wr_ready) begin @(negedge clk); if (rd_avail != 0) drain; end
    end
    flush = 1; @(negedge clk); flush = 0; @(negedge clk);
    while (rd_avail != 0) begin drain; @(negedge clk); flush = 1; @(negedge clk); flush = 0; @(negedge clk); end
    chk(q.size() == 0, $sformatf("%0d words never read", q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
