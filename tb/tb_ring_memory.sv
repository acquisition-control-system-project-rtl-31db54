// Testbench for ring_memory: writes 100 samples into a 16-deep ring and
// checks that the last 16 can be read back at wr_ptr-16 .. wr_ptr-1 with
// one clock latency, and that the pointer wraps.
module tb_ring_memory;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [3:0] rd_addr = 0, wr_ptr;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  ring_memory #(.W(8), .DEPTH(16)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #10000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      wr_en = 1; wr_data = 8'(i * 7 + 3); @(negedge clk);
    end
    wr_en = 0;
    chk(wr_ptr == 4'(100), "pointer wraps");
    for (int k = 0; k < 16; k++) begin
      rd_addr = wr_ptr - 4'd16 + 4'(k);
      @(negedge clk);
      chk(rd_data == 8'((84 + k) * 7 + 3), $sformatf("sample %0d got %0d", 84 + k, rd_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
