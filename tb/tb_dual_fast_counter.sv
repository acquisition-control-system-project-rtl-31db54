// Testbench for dual_fast_counter, both builds (binary and Johnson shift
// register + encoder): alternating counting, hold, asynchronous clear and
// wrap-around at 2**W.
module tb_dual_fast_counter;
  logic clk = 0, en = 0, sel = 0;
  logic [1:0] clr = 2'b11;
  logic [7:0] wb, wj;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  dual_fast_counter #(.W(8), .SHIFT_ENC(1'b0)) u_b (.clk_fast(clk), .cnt_en(en), .sel, .clr, .word(wb));
  dual_fast_counter #(.W(8), .SHIFT_ENC(1'b1)) u_j (.clk_fast(clk), .cnt_en(en), .sel, .clr, .word(wj));
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic count(int n);
    for (int i = 0; i < n; i++) begin en = 1; @(negedge clk); en = 0; @(negedge clk); end
  endtask
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); clr = 2'b00; @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      int n;
      n = (r * 37 + 5) % 300;      // includes values above 255 (wrap)
      count(n);
      sel = ~sel;                  // counter that counted is now stopped
      @(negedge clk);
      chk(wb == 8'(n), $sformatf("binary round %0d: %0d != %0d", r, wb, n % 256));
      chk(wj == 8'(n), $sformatf("johnson round %0d: %0d != %0d", r, wj, n % 256));
      count(3);                    // counts go to the other counter
      chk(wb == 8'(n) && wj == 8'(n), "stopped counter holds");
      clr[~sel] = 1'b1; @(negedge clk); clr = 2'b00;
      chk(wb == 0 && wj == 0, "stopped counter cleared");
      // the running one has 3 counts already: swap back to see them
      sel = ~sel; @(negedge clk);
      chk(wb == 3 && wj == 3, "other counter kept 3 counts");
      clr[~sel] = 1'b1; @(negedge clk); clr = 2'b00;
      sel = ~sel; @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
