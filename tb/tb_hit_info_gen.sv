// Testbench for hit_info_gen: the three integration modes and the window.
// A first trigger in phase 2 with OR word A, then a later triggering stage
// with word B and a non-triggering word C: mode 1 gives A, mode 2 A|B,
// mode 3 A|B|C. With the window enabled, words after it are ignored.
module tb_hit_info_gen;
  logic clk = 0, rst_n = 0, clr = 0, win_en = 0, trig = 0, active;
  logic [1:0] mode = 1, phase = 0;
  logic [15:0] win_len = 4;
  logic [3:0][63:0] or_word = '0;
  logic [3:0] stage_trig = '0;
  logic [63:0] hit_info;
  int checks = 0, failures = 0;
  localparam logic [63:0] A = 64'h0000_0000_0000_00F0, B = 64'h0000_0F00_0000_0000,
                          C = 64'h8000_0000_0000_0001, D = 64'h0000_0000_1111_0000;
  always #2 clk = ~clk;
  hit_info_gen #(.NCH(64)) dut (.*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic run(int m, bit we, output logic [63:0] h);
    mode = 2'(m); win_en = we;
    clr = 1; @(negedge clk); clr = 0;
    // frame with the first trigger in stage 2
    or_word = '0; or_word[2] = A; stage_trig = 4'b1100; @(negedge clk);
    // trigger and phase come one clock later
    or_word = '0; stage_trig = '0; trig = 1; phase = 2; @(negedge clk); trig = 0;
    or_word[1] = B; stage_trig = 4'b0010; @(negedge clk);
    or_word = '0; or_word[3] = C; stage_trig = '0; @(negedge clk);
    or_word = '0; @(negedge clk); @(negedge clk); @(negedge clk);
    or_word[0] = D; stage_trig = 4'b0001; @(negedge clk);
    or_word = '0; stage_trig = '0; repeat (2) @(negedge clk);
    h = hit_info;
  endtask
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [63:0] h;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1, 0, h); chk(h == A, $sformatf("mode 1: %h", h));
    run(2, 0, h); chk(h == (A | B | D), $sformatf("mode 2: %h", h));
    run(3, 0, h); chk(h == (A | B | C | D), $sformatf("mode 3: %h", h));
    chk(active, "no window: still integrating");
    run(3, 1, h); chk(h == (A | B | C), $sformatf("mode 3 window 4: %h", h));
    chk(!active, "window closed");
    run(2, 1, h); chk(h == (A | B), $sformatf("mode 2 window 4: %h", h));
    clr = 1; @(negedge clk); clr = 0; @(negedge clk);
    chk(hit_info == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
