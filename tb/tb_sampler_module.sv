// Testbench for sampler_module at full size (64 channels): four phase
// clocks 1 ns apart (1 GS/s). In each of several acquisitions a group of
// 10 channels pulses for one sample at a chosen nanosecond while a few
// single noise hits stay below the majority threshold. Checks: one
// trigger per acquisition, the reported phase equals the sample's position
// in its frame, the hit info (mode 1) equals the group, and in the stored
// event the group appears at the sample and row that the header's info
// word points to (pipeline latency compensated).
`timescale 1ns/1ps
module tb_sampler_module;
  import acq_pkg::*;
  logic [3:0]  ck = '0;
  logic        rst_n = 0, acq = 0, hit_clr = 0, win_en = 0, flush = 0, rd_en = 0;
  logic [63:0] trig_in = '0, hit_info;
  logic [6:0]  thr = 7'd6;
  logic [5:0]  ev_rows_in = 6'd16, ev_offset = 6'd4;
  logic [1:0]  hit_mode = 2'd1, trig_phase;
  logic [15:0] win_len = 16'd0, rd_avail;
  stamp_t      stamp = '{abs_time: 32'd1, mark_time: 32'd2, ev_cnt: 32'd0};
  logic [31:0] rd_data;
  logic        trigger, hit_active, busy;
  int checks = 0, failures = 0, ntrig = 0;
  for (genvar i = 0; i < 4; i++) begin : g_clk
    initial begin
      #(1.0 * i);
      forever begin ck[i] = 1'b1; #2; ck[i] = 1'b0; #2; end
    end
  end
  sampler_module #(.NCH(64)) dut (.clk_ph(ck), .*);
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge ck[0]) if (rst_n && trigger) ntrig++;
  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge ck[0]); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      logic [63:0] grp;
      int ph, n, nt0, info_since, row_t, found_row, found_s;
      grp = '0;
      for (int k = 0; k < 10; k++) grp[(r * 13 + k * 5) % 64] = 1'b1;
      ph = r;
      stamp.ev_cnt = 32'(r);
      nt0 = ntrig;
      @(posedge ck[0]); #0.5 acq = 1; hit_clr = 1; @(posedge ck[0]); #0.5 hit_clr = 0;
      repeat (30) begin
        @(posedge ck[0]); #0.5 trig_in = 64'(1) << $urandom_range(0, 63);
        #1 trig_in = '0;
      end
      // the group lands on sample 'ph' of the frame (phase clocks at +0..+3 ns)
      @(posedge ck[0]); #(3.5 + ph) trig_in = grp; #1 trig_in = '0;
      repeat (10) @(posedge ck[0]);
      chk(ntrig == nt0 + 1, $sformatf("acq %0d: triggers %0d", r, ntrig - nt0));
      chk(trig_phase == 2'(ph), $sformatf("acq %0d: phase %0d exp %0d", r, trig_phase, ph));
      chk(hit_info == grp, $sformatf("acq %0d: hit info %h", r, hit_info));
      #0.5 acq = 0;
      repeat (200) @(posedge ck[0]);
      #0.5 flush = 1; @(posedge ck[0]); #0.5 flush = 0; @(posedge ck[0]); #0.5;
      n = rd_avail;
      chk(n == 4 + 16 * 8, $sformatf("acq %0d: event words %0d", r, n));
      found_row = -1; found_s = -1; info_since = 0;
      for (int i = 0; i < n; i++) begin
        if (i == 2) chk(rd_data == 32'(r), "event counter");
        if (i == 3) begin
          chk(rd_data[31] && rd_data[17:16] == 2'(ph), "info word trigger and phase");
          info_since = int'(rd_data[15:0]);
        end
        if (i >= 4) begin
          int row, w;
          row = (i - 4) / 8; w = (i - 4) % 8;
          if (rd_data == grp[32 * (w % 2) +: 32] && (rd_data != 0)) begin
            if (w % 2 == 0) begin found_row = row; found_s = w / 2; end
          end
        end
        rd_en = 1; @(posedge ck[0]); #0.5 rd_en = 0;
      end
      row_t = 16 - 1 + 4 - info_since;
      chk(found_row == row_t && found_s == ph,
          $sformatf("acq %0d: group at row %0d sample %0d, info says row %0d sample %0d",
                    r, found_row, found_s, row_t, ph));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
