// Pixel-majority fast trigger, four phase stages, fixed latency.
// Each 'clk' cycle brings a frame of four consecutive 1 ns samples of the
// NCH trigger lines (samp[0] oldest). Stage p handles sample 4k+p: it ORs
// that sample with the three samples before it (reaching into the previous
// frame), so an event spread over up to four samples is not lost, counts
// the ones in the 64-bit OR word with a pipelined adder (groups of 8, then
// the group sums) and compares the count with 'thr' (count >= thr fires).
// All paths have the same depth, so the latency is fixed: stage_trig for
// frame k appears LAT=4 clocks after the frame is presented. 'or_word' is the
// OR word delayed to line up with stage_trig, for the hit-info generator.
// Four stages, OR of four samples and a pipelined sum are the document's;
// the pipeline split and the >= comparison are this design's choice.
module majority_trigger #(
  parameter int unsigned NCH = 64,
  localparam int unsigned CW = $clog2(NCH + 1),
  localparam int unsigned NG = (NCH + 7) / 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid,
  input  logic [3:0][NCH-1:0]      samp,
  input  logic [CW-1:0]            thr,
  output logic [3:0]               stage_trig,
  output logic [3:0][NCH-1:0]      or_word
);
  logic [3:0][NCH-1:0]   prev, orw;
  logic [3:0][NG-1:0][3:0] gcnt;
  logic [3:0][CW-1:0]    cnt;
  logic [3:0][NCH-1:0]   or_d1, or_d2;

  logic [3:0][NCH-1:0]   orw_c;
  logic [3:0][NG-1:0][3:0] gcnt_c;
  logic [3:0][CW-1:0]    cnt_c;
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      orw_c[p] = samp[p];
      for (int d = 1; d < 4; d++)
        orw_c[p] = orw_c[p] | ((p - d >= 0) ? samp[(p - d) & 3] : prev[(p - d) & 3]);
      for (int g = 0; g < NG; g++) begin
        gcnt_c[p][g] = '0;
        for (int k = g * 8; k < g * 8 + 8; k++)
          if (k < NCH) gcnt_c[p][g] = gcnt_c[p][g] + 4'(orw[p][k]);
      end
      cnt_c[p] = '0;
      for (int g = 0; g < NG; g++) cnt_c[p] = cnt_c[p] + CW'(gcnt[p][g]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; orw <= '0; gcnt <= '0; cnt <= '0;
      stage_trig <= '0; or_d1 <= '0; or_d2 <= '0; or_word <= '0;
    end else begin
      // stage 1: OR of four consecutive samples
      if (valid) prev <= samp;
      orw  <= valid ? orw_c : '0;
      // stage 2: per-group ones count
      gcnt  <= gcnt_c;
      or_d1 <= orw;
      // stage 3: total count
      cnt   <= cnt_c;
      or_d2 <= or_d1;
      // stage 4: compare
      for (int p = 0; p < 4; p++) stage_trig[p] <= (thr != '0) && (cnt[p] >= thr);
      or_word <= or_d2;
    end
  end
endmodule
