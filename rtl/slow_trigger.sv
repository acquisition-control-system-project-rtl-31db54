// Slow (hadronic) trigger algorithm of the counters module.
// At every transfer ('valid') the NCH count words are summed by a two-stage
// pipelined adder tree (groups of 8, then the group sums). The total feeds a
// moving average over the last 2**avg_log2 totals (1..16), kept as a running
// sum with a shift history; the average is compared with 'thr' and a rising
// edge of (average > thr) gives a one-clock 'trigger'. 'trigger_dly' is the
// same pulse delayed by 'delay' clocks through a tap-selected delay line.
// The sum / moving average / threshold / delay chain is the document's; the
// power-of-two window, the pipeline depth and the delay range are this
// design's own. Latency: 'trigger' comes 4 clocks after the 'valid' whose
// words made the average cross the threshold. History and average are
// cleared while 'clear' is high.
module slow_trigger #(
  parameter int unsigned NCH  = 64,
  parameter int unsigned W    = 8,
  parameter int unsigned DMAX = 64,
  localparam int unsigned SW  = W + $clog2(NCH),
  localparam int unsigned NG  = (NCH + 7) / 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                valid,
  input  logic [NCH-1:0][W-1:0] words,
  input  logic [2:0]          avg_log2,
  input  logic [SW-1:0]       thr,
  input  logic [$clog2(DMAX)-1:0] delay,
  output logic [SW-1:0]       average,
  output logic                trigger,
  output logic                trigger_dly
);
  logic [NG-1:0][SW-1:0] gsum;
  logic [SW-1:0]         total;
  logic                  v1, v2, v3, above_q;
  logic [SW-1:0]         hist [16];
  logic [SW+3:0]         acc;

  logic [NG-1:0][SW-1:0] gsum_c;
  logic [SW-1:0]         total_c;
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      gsum_c[g] = '0;
      for (int k = g * 8; k < g * 8 + 8; k++)
        if (k < NCH) gsum_c[g] = gsum_c[g] + SW'(words[k]);
    end
    total_c = '0;
    for (int g = 0; g < NG; g++) total_c = total_c + gsum[g];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gsum <= '0; total <= '0; v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      acc <= '0; average <= '0; above_q <= 1'b0; trigger <= 1'b0;
      for (int k = 0; k < 16; k++) hist[k] <= '0;
    end else begin
      v1 <= valid && !clear;
      v2 <= v1 && !clear;
      v3 <= v2 && !clear;
      trigger <= 1'b0;
      if (valid) gsum <= gsum_c;
      if (v1)    total <= total_c;
      if (clear) begin
        acc <= '0; average <= '0; above_q <= 1'b0;
        for (int k = 0; k < 16; k++) hist[k] <= '0;
      end else begin
        if (v2) begin
          acc     <= acc + (SW+4)'(total) - (SW+4)'(hist[(4'd1 << avg_log2) - 4'd1]);
          hist[0] <= total;
          for (int k = 1; k < 16; k++) hist[k] <= hist[k-1];
        end
        if (v3) begin
          average <= SW'(acc >> avg_log2);
          above_q <= SW'(acc >> avg_log2) > thr;
          trigger <= (SW'(acc >> avg_log2) > thr) && !above_q;
        end
      end
    end
  end

  logic [DMAX-1:0] dl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl <= '0;
    else        dl <= {dl[DMAX-2:0], trigger};
  end
  assign trigger_dly = (delay == '0) ? trigger : dl[delay - 1'b1];
endmodule
