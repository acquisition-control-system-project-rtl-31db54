// Double fast synchronous counter for one channel.
// Two small counters alternate: the one selected by 'sel' counts the edge
// pulses ('cnt_en' is an enable, the clock is always the reference clock),
// while the other holds its value on 'word' for transfer and is then cleared
// through its own asynchronous clear (clr[i] clears counter i). Counters
// wrap freely (no recirculation control): the transfer period must keep the
// count below 2**W. All of this follows the document. SHIFT_ENC selects the
// alternative build the document mentions, a shift register plus encoder;
// here that is a Johnson (twisted-ring) shift register of 2**(W-1) stages
// whose state is encoded to binary, which is this design's own choice.
// Timing: 'word' shows the stopped counter combinationally from its flops;
// the caller changes 'sel' and reads 'word' a few clocks later.
module dual_fast_counter #(
  parameter int unsigned W         = 8,
  parameter bit          SHIFT_ENC = 1'b0
) (
  input  logic         clk_fast,
  input  logic         cnt_en,
  input  logic         sel,
  input  logic [1:0]   clr,
  output logic [W-1:0] word
);
  logic [W-1:0] val [2];

  for (genvar i = 0; i < 2; i++) begin : g_cnt
    logic c_clr;
    assign c_clr = clr[i];
    if (!SHIFT_ENC) begin : g_bin
      logic [W-1:0] q;
      always_ff @(posedge clk_fast or posedge c_clr) begin
        if (c_clr)                   q <= '0;
        else if (cnt_en && sel == i[0]) q <= q + 1'b1;
      end
      assign val[i] = q;
    end else begin : g_johnson
      localparam int unsigned L = 2 ** (W - 1);
      logic [L-1:0] sr;
      logic [W-1:0] ones;
      always_ff @(posedge clk_fast or posedge c_clr) begin
        if (c_clr)                     sr <= '0;
        else if (cnt_en && sel == i[0]) sr <= {sr[L-2:0], ~sr[L-1]};
      end
      always_comb begin
        ones = '0;
        for (int k = 0; k < L; k++) ones = ones + W'(sr[k]);
      end
      // filling phase: count = number of ones; emptying phase: 2L - ones
      assign val[i] = sr[0] ? ones : W'(2 * L) - ones;
    end
  end

  assign word = sel ? val[0] : val[1];
endmodule
