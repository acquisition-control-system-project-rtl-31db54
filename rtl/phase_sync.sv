// Phase synchroniser for N phase-shifted sampling clocks.
// 'acq' is produced in the clk_ph[0] domain. Stage 0 registers it on
// clk_ph[0]; stage i registers stage i-1 on clk_ph[i], the next clock to
// rise, so the level walks around the phases in sampling order and every
// phase sees a change of ACQUIRE in the same sample frame: stage i's enable
// en[i] changes 1/N of a period after stage i-1's. A sampling register on
// clk_ph[i] gated by en[i] therefore starts and stops on the same frame as
// all the others. The document asks for such a circuit with the number of
// stages as a design parameter; this chained structure is its own choice.
// Clocks must be ordered: clk_ph[i] rises after clk_ph[i-1] within one
// period of clk_ph[0].
module phase_sync #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] clk_ph,
  input  logic         rst_n,
  input  logic         acq,
  output logic [N-1:0] en
);
  for (genvar i = 0; i < N; i++) begin : g_st
    logic d, q;
    if (i == 0) begin : g_first
      assign d = acq;
    end else begin : g_next
      assign d = en[i-1];
    end
    always_ff @(posedge clk_ph[i] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
    assign en[i] = q;
  end
endmodule
