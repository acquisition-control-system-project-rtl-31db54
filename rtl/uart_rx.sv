// UART receiver, 8 data bits, no parity, one stop bit, LSB first.
// The line is synchronised with two flops; a falling edge starts a frame,
// each bit is sampled in its middle, and a byte with a valid stop bit is
// output with a one-clock 'valid'. A bad stop bit increments 'frame_err'
// and drops the byte. CLKS_PER_BIT as in uart_tx.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic [7:0] frame_err
);
  logic [1:0]  s;
  logic [3:0]  nbit;
  logic [15:0] cnt;
  logic [7:0]  sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 2'b11; nbit <= '0; cnt <= '0; sh <= '0; valid <= 1'b0; data <= '0; frame_err <= '0;
    end else begin
      s     <= {s[0], rx};
      valid <= 1'b0;
      if (nbit == 0) begin
        if (!s[1]) begin
          nbit <= 4'd10;
          cnt  <= 16'(CLKS_PER_BIT / 2);
        end
      end else if (cnt == 16'(CLKS_PER_BIT - 1)) begin
        cnt  <= '0;
        nbit <= nbit - 1'b1;
        if (nbit == 4'd10) begin
          if (s[1]) nbit <= '0;           // false start
        end else if (nbit == 4'd1) begin
          if (s[1]) begin valid <= 1'b1; data <= sh; end
          else      frame_err <= frame_err + 1'b1;
        end else begin
          sh <= {s[1], sh[7:1]};
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
