// UART transmitter, 8 data bits, no parity, one stop bit, LSB first.
// A byte offered with 'valid' is taken when 'ready' is high and sent at
// one bit per CLKS_PER_BIT clocks (25 clocks at 250 MHz is 10 MBaud, the
// top rate the document quotes for its UART links). Frame format and
// handshake are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 25
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);
  logic [9:0]  sh;
  logic [3:0]  nbit;
  logic [15:0] cnt;
  assign ready = (nbit == 0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; nbit <= '0; cnt <= '0; tx <= 1'b1;
    end else if (nbit == 0) begin
      tx <= 1'b1;
      if (valid) begin
        sh   <= {1'b1, data, 1'b0};
        nbit <= 4'd10;
        cnt  <= '0;
      end
    end else begin
      tx <= sh[0];
      if (cnt == 16'(CLKS_PER_BIT - 1)) begin
        cnt  <= '0;
        sh   <= {1'b1, sh[9:1]};
        nbit <= nbit - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
