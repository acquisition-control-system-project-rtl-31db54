// SPI master for the service devices (sensors, ADCs/DACs, ASIC registers).
// 'start' sends the low 'len' bits of 'wdata' (1..32, right-aligned) with the
// chip select low, mode 0 (data changes on the falling edge of sclk, is
// sampled on the rising edge), MSB first; the bits read on 'miso' are
// returned right-aligned in 'rdata' when 'busy' falls. sclk is the clock
// divided by 2*(div+1). The document names SPI controllers; mode, framing
// and ports are this design's choice.
module spi_master (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] wdata,
  input  logic [5:0]  len,
  input  logic [7:0]  div,
  output logic [31:0] rdata,
  output logic        busy,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        cs_n
);
  logic [31:0] sh;
  logic [5:0]  left;
  logic [7:0]  cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; cnt <= '0; rdata <= '0; busy <= 1'b0; sclk <= 1'b0; mosi <= 1'b0;
      cs_n <= 1'b1;
    end else if (!busy) begin
      if (start && len != 0) begin
        busy  <= 1'b1;
        cs_n  <= 1'b0;
        sh    <= wdata << (6'd32 - len);
        mosi  <= wdata[5'(len - 1'b1)];
        left  <= len;
        cnt   <= '0;
        rdata <= '0;
      end
    end else if (cnt != div) begin
      cnt <= cnt + 1'b1;
    end else begin
      cnt <= '0;
      if (!sclk) begin
        if (left == 0) begin
          busy <= 1'b0;
          cs_n <= 1'b1;
        end else begin
          sclk  <= 1'b1;                       // rising: sample
          rdata <= {rdata[30:0], miso};
          sh    <= {sh[30:0], 1'b0};
          left  <= left - 1'b1;
        end
      end else begin
        sclk <= 1'b0;                          // falling: next bit
        mosi <= sh[31];
      end
    end
  end
endmodule
