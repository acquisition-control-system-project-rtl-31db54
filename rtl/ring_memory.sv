// Free-run ring memory.
// A circular buffer of DEPTH words: each 'wr_en' writes 'wr_data' at the
// write pointer and advances it, overwriting the oldest sample, so the
// memory always holds the most recent DEPTH samples. The owner stops writing
// when acquisition stops and then reads any address back ('rd_addr'), with
// one clock of read latency as in an FPGA block RAM. 'wr_ptr' is the next
// position to be written, i.e. one past the newest sample. The document
// gives the function; sizes and the read port are this design's choice.
module ring_memory #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic [AW-1:0] wr_ptr
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wr_ptr <= '0;
    else if (wr_en) wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
