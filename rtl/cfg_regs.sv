// Device parameter configuration registers.
// N 32-bit registers on the device bus: a write ('we') to address a < N
// stores 'wdata' in register a; 'rdata' returns register 'raddr' one clock
// after 're'. All registers are visible in parallel on 'regs', from which
// the modules take their settings. Reset values come from RESET. The
// document shows a configuration register block on the device bus; its
// size and layout are this design's.
module cfg_regs #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0][31:0] RESET = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [15:0]        waddr,
  input  logic [31:0]        wdata,
  input  logic               re,
  input  logic [15:0]        raddr,
  output logic [31:0]        rdata,
  output logic [N-1:0][31:0] regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= RESET;
      rdata <= '0;
    end else begin
      if (we && 32'(waddr) < N) regs[waddr[$clog2(N)-1:0]] <= wdata;
      if (re) rdata <= (32'(raddr) < N) ? regs[raddr[$clog2(N)-1:0]] : 32'd0;
    end
  end
endmodule
