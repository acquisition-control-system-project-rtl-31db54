// Reset delay timer followed by reset pulse timer.
// A 'start' pulse (the end of an acquisition) starts a delay of 'delay'
// clocks ('rst_out' rises 'delay' clocks after the clock edge that
// takes 'start', or one clock after for delay 0) and stays high for 'width' clocks; this is the
// programmable acquisition reset sent to the front end. A new 'start'
// while the timer runs restarts it. 'width' = 0 disables the pulse. The
// document names the two timers; their exact behaviour is this design's.
module reset_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] delay,
  input  logic [15:0] width,
  output logic        rst_out
);
  typedef enum logic [1:0] {IDLE, DLY, PULSE} st_t;
  st_t         st;
  logic [15:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; rst_out <= 1'b0;
    end else if (start) begin
      rst_out <= 1'b0;
      cnt     <= delay;
      st      <= DLY;
    end else begin
      case (st)
        IDLE: rst_out <= 1'b0;
        DLY: if (cnt > 16'd1) cnt <= cnt - 1'b1;
             else if (width == 0) st <= IDLE;
             else begin
               rst_out <= 1'b1;
               cnt     <= width - 1'b1;
               st      <= PULSE;
             end
        PULSE: if (cnt != 0) cnt <= cnt - 1'b1;
               else begin
                 rst_out <= 1'b0;
                 st      <= IDLE;
               end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
