// I/O communication controller and protocol manager.
// Host transactions over a byte stream (rx_* in, tx_* out, valid/ready):
//   host ATN -> device ATN_RET -> host COMMAND (4 bytes)
//   -> device BUSY, READY, RESPONSE (6 bytes)
//   WRITE: device READY, host PAYLOAD (len words), device READY at the end
//   READ:  device BUSY, READY, PAYLOAD (len words), READY at the end
//   TASK:  nothing more; flags are set/cleared or lines/status/flags are
//          returned in the response value.
// While the device sends a READ payload, a BUSY byte from the host pauses
// it and READY resumes it (flow-control checker). Outside a transaction
// only ATN is honoured. If a COMMAND or WRITE payload stalls for TIMEOUT
// clocks the transaction is abandoned and 'timeouts' counts it. Payload
// words go to the device bus: a write strobes bus_we with bus_addr and
// bus_wdata; a read strobes bus_re and takes bus_rdata on the next clock.
// The TASK/WRITE/READ transactions, ATN/ATN_RET/BUSY/READY, flags, lines
// and status registers follow the document; codes come from io_cmd_pkg,
// and the bus is this design's simple register bus (the document's own
// internal bus is described elsewhere).
module io_comm_controller
  import io_cmd_pkg::*;
#(
  parameter int unsigned TIMEOUT = 250_000,
  parameter int unsigned NFLAGS  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  output logic [15:0]       bus_addr,
  output logic [31:0]       bus_wdata,
  output logic              bus_we,
  output logic              bus_re,
  input  logic [31:0]       bus_rdata,
  output logic [NFLAGS-1:0] flags,
  input  logic [31:0]       lines,
  input  logic [31:0]       status,
  output logic [15:0]       timeouts,
  output logic              in_transaction
);
  typedef enum logic [3:0] {
    S_IDLE, S_ATNRET, S_CMD, S_BUSY1, S_READY1, S_RESP, S_WREADY, S_WRX,
    S_RBUSY, S_RREADY, S_RFETCH, S_RSEND, S_DONE
  } st_t;
  st_t st;

  logic [7:0]  cmd [4];
  logic [1:0]  bidx;
  logic [2:0]  ridx;
  logic [8:0]  words_left;
  logic [31:0] word, resp_val;
  logic [7:0]  resp_st;
  logic [31:0] tmo;
  logic        host_busy, fix;
  logic        rvalid_q;
  ttype_t      tt;

  assign tt             = ttype(cmd[0]);
  assign fix            = cmd[0][0];
  assign in_transaction = (st != S_IDLE);

  function automatic logic [7:0] resp_byte(input logic [2:0] i, input logic [7:0] op,
                                           input logic [7:0] s, input logic [31:0] v);
    case (i)
      3'd0: return op | 8'h80;
      3'd1: return s;
      3'd2: return v[31:24];
      3'd3: return v[23:16];
      3'd4: return v[15:8];
      default: return v[7:0];
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; tx_valid <= 1'b0; tx_data <= '0; bus_addr <= '0; bus_wdata <= '0;
      bus_we <= 1'b0; bus_re <= 1'b0; flags <= '0; timeouts <= '0; bidx <= '0; ridx <= '0;
      words_left <= '0; word <= '0; resp_val <= '0; resp_st <= '0; tmo <= '0;
      host_busy <= 1'b0; rvalid_q <= 1'b0;
      for (int i = 0; i < 4; i++) cmd[i] <= '0;
    end else begin
      bus_we   <= 1'b0;
      bus_re   <= 1'b0;
      rvalid_q <= bus_re;
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      // flow-control checker: host pauses/resumes device output
      if (rx_valid && st != S_CMD && st != S_WRX) begin
        if (rx_data == BUSY)  host_busy <= 1'b1;
        if (rx_data == READY) host_busy <= 1'b0;
      end
      // receive timeout
      if (st == S_CMD || st == S_WRX) begin
        if (rx_valid) tmo <= '0;
        else if (tmo == 32'(TIMEOUT - 1)) begin
          timeouts <= timeouts + 1'b1;
          st       <= S_IDLE;
          tmo      <= '0;
        end else tmo <= tmo + 1'b1;
      end

      case (st)
        S_IDLE: begin
          host_busy <= 1'b0;
          if (rx_valid && rx_data == ATN) st <= S_ATNRET;
        end
        S_ATNRET: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= ATN_RET; bidx <= '0; tmo <= '0; st <= S_CMD;
        end
        // command receiver
        S_CMD: if (rx_valid) begin
          cmd[bidx] <= rx_data;
          bidx      <= bidx + 1'b1;
          if (bidx == 2'd3) st <= S_BUSY1;
        end
        // command processing
        S_BUSY1: if (!tx_valid) begin
          tx_valid   <= 1'b1; tx_data <= BUSY;
          bus_addr   <= {cmd[1], cmd[2]};
          words_left <= (cmd[3] == 0) ? 9'd256 : {1'b0, cmd[3]};
          resp_st    <= (tt == T_BAD) ? 8'd1 : 8'd0;
          resp_val   <= '0;
          case (cmd[0])
            OP_SET_FLAG:  flags[cmd[2][$clog2(NFLAGS)-1:0]] <= 1'b1;
            OP_CLR_FLAG:  flags[cmd[2][$clog2(NFLAGS)-1:0]] <= 1'b0;
            OP_RD_LINES:  resp_val <= lines;
            OP_RD_STATUS: resp_val <= status;
            OP_RD_FLAGS:  resp_val <= 32'(flags);
            default: ;
          endcase
          st <= S_READY1;
        end
        S_READY1: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= READY; ridx <= '0; st <= S_RESP;
        end
        // response sender
        S_RESP: if (!tx_valid) begin
          tx_valid <= 1'b1;
          tx_data  <= resp_byte(ridx, cmd[0], resp_st, resp_val);
          ridx     <= ridx + 1'b1;
          if (ridx == 3'd5) begin
            case (tt)
              T_WRITE: st <= S_WREADY;
              T_READ:  st <= S_RBUSY;
              default: st <= S_IDLE;
            endcase
          end
        end
        // payload receiver
        S_WREADY: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= READY; bidx <= '0; tmo <= '0; st <= S_WRX;
        end
        S_WRX: if (rx_valid) begin
          word <= {word[23:0], rx_data};
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            bus_we     <= 1'b1;
            bus_wdata  <= {word[23:0], rx_data};
            words_left <= words_left - 1'b1;
            if (words_left == 9'd1) st <= S_DONE;
          end
        end
        // payload sender
        S_RBUSY: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= BUSY; st <= S_RREADY;
        end
        S_RREADY: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= READY; st <= S_RFETCH;
        end
        S_RFETCH: begin
          if (!bus_re && !rvalid_q) bus_re <= 1'b1;
          if (rvalid_q) begin
            word <= bus_rdata;
            bidx <= '0;
            st   <= S_RSEND;
          end
        end
        S_RSEND: if (!tx_valid && !host_busy) begin
          tx_valid <= 1'b1;
          tx_data  <= word[31:24];
          word     <= {word[23:0], 8'd0};
          bidx     <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            words_left <= words_left - 1'b1;
            if (!fix) bus_addr <= bus_addr + 1'b1;
            st <= (words_left == 9'd1) ? S_DONE : S_RFETCH;
          end
        end
        S_DONE: if (!tx_valid) begin
          tx_valid <= 1'b1; tx_data <= READY; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      // write address advance after each payload word
      if (bus_we && !fix && tt == T_WRITE) bus_addr <= bus_addr + 1'b1;
    end
  end
endmodule
