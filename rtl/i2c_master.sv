// I2C master for the service sensors, byte-command driven.
// Commands (taken with 'cmd_valid' while not busy): 0 START (also a
// repeated start), 1 STOP, 2 WRITE 'wbyte' then read the slave's ACK into
// 'ack' (0 = acknowledged), 3 READ a byte into 'rbyte' then send 'nack'
// as the master's acknowledge bit. Each bit takes four quarter periods of
// div+1 clocks; SCL is high in quarters 1 and 2 and SDA is sampled at the
// start of quarter 2. Outputs are open-drain enables: scl_o/sda_o = 0 pulls
// the line low, 1 releases it; 'sda_i' is the line as seen on the pin.
// No clock stretching or arbitration. The document names I2C controllers;
// everything here is this design's choice.
module i2c_master (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  logic [1:0] cmd,
  input  logic [7:0] wbyte,
  input  logic       nack,
  input  logic [7:0] div,
  output logic       busy,
  output logic [7:0] rbyte,
  output logic       ack,
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);
  logic [1:0] op, q;
  logic [3:0] bitn;
  logic [7:0] cnt, sh;
  logic       qend;
  assign qend = (cnt == div);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; q <= '0; bitn <= '0; cnt <= '0; sh <= '0; busy <= 1'b0; rbyte <= '0; ack <= 1'b1;
      scl_o <= 1'b1; sda_o <= 1'b1;
    end else if (!busy) begin
      if (cmd_valid) begin
        busy <= 1'b1; op <= cmd; q <= '0; bitn <= '0; cnt <= '0; sh <= wbyte;
      end
    end else begin
      cnt <= qend ? 8'd0 : cnt + 1'b1;
      if (qend) q <= q + 1'b1;
      case (op)
        2'd0: begin                          // START: SDA falls while SCL high
          case (q)
            2'd0: begin sda_o <= 1'b1; scl_o <= (scl_o | sda_o); end
            2'd1: scl_o <= 1'b1;
            2'd2: sda_o <= 1'b0;
            default: begin scl_o <= 1'b0; if (qend) busy <= 1'b0; end
          endcase
        end
        2'd1: begin                          // STOP: SDA rises while SCL high
          case (q)
            2'd0: begin sda_o <= 1'b0; scl_o <= 1'b0; end
            2'd1: scl_o <= 1'b1;
            2'd2: sda_o <= 1'b1;
            default: if (qend) busy <= 1'b0;
          endcase
        end
        default: begin                       // 9 bits: 8 data + acknowledge
          case (q)
            2'd0: begin
              scl_o <= 1'b0;
              if (bitn < 4'd8) sda_o <= (op == 2'd2) ? sh[7] : 1'b1;
              else             sda_o <= (op == 2'd2) ? 1'b1 : nack;
            end
            2'd1: scl_o <= 1'b1;
            2'd2: if (cnt == 0) begin
              if (bitn < 4'd8) begin
                sh <= {sh[6:0], sda_i};
              end else if (op == 2'd2) begin
                ack <= sda_i;
              end
            end
            default: begin
              scl_o <= 1'b0;
              if (qend) begin
                bitn <= bitn + 1'b1;
                if (bitn == 4'd7 && op == 2'd3) rbyte <= sh;
                if (bitn == 4'd8) busy <= 1'b0;
              end
            end
          endcase
        end
      endcase
    end
  end
endmodule
