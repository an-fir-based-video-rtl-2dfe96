// i2c_slave: I2C bus slave of the parameter programming interface.
//
// SCL and SDA are sampled with the core clock through two-flop
// synchronisers; START and STOP are SDA edges while SCL is high, data bits
// are taken on SCL rising edges and the slave changes SDA only after SCL
// falling edges. After a START the first byte is the 7-bit device address
// and the R/W bit; on a match the slave acknowledges.
//   write: every following byte is acknowledged and handed out on wr_valid
//          (wr_first marks the first byte after the address);
//   read:  the slave sends rd_byte, pulsing rd_next when it takes it, and
//          goes on while the master acknowledges each byte.
// SDA is open drain: sda_oe high pulls the line low.
//
// The document chooses a slave-mode I2C port for run-time programming; the
// byte protocol above is standard I2C, the oversampling scheme is this
// design's. The core clock must be at least about 20 times the SCL rate.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h2C
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic       wr_valid,
  output logic [7:0] wr_byte,
  output logic       wr_first,
  input  logic [7:0] rd_byte,
  output logic       rd_next,
  output logic       start_evt,
  output logic       stop_evt
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK_ADDR, S_WDATA, S_ACK_W,
                            S_RDATA, S_RACK, S_RNEXT} state_e;
  state_e state;

  logic [2:0] scl_s, sda_s;
  logic scl_rise, scl_fall, start_c, stop_c;
  logic [7:0] sh, tx;
  logic [3:0] bitcnt;
  logic first;

  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c   = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1; sda_s <= '1;
      state <= S_IDLE; sh <= '0; tx <= '0; bitcnt <= '0; first <= 1'b0;
      sda_oe <= 1'b0; wr_valid <= 1'b0; wr_byte <= '0; wr_first <= 1'b0;
      rd_next <= 1'b0; start_evt <= 1'b0; stop_evt <= 1'b0;
    end else begin
      scl_s <= {scl_s[1:0], scl}; sda_s <= {sda_s[1:0], sda_i};
      wr_valid <= 1'b0; rd_next <= 1'b0; start_evt <= start_c; stop_evt <= stop_c;
      if (start_c) begin
        state <= S_ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        state <= S_IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_WDATA: begin
            if (scl_rise && bitcnt < 4'd8) begin
              sh <= {sh[6:0], sda_s[1]}; bitcnt <= bitcnt + 1'b1;
            end
            if (scl_fall && bitcnt == 4'd8) begin
              if (state == S_ADDR) begin
                if (sh[7:1] == DEV_ADDR) begin sda_oe <= 1'b1; state <= S_ACK_ADDR; end
                else state <= S_IDLE;
              end else begin
                wr_valid <= 1'b1; wr_byte <= sh; wr_first <= first; first <= 1'b0;
                sda_oe <= 1'b1; state <= S_ACK_W;
              end
            end
          end
          S_ACK_ADDR: if (scl_fall) begin
            if (sh[0]) begin
              tx <= rd_byte; rd_next <= 1'b1; sda_oe <= !rd_byte[7];
              bitcnt <= 4'd1; state <= S_RDATA;
            end else begin
              sda_oe <= 1'b0; bitcnt <= '0; first <= 1'b1; state <= S_WDATA;
            end
          end
          S_ACK_W: if (scl_fall) begin
            sda_oe <= 1'b0; bitcnt <= '0; state <= S_WDATA;
          end
          S_RDATA: if (scl_fall) begin
            if (bitcnt == 4'd8) begin sda_oe <= 1'b0; state <= S_RACK; end
            else begin sda_oe <= !tx[3'd7 - bitcnt[2:0]]; bitcnt <= bitcnt + 1'b1; end
          end
          S_RACK: if (scl_rise) state <= sda_s[1] ? S_IDLE : S_RNEXT;
          S_RNEXT: if (scl_fall) begin
            tx <= rd_byte; rd_next <= 1'b1; sda_oe <= !rd_byte[7];
            bitcnt <= 4'd1; state <= S_RDATA;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
