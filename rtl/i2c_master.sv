// i2c_master: I2C controller linking the Wishbone bus to the sensor.
//
// A Wishbone slave with four byte registers (address bits 1:0):
//   0 PRE     quarter SCL period in clock cycles, minus 1 (reset 24:
//             100 kHz at 10 MHz)
//   1 TXD     byte to send
//   2 RXD     last byte read (read only)
//   3 CMD     write: bit 0 START, bit 1 STOP, bit 2 WRITE, bit 3 READ,
//             bit 4 NACK (acknowledge bit sent after READ: 1 = not acknowledge)
//     STATUS  read: bit 0 busy, bit 1 the slave did not acknowledge the last
//             written byte
// One CMD write runs, in order, an optional (repeated) START, an optional
// byte WRITE or READ with its acknowledge bit, and an optional STOP; software
// polls busy. Every bit takes four quarter periods: SCL low while SDA is set
// up, SCL released, SCL high with SDA sampled at the end of the third
// quarter, SCL low. While SCL is released the quarter timer waits for scl_i to
// read high, so a slave may stretch the clock. Between commands of one
// transfer SCL is held low; after STOP both lines are released. The pins are
// open drain: scl_oe and sda_oe high pull the line low, scl_i and sda_i read
// it. Every access is acknowledged in the cycle after the strobe.
// That the controller connects the bus to the sensor over I2C follows the
// document; the command set and register map are this design's own choices.
module i2c_master
  import sn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_m2s_t wb,
  output wb_s2m_t wb_rsp,
  output logic    scl_oe,
  input  logic    scl_i,
  output logic    sda_oe,
  input  logic    sda_i
);
  typedef enum logic [1:0] {P_IDLE, P_START, P_BIT, P_STOP} phase_e;

  byte_t  pre, txd, rxd, cnt, sh;
  logic   ack, hold, rx_nack;
  logic   c_stop, c_wr, c_rd, c_nack;
  phase_e ph;
  logic [1:0] q;
  logic [3:0] bitn;

  logic acc, wr;
  assign acc = wb.cyc && wb.stb && !ack;
  assign wr  = acc && wb.we;

  logic stretch, qend;
  assign stretch = (q == 2'd1 || q == 2'd2) && !scl_i;
  assign qend    = (cnt == pre) && !stretch;

  // What follows the current phase.
  phase_e after_start, after_byte;
  assign after_start = (c_wr || c_rd) ? P_BIT : (c_stop ? P_STOP : P_IDLE);
  assign after_byte  = c_stop ? P_STOP : P_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= 8'd24; txd <= '0; rxd <= '0; cnt <= '0; sh <= '0; ack <= 1'b0;
      hold <= 1'b0; rx_nack <= 1'b0; c_stop <= 1'b0; c_wr <= 1'b0; c_rd <= 1'b0;
      c_nack <= 1'b0; ph <= P_IDLE; q <= '0; bitn <= '0;
    end else begin
      ack <= acc;
      if (wr) begin
        unique case (wb.adr[1:0])
          2'd0: pre <= wb.dat;
          2'd1: txd <= wb.dat;
          2'd3: if (ph == P_IDLE) begin
                  c_stop <= wb.dat[1]; c_wr <= wb.dat[2]; c_rd <= wb.dat[3] && !wb.dat[2];
                  c_nack <= wb.dat[4];
                  sh <= txd; bitn <= '0; q <= '0; cnt <= '0;
                  if (wb.dat[0])                ph <= P_START;
                  else if (wb.dat[2] || wb.dat[3]) ph <= P_BIT;
                  else if (wb.dat[1])           ph <= P_STOP;
                end
          default: ;
        endcase
      end
      if (ph != P_IDLE) begin
        if (!qend) begin
          if (!stretch) cnt <= cnt + 1'b1;
        end else begin
          cnt <= '0;
          q   <= q + 1'b1;
          if (ph == P_BIT && q == 2'd2) begin
            if (bitn != 4'd8) sh <= {sh[6:0], sda_i};
            else if (c_wr)    rx_nack <= sda_i;
          end
          if (q == 2'd3) begin
            unique case (ph)
              P_START: begin hold <= 1'b1; ph <= after_start; bitn <= '0; end
              P_BIT: begin
                if (bitn == 4'd8) begin
                  if (c_rd) rxd <= sh;
                  ph <= after_byte;
                end
                bitn <= bitn + 1'b1;
              end
              P_STOP: begin hold <= 1'b0; ph <= P_IDLE; end
              default: ;
            endcase
          end
        end
      end
    end
  end

  // Pin drivers.
  always_comb begin
    scl_oe = hold;
    sda_oe = 1'b0;
    unique case (ph)
      P_START: begin
        scl_oe = (q == 2'd0) ? hold : (q == 2'd3);
        sda_oe = (q >= 2'd2);
      end
      P_BIT: begin
        scl_oe = (q == 2'd0) || (q == 2'd3);
        if (bitn != 4'd8) sda_oe = c_wr && !sh[7];
        else              sda_oe = c_rd && !c_nack;
      end
      P_STOP: begin
        scl_oe = (q == 2'd0);
        sda_oe = (q <= 2'd1);
      end
      default: ;
    endcase
  end

  always_comb begin
    wb_rsp.ack = ack;
    unique case (wb.adr[1:0])
      2'd0:    wb_rsp.dat = pre;
      2'd1:    wb_rsp.dat = txd;
      2'd2:    wb_rsp.dat = rxd;
      default: wb_rsp.dat = {6'b0, rx_nack, ph != P_IDLE};
    endcase
  end
endmodule
