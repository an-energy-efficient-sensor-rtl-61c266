// uart: UART controller linking the Wishbone bus to a PC for debug output.
//
// A Wishbone slave with four byte registers (address bits 1:0):
//   0 DATA   write: send the byte; read: last received byte, clears RX ready
//   1 STATUS bit 0: transmitter busy, bit 1: received byte ready,
//            bit 2: overrun (a byte arrived before the last one was read;
//            cleared by reading DATA)
//   2 DIVLO, 3 DIVHI  clock cycles per bit, minus 1 (reset: 86, 115200 baud
//            at 10 MHz)
// Frames are 8N1: a low start bit, eight data bits LSB first, a high stop
// bit. The receiver synchronises rx through two flip-flops, confirms the
// start bit at its middle and samples every bit at its middle; a frame whose
// stop bit is low is discarded. A write to DATA while the transmitter is busy
// is dropped. Every access is acknowledged in the cycle after the strobe.
// That the controller connects the bus to a PC follows the document; the
// frame format and register map are this design's own choices.
module uart
  import sn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_m2s_t wb,
  output wb_s2m_t wb_rsp,
  output logic    tx,
  input  logic    rx
);
  logic [15:0] div;
  logic        ack;
  logic acc, wr, rd_data;
  assign acc     = wb.cyc && wb.stb && !ack;
  assign wr      = acc && wb.we;
  assign rd_data = acc && !wb.we && (wb.adr[1:0] == 2'd0);

  // Transmitter.
  logic [9:0]  tsh;
  logic [3:0]  tbits;
  logic [15:0] tcnt;
  logic        tbusy;

  // Receiver.
  logic        rx_q1, rx_q2;
  logic [15:0] rcnt;
  logic [3:0]  rbits;
  logic [7:0]  rsh, rxd;
  logic        rbusy, rready, rovr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 16'd86; ack <= 1'b0;
      tsh <= '1; tbits <= '0; tcnt <= '0; tbusy <= 1'b0;
      rx_q1 <= 1'b1; rx_q2 <= 1'b1; rcnt <= '0; rbits <= '0; rsh <= '0; rxd <= '0;
      rbusy <= 1'b0; rready <= 1'b0; rovr <= 1'b0;
    end else begin
      ack <= acc;
      if (wr) begin
        unique case (wb.adr[1:0])
          2'd0: if (!tbusy) begin
                  tsh <= {1'b1, wb.dat, 1'b0}; tbits <= 4'd10; tcnt <= '0; tbusy <= 1'b1;
                end
          2'd2: div[7:0]  <= wb.dat;
          2'd3: div[15:8] <= wb.dat;
          default: ;
        endcase
      end
      // transmit: hold each bit div+1 cycles
      if (tbusy) begin
        if (tcnt == div) begin
          tcnt  <= '0;
          tsh   <= {1'b1, tsh[9:1]};
          tbits <= tbits - 1'b1;
          if (tbits == 4'd1) tbusy <= 1'b0;
        end else begin
          tcnt <= tcnt + 1'b1;
        end
      end
      // receive
      rx_q1 <= rx; rx_q2 <= rx_q1;
      if (rd_data) begin rready <= 1'b0; rovr <= 1'b0; end
      if (!rbusy) begin
        if (!rx_q2) begin rbusy <= 1'b1; rcnt <= '0; rbits <= '0; end
      end else if (rbits == 4'd0 ? (rcnt == (div >> 1)) : (rcnt == div)) begin
        rcnt  <= '0;
        rbits <= rbits + 1'b1;
        if (rbits == 4'd0) begin
          if (rx_q2) rbusy <= 1'b0;                 // glitch, not a start bit
        end else if (rbits <= 4'd8) begin
          rsh <= {rx_q2, rsh[7:1]};
        end else begin
          rbusy <= 1'b0;
          if (rx_q2) begin
            rxd <= rsh; rready <= 1'b1;
            if (rready && !rd_data) rovr <= 1'b1;
          end
        end
      end else begin
        rcnt <= rcnt + 1'b1;
      end
    end
  end

  assign tx = tsh[0] | !tbusy;

  always_comb begin
    wb_rsp.ack = ack;
    unique case (wb.adr[1:0])
      2'd0:    wb_rsp.dat = rxd;
      2'd1:    wb_rsp.dat = {5'b0, rovr, rready, tbusy};
      2'd2:    wb_rsp.dat = div[7:0];
      default: wb_rsp.dat = div[15:8];
    endcase
  end
endmodule
