// spi_master: SPI controller linking the Wishbone bus to the RF transceiver.
//
// A Wishbone slave with four byte registers (address bits 1:0):
//   0 DATA   write: send the byte and start a transfer; read: last byte received
//   1 STATUS bit 0: transfer in progress
//   2 DIV    SCLK half period in clock cycles, minus 1
//   3 CS     bit 0: 1 pulls the chip select cs_n low
// SPI mode 0, most significant bit first: SCLK idles low, mosi changes on the
// falling edge and miso is sampled on the rising edge. A byte takes
// 16 * (DIV + 1) clock cycles. A write to DATA while busy is dropped. The
// chip-select line is left to software so that multi-byte transceiver
// commands (as for a CC2420) stay framed. Every access is acknowledged in the
// cycle after the strobe.
// That the controller connects the bus to an SPI transceiver follows the
// document; the register map and the mode are this design's own choices.
module spi_master
  import sn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_m2s_t wb,
  output wb_s2m_t wb_rsp,
  output logic    sclk,
  output logic    mosi,
  input  logic    miso,
  output logic    cs_n
);
  byte_t      div, txsh, rxsh, rxd;
  logic       cs, busy;
  byte_t      cnt;
  logic [4:0] half;     // half-periods done in the current byte
  logic       ack;

  logic acc, wr;
  assign acc = wb.cyc && wb.stb && !ack;
  assign wr  = acc && wb.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 8'd4; txsh <= '0; rxsh <= '0; rxd <= '0; cs <= 1'b0; busy <= 1'b0;
      cnt <= '0; half <= '0; sclk <= 1'b0; ack <= 1'b0;
    end else begin
      ack <= acc;
      if (wr) begin
        unique case (wb.adr[1:0])
          2'd0: if (!busy) begin
                  txsh <= wb.dat; busy <= 1'b1; cnt <= '0; half <= '0; sclk <= 1'b0;
                end
          2'd2: div <= wb.dat;
          2'd3: cs  <= wb.dat[0];
          default: ;
        endcase
      end
      if (busy) begin
        if (cnt == div) begin
          cnt  <= '0;
          sclk <= !sclk;
          half <= half + 1'b1;
          if (!sclk) rxsh <= {rxsh[6:0], miso};         // rising edge: sample
          else       txsh <= {txsh[6:0], 1'b0};         // falling edge: next bit
          if (half == 5'd15) begin
            busy <= 1'b0;
            rxd  <= rxsh;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign mosi = txsh[7];
  assign cs_n = !cs;

  always_comb begin
    wb_rsp.ack = ack;
    unique case (wb.adr[1:0])
      2'd0:    wb_rsp.dat = rxd;
      2'd1:    wb_rsp.dat = {7'b0, busy};
      2'd2:    wb_rsp.dat = div;
      default: wb_rsp.dat = {7'b0, cs};
    endcase
  end
endmodule
