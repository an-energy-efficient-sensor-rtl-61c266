// tb_spi_master: self-checking test of the SPI controller.
//
// A mode-0 SPI slave model in the testbench captures mosi on rising SCLK
// edges and shifts out its own byte on miso. Random bytes are exchanged at
// two clock dividers; the testbench checks the byte the slave received, the
// byte read back from DATA, the busy flag, chip select, a write dropped while
// busy, and the transfer time of 16 * (DIV + 1) cycles.
module tb_spi_master;
  import sn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_m2s_t wb;
  wb_s2m_t rsp;
  logic sclk, mosi, miso, cs_n;
  spi_master dut (.clk, .rst_n, .wb, .wb_rsp(rsp), .sclk, .mosi, .miso, .cs_n);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_wr(input logic [7:0] a, input byte_t d);
    @(negedge clk); wb = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: d};
    do @(negedge clk); while (!rsp.ack);
    wb = '0;
  endtask
  task automatic wb_rd(input logic [7:0] a, output byte_t d);
    @(negedge clk); wb = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: a, dat: 8'h00};
    do @(negedge clk); while (!rsp.ack);
    d = rsp.dat; wb = '0;
  endtask

  // Slave model.
  byte_t s_rx, s_tx;
  int    s_bits;
  always @(posedge sclk) begin s_rx <= {s_rx[6:0], mosi}; s_bits <= s_bits + 1; end
  always @(negedge sclk) s_tx <= {s_tx[6:0], 1'b0};
  assign miso = s_tx[7];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic xfer(input byte_t m, input byte_t s, input int div);
    byte_t r;
    int t0;
    s_tx = s; s_bits = 0;
    wb_wr(8'h00, m); t0 = cyc;
    wb_wr(8'h00, ~m);   // dropped: busy
    do wb_rd(8'h01, r); while (r[0]);
    chk((cyc - t0) <= 16 * (div + 1) + 4 && (cyc - t0) >= 16 * (div + 1),
        $sformatf("transfer took %0d cycles for div %0d", cyc - t0, div));
    chk(s_bits == 8, $sformatf("%0d SCLK pulses", s_bits));
    chk(s_rx == m, $sformatf("slave got %02x expected %02x", s_rx, m));
    wb_rd(8'h00, r);
    chk(r == s, $sformatf("master got %02x expected %02x", r, s));
    chk(sclk == 1'b0, "SCLK idles low");
  endtask

  initial begin
    byte_t r;
    wb = '0; s_rx = 0; s_tx = 0; s_bits = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    chk(cs_n == 1'b1, "chip select idle high");
    wb_wr(8'h03, 8'h01);
    chk(cs_n == 1'b0, "chip select asserted");
    for (int i = 0; i < 6; i++) xfer(byte_t'($urandom), byte_t'($urandom), 4);
    wb_wr(8'h02, 8'h00);
    wb_rd(8'h02, r); chk(r == 8'h00, "divider readback");
    for (int i = 0; i < 6; i++) xfer(byte_t'($urandom), byte_t'($urandom), 0);
    wb_wr(8'h02, 8'h09);
    xfer(8'hA5, 8'h3C, 9);
    wb_wr(8'h03, 8'h00);
    chk(cs_n == 1'b1, "chip select released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
