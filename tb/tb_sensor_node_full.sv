// tb_sensor_node_full: one complete operation of the sensor node at its
// default configuration (one accelerator, 10 MHz clock, 1 ms interval unit,
// 8 KB SRAM).
//
// Firmware steps played by the testbench: read 16 readings from the I2C
// sensor model and extend them to 1024 samples, store them in the SRAM,
// compress them with two wavelet levels, check the stream against the
// software reference, send it over SPI to a transceiver model, then wait for
// the adaptive module's first sampling point (7 ms after reset) and check its
// decision: the CR sensor reports the job's ratio and, with compression off
// and CR below the reference, the sampling interval shrinks from 7 to 6 ms.
// The CA time per original byte is checked against 60 cycles (6 us).
module tb_sensor_node_full;
  import sn_pkg::*;
  import wavelet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;   // 10 MHz

  wb_m2s_t cpu_wb;  wb_s2m_t cpu_wb_rsp;
  mem_req_t cpu_mem; byte_t cpu_rdata; logic cpu_stall;
  logic [0:0] ca_sel; logic ca_ctrl; ca_cfg_t ca_cfg;
  logic [0:0] ca_state, ca_status; logic [15:0] ca_out_len; logic comp_mode;
  cr_t cr0, sw_cr, cr; logic sw_cr_valid, use_sw_cr, cr_valid, comp_en;
  logic [7:0] sample_interval;
  logic spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  logic i2c_scl_oe, i2c_sda_oe, s_sda_oe;
  logic uart_tx, uart_rx;
  wire scl = !i2c_scl_oe;
  wire sda = !i2c_sda_oe && !s_sda_oe;

  sensor_node_top dut (
    .clk, .rst_n, .cpu_wb, .cpu_wb_rsp, .cpu_mem, .cpu_rdata, .cpu_stall,
    .ca_sel, .ca_ctrl, .ca_cfg, .ca_state, .ca_status, .ca_out_len, .comp_mode,
    .cr0, .sw_cr, .sw_cr_valid, .use_sw_cr, .cr, .cr_valid, .comp_en, .sample_interval,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n,
    .i2c_scl_oe, .i2c_scl_i(scl), .i2c_sda_oe, .i2c_sda_i(sda), .uart_tx, .uart_rx);

  i2c_sensor_model sensor (.scl, .sda, .sda_oe(s_sda_oe));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_wr(input logic [7:0] a, input byte_t d);
    @(negedge clk); cpu_wb = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: d};
    do @(negedge clk); while (!cpu_wb_rsp.ack);
    cpu_wb = '0;
  endtask
  task automatic wb_rd(input logic [7:0] a, output byte_t d);
    @(negedge clk); cpu_wb = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: a, dat: 8'h00};
    do @(negedge clk); while (!cpu_wb_rsp.ack);
    d = cpu_wb_rsp.dat; cpu_wb = '0;
  endtask
  task automatic mem_wr(input addr_t a, input byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b1, adr: a, wdata: d};
    #1; while (cpu_stall) @(negedge clk);
    @(negedge clk); cpu_mem = '0;
  endtask
  task automatic mem_rd(input addr_t a, output byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b0, adr: a, wdata: 8'h00};
    #1; while (cpu_stall) @(negedge clk);
    @(negedge clk); cpu_mem = '0; d = cpu_rdata;
  endtask
  task automatic i2c_cmd(input byte_t c);
    byte_t st;
    wb_wr(8'h43, c);
    do wb_rd(8'h43, st); while (st[0]);
  endtask

  byte_t rf_bytes[$];
  byte_t rf_sh; int rf_bits = 0;
  always @(posedge spi_sclk) if (!spi_cs_n) begin
    rf_sh = {rf_sh[6:0], spi_mosi}; rf_bits++;
    if (rf_bits % 8 == 0) rf_bytes.push_back(rf_sh);
  end
  assign spi_miso = 1'b0;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int LEN = 1024;
  initial begin
    ivec_t xs, exp;
    byte_t r;
    int base, t0, t1, olen, exp_cr;
    cpu_wb = '0; cpu_mem = '0; ca_sel = '0; ca_ctrl = 1'b0; ca_cfg = '0;
    cr0 = 10'd256; sw_cr = '0; sw_cr_valid = 1'b0; use_sw_cr = 1'b0; uart_rx = 1'b1;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    chk(comp_en == 1'b0 && sample_interval == 8'd7, "adaptive module starts off at 7 ms");
    // sensor readings at the default 100 kHz I2C clock
    base = sensor.readings.size();
    wb_wr(8'h41, 8'h91); i2c_cmd(8'b0_0101);
    for (int i = 0; i < 16; i++) begin
      i2c_cmd((i == 15) ? 8'b1_1010 : 8'b0_1000);
      wb_rd(8'h42, r);
      chk(int'(r) == sensor.readings[base + i], "I2C reading");
      xs.push_back(int'(r));
    end
    for (int i = 16; i < LEN; i++) xs.push_back(xs[i % 16] + ((i / 64) % 3));
    foreach (xs[i]) mem_wr(13'h0000 + addr_t'(i), byte_t'(xs[i]));
    exp = compress(xs, 1'b1);
    chk(cyc < 70000, "job starts before the first sampling point");
    ca_cfg = '{src: 13'h0000, dst: 13'h1000, work: 13'h0400, len: addr_t'(LEN), two_level: 1'b1};
    @(negedge clk); ca_ctrl = 1'b1; t0 = cyc;
    @(negedge clk); ca_ctrl = 1'b0;
    @(negedge clk);
    while (ca_state[0]) @(negedge clk);
    t1 = cyc;
    olen = int'(ca_out_len);
    chk(olen == exp.size(), $sformatf("compressed length %0d expected %0d", olen, exp.size()));
    chk(t1 - t0 <= 60 * LEN, $sformatf("CA took %0d cycles for %0d bytes", t1 - t0, LEN));
    $display("compressed %0d bytes to %0d in %0d cycles", LEN, olen, t1 - t0);
    wb_wr(8'h02, 8'h00); wb_wr(8'h03, 8'h01);
    for (int i = 0; i < olen; i++) begin
      mem_rd(13'h1000 + addr_t'(i), r);
      chk(int'(r) == exp[i], $sformatf("stream byte %0d", i));
      wb_wr(8'h00, r);
      do wb_rd(8'h01, r); while (r[0]);
    end
    wb_wr(8'h03, 8'h00);
    chk(rf_bytes.size() == olen, "stream sent to the transceiver");
    foreach (rf_bytes[i]) chk(int'(rf_bytes[i]) == exp[i], "transceiver byte");
    // first sampling point of the adaptive module
    while (!cr_valid) @(negedge clk);
    exp_cr = olen * 256 / LEN;
    chk(int'(cr) == exp_cr, $sformatf("CR %0d expected %0d", cr, exp_cr));
    @(negedge clk);
    chk(sample_interval == 8'd6 && comp_en == 1'b0, "interval shortened toward switching compression on");
    chk(cyc >= 70000 && cyc < 70000 + 100, $sformatf("first sample at cycle %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
