// sensor_node_top: sensor network processor with hardware-assisted, adaptive
// compression (everything of the chip except the 8051 processor core).
//
// Blocks and their wiring:
//   - Wishbone bus (wb_interconnect) from the processor to the SPI controller
//     (RF transceiver, addresses 0x00-0x3F), the I2C controller (sensor,
//     0x40-0x7F) and the UART (debug PC, 0x80-0xBF).
//   - CA bus and arbiter (ca_arbiter): the processor picks a compression
//     accelerator with ca_sel, hands over the job in ca_cfg and starts it
//     with a rising edge on ca_ctrl; ca_state shows the State lines.
//   - N_CA wavelet compression accelerators (ca_wavelet), each switched on
//     only while selected, each with its own online CR sensor (cr_sensor).
//     A sensor's window is held open while its CA runs a job, so that a
//     ratio always covers whole jobs.
//   - The 8 KB external data SRAM (sram_sp), shared through the arbiter: the
//     processor's port cpu_mem is stalled (cpu_stall) while comp_mode shows
//     that a compression runs.
//   - The adaptive compression module (adaptive_ctrl), which samples the
//     selected CA's CR sensor at the current sampling interval, or takes the
//     ratio the processor computes (use_sw_cr), and sets comp_en and
//     sample_interval with the tuning algorithm against the reference cr0.
// The processor core, its code memory and internal data memory are outside
// this module: their bus, CA bus and memory ports are the top-level ports.
// Defaults: one CA as on the fabricated chip, a 10 MHz clock with 1 ms
// interval units. I2C pins are open drain (oe high pulls the line low).
module sensor_node_top
  import sn_pkg::*;
#(
  parameter int unsigned N_CA            = 1,
  parameter int unsigned SEL_W           = (N_CA > 1) ? $clog2(N_CA) : 1,
  parameter int unsigned CYCLES_PER_UNIT = 10000
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor: Wishbone master
  input  wb_m2s_t          cpu_wb,
  output wb_s2m_t          cpu_wb_rsp,
  // processor: external data memory port
  input  mem_req_t         cpu_mem,
  output byte_t            cpu_rdata,
  output logic             cpu_stall,
  // processor: CA bus
  input  logic [SEL_W-1:0] ca_sel,
  input  logic             ca_ctrl,
  input  ca_cfg_t          ca_cfg,
  output logic [N_CA-1:0]  ca_state,
  output logic [N_CA-1:0]  ca_status,
  output logic [15:0]      ca_out_len,
  output logic             comp_mode,
  // processor: adaptive compression
  input  cr_t              cr0,
  input  cr_t              sw_cr,
  input  logic             sw_cr_valid,
  input  logic             use_sw_cr,
  output cr_t              cr,
  output logic             cr_valid,
  output logic             comp_en,
  output logic [7:0]       sample_interval,
  // pins
  output logic             spi_sclk,
  output logic             spi_mosi,
  input  logic             spi_miso,
  output logic             spi_cs_n,
  output logic             i2c_scl_oe,
  input  logic             i2c_scl_i,
  output logic             i2c_sda_oe,
  input  logic             i2c_sda_i,
  output logic             uart_tx,
  input  logic             uart_rx
);
  // ---------------- Wishbone side ----------------
  wb_m2s_t wb_s   [3];
  wb_s2m_t wb_rsp [3];

  wb_interconnect #(.N_SLV(3), .SEL_BITS(2)) u_wb (
    .clk, .rst_n, .m(cpu_wb), .m_rsp(cpu_wb_rsp), .s(wb_s), .s_rsp(wb_rsp));

  spi_master u_spi (.clk, .rst_n, .wb(wb_s[0]), .wb_rsp(wb_rsp[0]),
                    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n));
  i2c_master u_i2c (.clk, .rst_n, .wb(wb_s[1]), .wb_rsp(wb_rsp[1]),
                    .scl_oe(i2c_scl_oe), .scl_i(i2c_scl_i), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i));
  uart u_uart (.clk, .rst_n, .wb(wb_s[2]), .wb_rsp(wb_rsp[2]), .tx(uart_tx), .rx(uart_rx));

  // ---------------- CA bus, SRAM ----------------
  mem_req_t        ca_mem [N_CA];
  mem_req_t        sram;
  byte_t           sram_rdata, ca_rdata;
  ca_cfg_t         ca_job;
  logic [N_CA-1:0] ca_on, ca_start, ca_st, ca_done, ca_in_byte, ca_out_byte;
  logic [15:0]     ca_len [N_CA];

  ca_arbiter #(.N_CA(N_CA), .SEL_W(SEL_W)) u_arb (
    .clk, .rst_n,
    .cpu_mem, .cpu_rdata, .cpu_stall, .sel(ca_sel), .ctrl(ca_ctrl), .cfg(ca_cfg),
    .ca_state_o(ca_state), .ca_status, .comp_mode,
    .ca_on, .ca_start, .ca_cfg(ca_job), .ca_mem, .ca_state(ca_st), .ca_done, .ca_rdata,
    .sram, .sram_rdata);

  sram_sp #(.DEPTH(MEM_BYTES)) u_sram (
    .clk, .req(sram.req), .we(sram.we), .adr(sram.adr), .wdata(sram.wdata), .rdata(sram_rdata));

  // ---------------- accelerators and their CR sensors ----------------
  cr_t             hw_cr [N_CA];
  logic [N_CA-1:0] hw_cr_valid;
  logic            sample;

  for (genvar i = 0; i < N_CA; i++) begin : g_ca
    ca_wavelet u_ca (
      .clk, .rst_n, .en(ca_on[i]), .start(ca_start[i]), .cfg(ca_job),
      .mem(ca_mem[i]), .mem_rdata(ca_rdata), .state(ca_st[i]), .done(ca_done[i]),
      .out_len(ca_len[i]), .in_byte(ca_in_byte[i]), .out_byte(ca_out_byte[i]));

    cr_sensor u_cr (
      .clk, .rst_n, .in_byte(ca_in_byte[i]), .out_byte(ca_out_byte[i]), .sample,
      .hold(ca_start[i] || ca_st[i]),
      .cr(hw_cr[i]), .cr_valid(hw_cr_valid[i]), .busy());
  end

  assign ca_out_len = ca_len[ca_sel];
  assign cr         = hw_cr[ca_sel];
  assign cr_valid   = hw_cr_valid[ca_sel];

  // ---------------- adaptive compression ----------------
  adaptive_ctrl #(.CYCLES_PER_UNIT(CYCLES_PER_UNIT)) u_adapt (
    .clk, .rst_n, .cr0, .hw_cr(cr), .hw_cr_valid(cr_valid), .sw_cr, .sw_cr_valid,
    .use_sw(use_sw_cr), .sample, .comp_en, .cur_inter(sample_interval),
    .ev_dec(), .ev_inc(), .ev_flip());

endmodule
