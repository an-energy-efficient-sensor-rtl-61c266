// tb_sensor_node_top: end-to-end test of the sensor node processor.
//
// The testbench plays the processor's firmware and the node's surroundings:
// an I2C sensor model, an SPI transceiver model (captures every byte sent
// with chip select low) and a UART receiver. It runs the node's duty cycle
// twice, with two accelerators (N_CA = 2) and a short interval unit:
//   read samples from the sensor over I2C -> store them in the SRAM ->
//   start a CA over the CA bus -> (processor access stalled meanwhile) ->
//   read the compressed stream from the SRAM -> send it over SPI ->
//   report the length over the UART.
// The compressed stream is compared with the software reference model, the
// stream received by the transceiver with the SRAM contents. Meanwhile the
// adaptive module samples the CR sensors; the testbench checks every one of
// its decisions against a model of the tuning algorithm and its CR against
// the byte counts. Each mechanism (stall, ignored Ctrl, both CAs, one and
// two levels, zero runs, escapes, interval down/up, compression on/off,
// processor-computed CR, a CR window held until a job ends, unmapped bus
// access, UART receive) must occur at least once.
module tb_sensor_node_top;
  import sn_pkg::*;
  import wavelet_ref_pkg::*;

  localparam int NCA = 2;
  localparam int CPU_UNIT = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_m2s_t cpu_wb;  wb_s2m_t cpu_wb_rsp;
  mem_req_t cpu_mem; byte_t cpu_rdata; logic cpu_stall;
  logic [0:0] ca_sel; logic ca_ctrl; ca_cfg_t ca_cfg;
  logic [NCA-1:0] ca_state, ca_status; logic [15:0] ca_out_len; logic comp_mode;
  cr_t cr0, sw_cr, cr; logic sw_cr_valid, use_sw_cr, cr_valid, comp_en;
  logic [7:0] sample_interval;
  logic spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  logic i2c_scl_oe, i2c_sda_oe, s_sda_oe;
  logic uart_tx, uart_rx;
  wire scl = !i2c_scl_oe;
  wire sda = !i2c_sda_oe && !s_sda_oe;

  sensor_node_top #(.N_CA(NCA), .CYCLES_PER_UNIT(CPU_UNIT)) dut (
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor bus functions ----------------
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
  int n_stall = 0;
  task automatic mem_wr(input addr_t a, input byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b1, adr: a, wdata: d};
    #1;
    while (cpu_stall) begin n_stall++; @(negedge clk); end
    @(negedge clk); cpu_mem = '0;
  endtask
  task automatic mem_rd(input addr_t a, output byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b0, adr: a, wdata: 8'h00};
    #1;
    while (cpu_stall) begin n_stall++; @(negedge clk); end
    @(negedge clk); cpu_mem = '0; d = cpu_rdata;
  endtask

  localparam logic [7:0] SPI = 8'h00, I2C = 8'h40, UART = 8'h80;

  task automatic i2c_cmd(input byte_t c);
    byte_t st;
    wb_wr(I2C + 3, c);
    do wb_rd(I2C + 3, st); while (st[0]);
  endtask

  // ---------------- transceiver and PC models ----------------
  byte_t rf_bytes[$];
  byte_t rf_sh; int rf_bits = 0;
  always @(posedge spi_sclk) if (!spi_cs_n) begin
    rf_sh = {rf_sh[6:0], spi_mosi}; rf_bits++;
    if (rf_bits % 8 == 0) rf_bytes.push_back(rf_sh);
  end
  assign spi_miso = 1'b0;

  localparam int UDIV = 7;
  byte_t pc_bytes[$];
  initial begin
    byte_t b;
    forever begin
      @(negedge uart_tx);
      repeat (UDIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (UDIV + 1) @(posedge clk); b[i] = uart_tx; end
      repeat (UDIV + 1) @(posedge clk);
      pc_bytes.push_back(b);
    end
  end

  // ---------------- adaptive module scoreboard ----------------
  int m_state = 0, m_inter = 7;
  int n_dec = 0, n_inc = 0, n_flip_on = 0, n_flip_off = 0, n_req = 0, n_sw = 0;
  int cnt_in [NCA], cnt_out [NCA];
  logic [NCA-1:0] in_b, out_b;
  assign in_b  = dut.ca_in_byte;
  assign out_b = dut.ca_out_byte;
  // Each sensor closes its window at the sample pulse, or when its CA's job
  // ends if the pulse came during a job.
  logic [NCA-1:0] hold_b;
  assign hold_b = dut.ca_start | dut.ca_st;
  int win_in, win_out, exp_cr [NCA];
  int n_held = 0;
  bit pend [NCA];
  logic [NCA-1:0] cr_busy;
  for (genvar g = 0; g < NCA; g++) begin : g_busy
    assign cr_busy[g] = dut.g_ca[g].u_cr.busy;
  end
  always @(posedge clk) if (rst_n) begin
    automatic int c;
    automatic bit act;
    automatic bit req = use_sw_cr ? sw_cr_valid : cr_valid;
    automatic bit close;
    for (int i = 0; i < NCA; i++) begin
      close = (dut.sample || pend[i]) && !hold_b[i] && !cr_busy[i];
      if (dut.sample && hold_b[i] && !cr_busy[i]) begin pend[i] = 1'b1; n_held++; end
      if (close) begin
        pend[i] = 1'b0;
        win_in = cnt_in[i]; win_out = cnt_out[i];
        cnt_in[i] = 0; cnt_out[i] = 0;
        if (win_in > 0) exp_cr[i] = (win_out * 256 / win_in > 1023) ? 1023 : win_out * 256 / win_in;
      end
      if (in_b[i]) cnt_in[i]++;
      if (out_b[i]) cnt_out[i]++;
    end
    if (cr_valid && !use_sw_cr) begin
      checks++;
      if (int'(cr) != exp_cr[ca_sel]) begin failures++; $display("FAIL: CR %0d expected %0d", cr, exp_cr[ca_sel]); end
    end
    if (req) begin
      c = use_sw_cr ? int'(sw_cr) : int'(cr);
      n_req++; if (use_sw_cr) n_sw++;
      act = (m_state == 1 && c > int'(cr0)) || (m_state == 0 && c < int'(cr0));
      if (act) begin
        if (m_inter == 3) begin
          m_state = 1 - m_state;
          if (m_state == 1) n_flip_on++; else n_flip_off++;
        end else begin m_inter--; n_dec++; end
      end else if (m_inter < 7) begin m_inter++; n_inc++; end
    end
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(comp_en) != m_state || int'(sample_interval) != m_inter) begin
      failures++;
      $display("FAIL: adaptive state %0d/%0d expected %0d/%0d", comp_en, sample_interval, m_state, m_inter);
    end
  end

  // ---------------- one duty cycle ----------------
  int n_jobs1 = 0, n_jobs2 = 0, n_ignored = 0, n_runs = 0, n_esc = 0, n_unmapped = 0;
  bit used_ca [NCA];

  task automatic duty_cycle(input int sel, input int len, input bit two, input bit noisy);
    ivec_t xs, exp;
    byte_t r;
    int t0, olen, nrf, base;
    addr_t src = 13'h0000, dst = 13'h1800, work = 13'h0400;
    xs = {};
    // 1. sensor samples over I2C (the first half), the rest synthesised
    base = sensor.readings.size();
    wb_wr(I2C + 1, 8'h91); i2c_cmd(8'b0_0101);
    for (int i = 0; i < len / 2; i++) begin
      i2c_cmd((i == len / 2 - 1) ? 8'b1_1010 : 8'b0_1000);
      wb_rd(I2C + 2, r);
      chk(int'(r) == sensor.readings[base + i], $sformatf("I2C reading %0d: %02x expected %02x", i, r, sensor.readings[base + i]));
      xs.push_back(int'(r));
    end
    for (int i = len / 2; i < len; i++)
      xs.push_back(noisy ? int'($urandom_range(0, 255)) : xs[len / 2 - 1]);
    foreach (xs[i]) mem_wr(src + addr_t'(i), byte_t'(xs[i]));
    exp = compress(xs, two);
    foreach (exp[i]) begin
      if (exp[i] >= 'h80) n_runs++;
      if (exp[i] == 'h40) n_esc++;
    end
    // 2. start the CA
    ca_sel = 1'(sel);
    ca_cfg = '{src: src, dst: dst, work: work, len: addr_t'(len), two_level: two};
    @(negedge clk); ca_ctrl = 1'b1; t0 = int'($time);
    @(negedge clk); ca_ctrl = 1'b0;
    chk(comp_mode, "compression mode entered");
    repeat (5) @(negedge clk);
    chk(ca_state[sel], "State line high while compressing");
    // Ctrl raised again while busy: must be ignored.
    ca_ctrl = 1'b1; @(negedge clk); ca_ctrl = 1'b0;
    if (dut.ca_start == '0) n_ignored++;
    // processor touches the SRAM meanwhile: stalled until the job ends
    mem_rd(src, r);
    chk(!ca_state[sel], "stalled access completes after State falls");
    chk(int'(r) == xs[0], "stalled read returns the right data");
    chk(ca_status[sel], "status register shows completion");
    olen = int'(ca_out_len);
    chk(olen == exp.size(), $sformatf("compressed length %0d expected %0d", olen, exp.size()));
    if (two) n_jobs2++; else n_jobs1++;
    used_ca[sel] = 1'b1;
    // 3. read the stream, send it to the transceiver
    nrf = rf_bytes.size();
    wb_wr(SPI + 3, 8'h01);
    for (int i = 0; i < olen; i++) begin
      mem_rd(dst + addr_t'(i), r);
      chk(int'(r) == exp[i], $sformatf("stream byte %0d: %02x expected %02x", i, r, exp[i]));
      wb_wr(SPI + 0, r);
      do wb_rd(SPI + 1, r); while (r[0]);
    end
    wb_wr(SPI + 3, 8'h00);
    chk(rf_bytes.size() - nrf == olen, "all bytes reached the transceiver");
    for (int i = 0; i < olen; i++)
      chk(int'(rf_bytes[nrf + i]) == exp[i], "transceiver byte");
    // 4. debug report over the UART
    wb_wr(UART + 0, byte_t'(olen));
    do wb_rd(UART + 1, r); while (r[0]);
    repeat (UDIV * 2) @(negedge clk);
    chk(pc_bytes.size() > 0 && pc_bytes[pc_bytes.size() - 1] == byte_t'(olen), "UART debug byte");
    $display("duty cycle: CA %0d, %0d samples, %0d level(s) -> %0d bytes", sel, len, two ? 2 : 1, olen);
  endtask

  initial begin
    byte_t r;
    cpu_wb = '0; cpu_mem = '0; ca_sel = '0; ca_ctrl = 1'b0; ca_cfg = '0;
    cr0 = 10'd256; sw_cr = '0; sw_cr_valid = 1'b0; use_sw_cr = 1'b0; uart_rx = 1'b1;
    for (int i = 0; i < NCA; i++) begin cnt_in[i] = 0; cnt_out[i] = 0; used_ca[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1'b1;
    wb_wr(I2C + 0, 8'd1);
    wb_wr(SPI + 2, 8'd0);
    wb_wr(UART + 2, 8'(UDIV)); wb_wr(UART + 3, 8'h00);
    // unmapped Wishbone address
    wb_rd(8'hC5, r); if (r == 8'h00) n_unmapped++;
    // smooth data on CA 0: compression pays (CR < 1)
    duty_cycle(0, 64, 1'b0, 1'b0);
    repeat (3000) @(negedge clk);
    duty_cycle(0, 64, 1'b1, 1'b0);
    repeat (6000) @(negedge clk);
    // noisy data on CA 1: compression expands (CR > 1)
    duty_cycle(1, 48, 1'b1, 1'b1);
    repeat (300) @(negedge clk);
    duty_cycle(1, 32, 1'b0, 1'b1);
    repeat (6000) @(negedge clk);
    // the processor supplies the ratio itself
    use_sw_cr = 1'b1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); sw_cr = 10'd100; sw_cr_valid = 1'b1;
      @(negedge clk); sw_cr_valid = 1'b0;
      repeat (20) @(negedge clk);
    end
    use_sw_cr = 1'b0;
    // UART receive path: the PC sends a command byte
    @(negedge clk);
    uart_rx = 1'b0; repeat (UDIV + 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = 1'(8'h5C >> i); repeat (UDIV + 1) @(negedge clk); end
    uart_rx = 1'b1; repeat (UDIV + 3) @(negedge clk);
    wb_rd(UART + 0, r);
    chk(r == 8'h5C, "UART command received");

    $display("mechanisms: jobs1=%0d jobs2=%0d stall_cycles=%0d ignored_ctrl=%0d runs=%0d escapes=%0d",
             n_jobs1, n_jobs2, n_stall, n_ignored, n_runs, n_esc);
    $display("held CR windows=%0d", n_held);
    $display("adaptive: requests=%0d sw=%0d dec=%0d inc=%0d on=%0d off=%0d unmapped=%0d i2c_starts=%0d",
             n_req, n_sw, n_dec, n_inc, n_flip_on, n_flip_off, n_unmapped, sensor.n_start);
    chk(n_jobs1 > 0, "one-level job");
    chk(n_jobs2 > 0, "two-level job");
    chk(used_ca[0] && used_ca[1], "both accelerators used");
    chk(n_stall > 0, "processor stall");
    chk(n_ignored > 0, "Ctrl ignored while busy");
    chk(n_runs > 0, "zero-run tokens");
    chk(n_esc > 0, "escape tokens");
    chk(n_dec > 0, "interval decreased");
    chk(n_inc > 0, "interval increased");
    chk(n_flip_on > 0, "compression switched on");
    chk(n_flip_off > 0, "compression switched off");
    chk(n_sw > 0, "processor-computed CR used");
    chk(n_held > 0, "CR window held until a job ends");
    chk(n_unmapped > 0, "unmapped bus access answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
