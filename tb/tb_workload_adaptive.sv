// tb_workload_adaptive: latency-constrained adaptive compression of a
// 250 KB/s sensor stream at the node's default configuration (10 MHz, 1 ms
// units, R_MAX 7 ms, R_MIN 3 ms, STEP 1 ms, one accelerator).
//
// Workload: one second of sensor data, 256000 bytes, compressed as 250 jobs
// of 1024 samples, one job every 4 ms (4 us per byte). The statistics of the
// data change every 100 ms between three kinds: calm (a reading moves one
// step with 5 % probability, CR about 0.15), moderate (it moves with 33 %
// probability, CR about 0.6) and turbulent (readings spread over +-20 steps,
// CR about 1). The run is repeated for latency bounds LA of 7, 8, 9 and
// 11 us per byte, each with
//   CR0 = CR_LA = (max(LA, T_RF) - T_CA) / T_RF,
// where T_RF = 4 us is the radio time per byte (2 Mbit/s) and T_CA = 6 us
// the compression time per byte of the original chip; the formula and the
// numbers follow the original evaluation, the data generator is this
// testbench's own. The CR sensor and the tuning loop run untouched; the
// testbench plays the firmware that stores the samples and starts the jobs.
// It checks every job's output against the software reference, that each job
// ends inside its 4 ms slot, that at the end of each stretch compression is
// on if the stretch's ratio is clearly below CR0 and off if clearly above,
// and that the interval relaxes to R_MAX inside each stretch. It prints, per
// bound, the latency per byte with adaptive compression next to sending raw
// (T_RF) and always compressing (T_CA + T_RF * CR), computed per job from the
// measured ratio and the state of comp_en when the job starts; the adaptive
// latency must lie between the two and must not fall as the bound grows.
module tb_workload_adaptive;
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
  logic spi_sclk, spi_mosi, spi_cs_n, i2c_scl_oe, i2c_sda_oe, uart_tx;

  sensor_node_top dut (
    .clk, .rst_n, .cpu_wb, .cpu_wb_rsp, .cpu_mem, .cpu_rdata, .cpu_stall,
    .ca_sel, .ca_ctrl, .ca_cfg, .ca_state, .ca_status, .ca_out_len, .comp_mode,
    .cr0, .sw_cr, .sw_cr_valid, .use_sw_cr, .cr, .cr_valid, .comp_en, .sample_interval,
    .spi_sclk, .spi_mosi, .spi_miso(1'b0), .spi_cs_n,
    .i2c_scl_oe, .i2c_scl_i(!i2c_scl_oe), .i2c_sda_oe, .i2c_sda_i(!i2c_sda_oe),
    .uart_tx, .uart_rx(1'b1));

  localparam int LEN     = 1024;
  localparam int JOBS    = 250;
  localparam int SLOT    = 40000;     // cycles per job: 4 ms
  localparam int STRETCH = 25;        // jobs per stretch: 100 ms

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (4 * JOBS * SLOT + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_flip = 0, n_max = 0, n_min = 0, n_dec = 0, n_inc = 0, n_cr = 0;
  always @(posedge clk) begin
    if (dut.u_adapt.ev_flip) n_flip++;
    if (dut.u_adapt.ev_dec) n_dec++;
    if (dut.u_adapt.ev_inc) n_inc++;
    if (cr_valid) n_cr++;
  end

  int xs[$];
  int exp_out[$];
  int level = 128;

  // Samples of one job, of kind 0 (calm), 1 (moderate) or 2 (turbulent).
  task automatic make_job(input int kind);
    xs = {};
    for (int i = 0; i < LEN; i++) begin
      if (kind == 2) begin
        xs.push_back(level + int'($urandom_range(0, 40)) - 20);
      end else begin
        if ($urandom_range(0, 99) < ((kind == 0) ? 5 : 33))
          level = level + (($urandom_range(0, 1) != 0) ? 1 : -1);
        if (level < 40) level = 41;
        if (level > 215) level = 214;
        xs.push_back(level);
      end
    end
  endtask

  localparam int N_LA = 4;
  localparam int KINDS [10] = '{0, 1, 2, 1, 0, 2, 0, 1, 2, 0};
  int la_us [N_LA] = '{7, 8, 9, 11};
  real lat_adapt [N_LA];
  real lat_raw, lat_ca;
  int max_cycles = 0;

  initial begin
    int t_job, olen, in_tot, out_tot, kind, cr0_q;
    int st_in, st_out, st_cr;
    bit ok_out, hit_max, en_at_start;
    real cr_job, sum_adapt, sum_ca;
    cpu_wb = '0; cpu_mem = '0; ca_sel = '0; ca_ctrl = 1'b0; ca_cfg = '0;
    cr0 = '0; sw_cr = '0; sw_cr_valid = 1'b0; use_sw_cr = 1'b0;
    for (int r = 0; r < N_LA; r++) begin
      // CR0 in Q2.8 from the latency bound, T_CA = 6 us, T_RF = 4 us
      cr0_q = ((la_us[r] > 4 ? la_us[r] : 4) - 6) * 256 / 4;
      cr0 = cr_t'(cr0_q);
      rst_n = 1'b0; repeat (3) @(negedge clk); rst_n = 1'b1;
      in_tot = 0; out_tot = 0; sum_adapt = 0.0; sum_ca = 0.0;
      for (int j = 0; j < JOBS; j++) begin
        t_job = cyc;
        kind = KINDS[j / STRETCH];
        if (j % STRETCH == 0) begin hit_max = 1'b0; st_in = 0; st_out = 0; end
        make_job(kind);
        foreach (xs[i]) begin
          @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b1, adr: addr_t'(i), wdata: byte_t'(xs[i])};
        end
        @(negedge clk); cpu_mem = '0;
        en_at_start = comp_en;
        ca_cfg = '{src: 13'h0000, dst: 13'h1000, work: 13'h0400, len: addr_t'(LEN), two_level: 1'b0};
        ca_ctrl = 1'b1; @(negedge clk); ca_ctrl = 1'b0; @(negedge clk);
        while (ca_state[0]) begin
          @(negedge clk);
          if (sample_interval == 8'd7 && j % STRETCH > STRETCH / 2) hit_max = 1'b1;
        end
        olen = int'(ca_out_len);
        exp_out = compress(xs, 1'b0);
        ok_out = (olen == exp_out.size());
        if (ok_out) foreach (exp_out[i]) if (int'(dut.u_sram.mem[4096 + i]) != exp_out[i]) ok_out = 1'b0;
        chk(ok_out, $sformatf("LA %0d job %0d output matches the reference", la_us[r], j));
        in_tot += LEN; out_tot += olen; st_in += LEN; st_out += olen;
        cr_job = real'(olen) / real'(LEN);
        sum_ca += 6.0 + 4.0 * cr_job;
        sum_adapt += en_at_start ? 6.0 + 4.0 * cr_job : 4.0;
        if (cyc - t_job > max_cycles) max_cycles = cyc - t_job;
        chk(cyc - t_job < SLOT, $sformatf("job %0d took %0d cycles", j, cyc - t_job));
        while (cyc - t_job < SLOT) begin
          @(negedge clk);
          if (sample_interval == 8'd7 && j % STRETCH > STRETCH / 2) hit_max = 1'b1;
        end
        if (j % STRETCH == STRETCH - 1) begin
          // the stretch's own ratio, Q2.8, from the job lengths
          st_cr = st_out * 256 / st_in;
          if (st_cr < cr0_q - 26) chk(comp_en, $sformatf("LA %0d, %0d ms: CR %0d < CR0 %0d but compression off", la_us[r], cyc / 10000, st_cr, cr0_q));
          if (st_cr > cr0_q + 26) chk(!comp_en, $sformatf("LA %0d, %0d ms: CR %0d > CR0 %0d but compression on", la_us[r], cyc / 10000, st_cr, cr0_q));
          chk(hit_max, $sformatf("LA %0d, %0d ms: interval back at R_MAX", la_us[r], cyc / 10000));
        end
      end
      lat_adapt[r] = sum_adapt / JOBS;
      lat_raw = 4.0;
      lat_ca = sum_ca / JOBS;
      $display("LA %2d us: CR0 %0d/256, stream CR %0d/256, latency per byte: raw %.2f us, always compressed %.2f us, adaptive %.2f us",
               la_us[r], cr0_q, out_tot * 256 / in_tot, lat_raw, lat_ca, lat_adapt[r]);
      chk(lat_adapt[r] >= lat_raw - 0.001 && lat_adapt[r] <= lat_ca + 0.001, "adaptive latency between raw and always compressed");
      if (r > 0) chk(lat_adapt[r] >= lat_adapt[r-1] - 0.001, "latency does not fall as the bound grows");
    end
    $display("longest job %0d cycles (%0d.%0d us per byte at 10 MHz)",
             max_cycles, max_cycles / LEN / 10, (max_cycles / LEN) % 10);
    $display("decisions %0d: shorter %0d, longer %0d, flips %0d", n_cr, n_dec, n_inc, n_flip);
    chk(n_flip > 0 && n_dec > 0 && n_inc > 0, "every branch of the tuning loop taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
