// tb_adaptive_ctrl: self-checking test of the adaptive compression tuner.
//
// The unit runs with a short interval unit (4 cycles). A software model of
// the tuning algorithm (interval from R_MAX down to R_MIN, state flip at
// R_MIN, growth back to R_MAX) predicts comp_en and cur_inter after every
// ratio; ratios alternate between the sensor and the processor source, and
// the spacing of the sample pulses must equal cur_inter units. Every branch
// of the algorithm must be taken at least once.
module tb_adaptive_ctrl;
  import sn_pkg::*;
  localparam int CPU = 4;
  localparam int RMAX = 7, RMIN = 3, STEP = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cr_t cr0, hw_cr, sw_cr;
  logic hw_cr_valid, sw_cr_valid, use_sw, sample, comp_en, ev_dec, ev_inc, ev_flip;
  logic [7:0] cur_inter;

  adaptive_ctrl #(.CYCLES_PER_UNIT(CPU)) dut (.clk, .rst_n, .cr0, .hw_cr, .hw_cr_valid, .sw_cr,
    .sw_cr_valid, .use_sw, .sample, .comp_en, .cur_inter, .ev_dec, .ev_inc, .ev_flip);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample spacing check.
  int last_sample = -1, cyc = 0, n_samples = 0;
  logic [7:0] inter_q;
  bit changed = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    inter_q <= cur_inter;
    if (inter_q != cur_inter) changed = 1'b1;
    if (sample) begin
      if (last_sample >= 0 && !changed) begin
        checks++;
        if (cyc - last_sample != int'(cur_inter) * CPU) begin
          failures++; $display("FAIL: sample spacing %0d for interval %0d", cyc - last_sample, cur_inter);
        end
      end
      last_sample <= cyc; changed = 1'b0; n_samples++;
    end
  end

  int m_state, m_inter, n_dec, n_inc, n_flip;
  always @(posedge clk) begin
    if (ev_dec) n_dec++;
    if (ev_inc) n_inc++;
    if (ev_flip) n_flip++;
  end

  task automatic request(input int cr);
    bit act;
    act = (m_state == 1 && cr > int'(cr0)) || (m_state == 0 && cr < int'(cr0));
    if (act) begin
      if (m_inter == RMIN) m_state = 1 - m_state;
      else m_inter = m_inter - STEP;
    end else if (m_inter + STEP <= RMAX) m_inter = m_inter + STEP;
    @(negedge clk);
    use_sw = ($urandom_range(0, 1) != 0);
    if (use_sw) begin sw_cr = cr_t'(cr); sw_cr_valid = 1'b1; hw_cr = cr_t'(~cr); end
    else        begin hw_cr = cr_t'(cr); hw_cr_valid = 1'b1; sw_cr = cr_t'(~cr); end
    @(negedge clk);
    sw_cr_valid = 1'b0; hw_cr_valid = 1'b0;
    chk(int'(comp_en) == m_state && int'(cur_inter) == m_inter,
        $sformatf("cr %0d: state %0d inter %0d, expected %0d %0d", cr, comp_en, cur_inter, m_state, m_inter));
  endtask

  initial begin
    cr0 = 10'd200; hw_cr = '0; sw_cr = '0; hw_cr_valid = 0; sw_cr_valid = 0; use_sw = 0;
    m_state = 0; m_inter = RMAX;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    chk(comp_en == 1'b0 && cur_inter == 8'(RMAX), "reset state");
    repeat (80) @(negedge clk);
    // Low ratio: compression worth it -> shrink, then switch on.
    repeat (6) request(120);
    chk(comp_en == 1'b1, "compression switched on");
    // Low ratio while on: relax back to R_MAX.
    repeat (6) request(150);
    repeat (60) @(negedge clk);
    // Equal ratio is no reason to act.
    request(200);
    // High ratio while on -> shrink and switch off.
    repeat (6) request(400);
    chk(comp_en == 1'b0, "compression switched off");
    for (int i = 0; i < 40; i++) begin
      request($urandom_range(150, 250));
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    chk(n_dec > 0 && n_inc > 0 && n_flip > 1, $sformatf("branches dec %0d inc %0d flip %0d", n_dec, n_inc, n_flip));
    chk(n_samples > 5, "sample pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
