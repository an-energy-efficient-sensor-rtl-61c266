// tb_cr_sensor: self-checking test of the online compression-ratio sensor.
//
// Random numbers of original and compressed byte strobes are sent in each
// window; after the sample pulse the reported ratio must equal
// floor(out * 256 / in), saturated at the largest code, and arrive exactly
// CNT_W + CR_FRAC + 1 cycles after the sample. An empty window must keep the
// previous ratio, and strobes in the sample cycle must count in the next
// window. A sample taken while hold is high must wait: strobes until hold
// falls still count in the closing window and the ratio comes CNT_W +
// CR_FRAC + 1 cycles after hold falls.
module tb_cr_sensor;
  import sn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_byte, out_byte, sample, hold, cr_valid, busy;
  cr_t cr;
  cr_sensor #(.CNT_W(16)) dut (.clk, .rst_n, .in_byte, .out_byte, .sample, .hold, .cr, .cr_valid, .busy);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int carry_in, carry_out;
  task automatic window(input int nin, input int nout, input int expect_cr);
    int lat, i, o, tot_i, tot_o;
    i = carry_in; o = carry_out;
    tot_i = nin + carry_in; tot_o = nout + carry_out;
    while (i < tot_i || o < tot_o) begin
      @(negedge clk);
      in_byte  = (i < tot_i) && ($urandom_range(0, 3) != 0);
      out_byte = (o < tot_o) && ($urandom_range(0, 3) != 0);
      if (in_byte) i++;
      if (out_byte) o++;
    end
    @(negedge clk);
    // one strobe of each in the sample cycle belongs to the next window
    in_byte = 1'b1; out_byte = 1'b1; sample = 1'b1;
    carry_in = 1; carry_out = 1;
    @(negedge clk);
    in_byte = 1'b0; out_byte = 1'b0; sample = 1'b0;
    lat = 0;
    while (!cr_valid) begin @(negedge clk); lat++; end
    if (tot_i != 0) chk(lat == 16 + CR_FRAC + 1, $sformatf("latency %0d", lat));
    chk(int'(cr) == expect_cr, $sformatf("in %0d out %0d: cr %0d expected %0d", tot_i, tot_o, cr, expect_cr));
  endtask

  function automatic int ref_cr(input int nin, input int nout, input int prev);
    longint q;
    if (nin == 0) return prev;
    q = (longint'(nout) * 256) / longint'(nin);
    return (q > 1023) ? 1023 : int'(q);
  endfunction

  initial begin
    int a, b, prev;
    in_byte = 0; out_byte = 0; sample = 0; hold = 0; carry_in = 0; carry_out = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    window(100, 50, ref_cr(100, 50, 0)); prev = int'(cr);
    for (int k = 0; k < 12; k++) begin
      a = $urandom_range(1, 300); b = $urandom_range(0, 400);
      window(a, b, ref_cr(a + carry_in, b + carry_out, prev));
      prev = int'(cr);
    end
    window(10, 60, 1023);
    // Window with only the carried strobe, then a truly empty one.
    window(0, 0, ref_cr(1, 1, 0)); prev = int'(cr);
    carry_in = 0; carry_out = 0;
    @(negedge clk); sample = 1'b1; @(negedge clk); sample = 1'b0;
    while (!cr_valid) @(negedge clk);
    chk(int'(cr) == prev, "empty window keeps the ratio");
    // Sample during a job: 40 in, then the sample, then 30 out, then hold falls.
    begin
      bit early;
      int lat;
      @(negedge clk); hold = 1'b1;
      repeat (40) begin @(negedge clk); in_byte = 1'b1; end
      @(negedge clk); in_byte = 1'b0; sample = 1'b1;
      @(negedge clk); sample = 1'b0;
      early = 1'b0;
      repeat (30) begin @(negedge clk); out_byte = 1'b1; if (cr_valid || busy) early = 1'b1; end
      @(negedge clk); out_byte = 1'b0; hold = 1'b0;
      @(negedge clk);
      chk(!early, "no ratio while hold is high");
      lat = 0;
      while (!cr_valid) begin @(negedge clk); lat++; end
      chk(lat == 16 + CR_FRAC + 1, $sformatf("latency after hold %0d", lat));
      chk(int'(cr) == ref_cr(40, 30, prev), $sformatf("held window cr %0d", cr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
