// tb_wb_interconnect: self-checking test of the Wishbone shared bus.
//
// Three simple register-file slaves in the testbench (each acknowledging a
// strobe one cycle later, with its own answer pattern) sit behind the
// interconnect. Random writes and reads go to all three slaves and to the
// unmapped fourth quarter of the address space; the test checks that only
// the addressed slave sees cyc/stb, that read data come from it, and that an
// unmapped access is acknowledged with zero data.
module tb_wb_interconnect;
  import sn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_m2s_t m, s [3];
  wb_s2m_t m_rsp, s_rsp [3];
  wb_interconnect dut (.clk, .rst_n, .m, .m_rsp, .s, .s_rsp);

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

  // Slave models.
  byte_t regs [3][64];
  logic  ack [3];
  int    hits [3];
  for (genvar g = 0; g < 3; g++) begin : g_slv
    always @(posedge clk) begin
      ack[g] <= s[g].cyc && s[g].stb && !ack[g];
      if (s[g].cyc && s[g].stb && !ack[g]) begin
        hits[g]++;
        if (s[g].we) regs[g][s[g].adr[5:0]] <= s[g].dat;
      end
    end
    assign s_rsp[g].ack = ack[g];
    assign s_rsp[g].dat = regs[g][s[g].adr[5:0]] ^ byte_t'(g);
  end

  task automatic wb_wr(input logic [7:0] a, input byte_t d);
    @(negedge clk); m = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: d};
    do @(negedge clk); while (!m_rsp.ack);
    m = '0;
  endtask
  task automatic wb_rd(input logic [7:0] a, output byte_t d);
    @(negedge clk); m = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: a, dat: 8'h00};
    do @(negedge clk); while (!m_rsp.ack);
    d = m_rsp.dat; m = '0;
  endtask

  byte_t model [4][64];
  initial begin
    byte_t r, d;
    logic [7:0] a;
    int q;
    int h0 [3];
    m = '0;
    for (int i = 0; i < 3; i++) begin hits[i] = 0; ack[i] = 1'b0; end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 64; j++) begin regs[i][j] = 0; model[i][j] = 0; end
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      a = 8'($urandom);
      q = int'(a[7:6]);
      h0 = hits;
      if ($urandom_range(0, 1) != 0) begin
        d = byte_t'($urandom);
        wb_wr(a, d);
        if (q < 3) model[q][a[5:0]] = d;
      end else begin
        wb_rd(a, r);
        if (q < 3) chk(r == (model[q][a[5:0]] ^ byte_t'(q)), $sformatf("read %02x got %02x", a, r));
        else       chk(r == 8'h00, "unmapped read returns 0");
      end
      for (int i = 0; i < 3; i++)
        chk(hits[i] - h0[i] == ((i == q) ? 1 : 0), $sformatf("slave %0d strobes for address %02x", i, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
