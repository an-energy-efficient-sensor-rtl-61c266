// tb_i2c_master: self-checking test of the I2C controller.
//
// The bus lines are wired-AND of the controller and a behavioural I2C slave
// in the testbench (address 0x48, like a typical temperature sensor). The
// slave detects START and STOP, acknowledges its own address, stores a
// written register pointer, returns data bytes on reads and stretches the
// clock once. The test writes a pointer, reads two bytes with a repeated
// START (ACK then NACK), checks the not-acknowledge flag for a wrong address,
// the SCL period of 4 * (PRE + 1) cycles and that START/STOP conditions
// appear as the slave saw them. A random phase then runs 30 transactions:
// multi-byte register writes (pointer, then data bytes stored by the slave
// at successive registers) and multi-byte reads after a pointer write and a
// repeated START, each compared with a model of the slave's 16 registers.
module tb_i2c_master;
  import sn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_m2s_t wb;
  wb_s2m_t rsp;
  logic scl_oe, sda_oe, s_scl_oe, s_sda_oe;
  wire  scl = !scl_oe && !s_scl_oe;
  wire  sda = !sda_oe && !s_sda_oe;
  i2c_master dut (.clk, .rst_n, .wb, .wb_rsp(rsp), .scl_oe, .scl_i(scl), .sda_oe, .sda_i(sda));

  localparam int PRE = 3;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
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
  task automatic cmd(input byte_t c);
    byte_t st;
    wb_wr(8'h03, c);
    do wb_rd(8'h03, st); while (st[0]);
  endtask

  // ---------------- slave model ----------------
  int n_start = 0, n_stop = 0;
  always @(negedge sda) if (scl) n_start++;
  always @(posedge sda) if (scl) n_stop++;

  byte_t s_ptr, s_mem [16];
  int    s_wr_n = 0;   // data bytes the slave takes after the pointer
  byte_t s_last_addr;
  bit    stretch_once = 1'b1;
  int    s_bytes_written = 0;

  task automatic s_get(output byte_t b);
    for (int i = 0; i < 8; i++) begin
      @(posedge scl); b = {b[6:0], sda};
    end
  endtask

  task automatic s_ack(input bit ack);
    @(negedge scl); #1 s_sda_oe = ack;
    if (stretch_once) begin
      stretch_once = 1'b0; s_scl_oe = 1'b1; repeat (50) @(posedge clk); s_scl_oe = 1'b0;
    end
    @(negedge scl); #1 s_sda_oe = 1'b0;
  endtask

  task automatic s_put(input byte_t b, output bit master_ack);
    for (int i = 7; i >= 0; i--) begin
      s_sda_oe = !b[i];
      @(negedge scl); #1;
    end
    s_sda_oe = 1'b0;
    @(posedge scl); master_ack = !sda;
    @(negedge scl); #1;
  endtask

  initial begin : slave
    byte_t a, d;
    bit more;
    s_scl_oe = 1'b0; s_sda_oe = 1'b0; s_ptr = 0;
    for (int i = 0; i < 16; i++) s_mem[i] = byte_t'(17 * i + 3);
    s_mem[0] = 8'h19; s_mem[1] = 8'h80; s_mem[2] = 8'h5A; s_mem[3] = 8'hA5;
    forever begin
      @(negedge sda iff scl);               // START
      s_get(a); s_last_addr = a;
      if (a[7:1] != 7'h48) begin
        @(negedge scl); #1;                 // leave the acknowledge bit released
        continue;
      end
      s_ack(1'b1);
      if (!a[0]) begin
        s_get(d); s_ptr = d; s_bytes_written++; s_ack(1'b1);
        repeat (s_wr_n) begin
          s_get(d); s_mem[s_ptr[3:0]] = d; s_ptr++; s_ack(1'b1);
        end
      end else begin
        do begin
          s_put(s_mem[s_ptr[3:0]], more);
          s_ptr++;
        end while (more);
      end
    end
  end

  // SCL period measurement.
  int last_rise = -1, period = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge scl) begin
    if (last_rise >= 0) period = cyc - last_rise;
    last_rise = cyc;
  end

  initial begin
    byte_t r, st;
    wb = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    n_start = 0; n_stop = 0;
    chk(scl && sda, "bus idle after reset");
    wb_rd(8'h00, r); chk(r == 8'd24, "reset prescaler 100 kHz at 10 MHz");
    wb_wr(8'h00, 8'(PRE));
    // Write register pointer 2: START + address(W), then pointer + STOP.
    wb_wr(8'h01, 8'h90); cmd(8'b0_0101);
    wb_rd(8'h03, st); chk(st[1] == 1'b0, "address acknowledged");
    chk(n_start == 1, "one START seen");
    wb_wr(8'h01, 8'h02); cmd(8'b0_0110);
    chk(period == 4 * (PRE + 1), $sformatf("SCL period %0d", period));
    wb_rd(8'h03, st); chk(st[1] == 1'b0, "pointer acknowledged");
    chk(s_bytes_written == 1 && s_ptr == 8'h02, "slave got the pointer");
    chk(n_stop == 1, $sformatf("STOP seen %0d %0d", n_start, n_stop));
    chk(scl && sda, "bus released after STOP");
    // Read two bytes: START + address(R), read with ACK, read with NACK + STOP.
    wb_wr(8'h01, 8'h91); cmd(8'b0_0101);
    cmd(8'b0_1000);
    wb_rd(8'h02, r); chk(r == 8'h5A, $sformatf("first byte %02x", r));
    cmd(8'b1_1010);
    wb_rd(8'h02, r); chk(r == 8'hA5, $sformatf("second byte %02x", r));
    chk(n_start == 2 && n_stop == 2, "START/STOP count after read");
    // Repeated START: write pointer 0 then read without STOP in between.
    wb_wr(8'h01, 8'h90); cmd(8'b0_0101);
    wb_wr(8'h01, 8'h00); cmd(8'b0_0100);
    wb_wr(8'h01, 8'h91); cmd(8'b0_0101);
    chk(n_start == 4 && n_stop == 2, "repeated START without STOP");
    cmd(8'b1_1010);
    wb_rd(8'h02, r); chk(r == 8'h19, $sformatf("byte after repeated START %02x", r));
    // Wrong address: not acknowledged.
    wb_wr(8'h01, 8'hA0); cmd(8'b0_0111);
    wb_rd(8'h03, st); chk(st[1] == 1'b1, "missing acknowledge flagged");
    chk(s_last_addr == 8'hA0, "slave saw the address");
    chk(!stretch_once, "clock stretching exercised");
    // Random phase against a model of the slave's registers.
    begin
      byte_t m [16];
      int n, p, exp_start, exp_stop;
      for (int i = 0; i < 16; i++) m[i] = s_mem[i];
      exp_start = n_start; exp_stop = n_stop;
      for (int t = 0; t < 30; t++) begin
        n = $urandom_range(1, 4);
        p = $urandom_range(0, 15);
        if ($urandom_range(0, 1) != 0) begin
          s_wr_n = n;
          wb_wr(8'h01, 8'h90); cmd(8'b0_0101);
          wb_wr(8'h01, byte_t'(p)); cmd(8'b0_0100);
          for (int k = 0; k < n; k++) begin
            m[(p + k) % 16] = byte_t'($urandom);
            wb_wr(8'h01, m[(p + k) % 16]);
            cmd((k == n - 1) ? 8'b0_0110 : 8'b0_0100);
            wb_rd(8'h03, st); chk(st[1] == 1'b0, $sformatf("write %0d byte %0d acknowledged", t, k));
          end
          s_wr_n = 0;
          exp_start += 1; exp_stop += 1;
        end else begin
          exp_start += 2; exp_stop += 1;
          wb_wr(8'h01, 8'h90); cmd(8'b0_0101);
          wb_wr(8'h01, byte_t'(p)); cmd(8'b0_0100);
          wb_wr(8'h01, 8'h91); cmd(8'b0_0101);
          for (int k = 0; k < n; k++) begin
            cmd((k == n - 1) ? 8'b1_1010 : 8'b0_1000);
            wb_rd(8'h02, r);
            chk(r == m[(p + k) % 16], $sformatf("read %0d byte %0d: %02x expected %02x", t, k, r, m[(p + k) % 16]));
          end
        end
        chk(scl && sda, $sformatf("bus idle after transaction %0d", t));
      end
      chk(period == 4 * (PRE + 1), $sformatf("SCL period %0d at the end", period));
      chk(n_start == exp_start && n_stop == exp_stop,
          $sformatf("START %0d / STOP %0d, expected %0d / %0d", n_start, n_stop, exp_start, exp_stop));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
