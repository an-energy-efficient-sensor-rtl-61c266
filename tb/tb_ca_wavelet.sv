// tb_ca_wavelet: self-checking test of the wavelet compression accelerator.
//
// The CA runs against a behavioural copy of the shared SRAM (sram_sp). For
// each job the testbench fills the source area, computes the expected
// coefficients and encoded byte stream with an independent software model
// of the lifting equations and the token format, and compares the written
// stream, its length, the byte strobes and the first-level coefficients in
// the scratch area. Jobs cover smooth data, constant data (zero runs longer
// than 128), noisy data (escapes), one and two levels, and a frozen (en low)
// unit. The cycle count per original byte is checked against 60 cycles,
// the per-byte CA time of about 6 us at 10 MHz that the node latencies imply.
module tb_ca_wavelet;
  import sn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en, start, state, done, in_byte, out_byte;
  ca_cfg_t cfg;
  mem_req_t mem;
  byte_t rdata;
  logic [15:0] out_len;

  ca_wavelet dut (.clk, .rst_n, .en, .start, .cfg, .mem, .mem_rdata(rdata), .state, .done,
                  .out_len, .in_byte, .out_byte);
  sram_sp ram (.clk, .req(mem.req), .we(mem.we), .adr(mem.adr), .wdata(mem.wdata), .rdata);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model ----------------
  function automatic void lift(input int xs[$], output int lo[$], output int hi[$]);
    int m = xs.size() / 2;
    int dprev = 0;
    lo = {}; hi = {};
    for (int n = 0; n < m; n++) begin
      int nxt = (2*n + 2 < xs.size()) ? xs[2*n+2] : xs[2*n];
      int d = xs[2*n+1] - ((xs[2*n] + nxt) >>> 1);
      int dp = (n == 0) ? d : dprev;
      int s = xs[2*n] + ((dp + d) >>> 2);
      hi.push_back(d); lo.push_back(s);
      dprev = d;
    end
  endfunction

  function automatic void enc(input int vals[$], input bit delta, inout int out[$]);
    int run = 0, prev = 0;
    foreach (vals[i]) begin
      int v = delta ? vals[i] - prev : vals[i];
      prev = vals[i];
      if (v == 0) begin
        if (run == 128) begin out.push_back(128 + 127); run = 0; end
        run++;
      end else begin
        if (run > 0) begin out.push_back(128 + run - 1); run = 0; end
        if (v >= -63 && v <= 63) out.push_back(v & 'h7f);
        else begin out.push_back('h40); out.push_back((v >> 8) & 'hff); out.push_back(v & 'hff); end
      end
    end
    if (run > 0) out.push_back(128 + run - 1);
  endfunction

  int n_in, n_out;
  always @(posedge clk) begin
    if (in_byte)  n_in++;
    if (out_byte) n_out++;
  end

  task automatic run_job(input int kind, input int len, input bit two);
    int xs[$], lo[$], hi[$], lo2[$], hi2[$], exp[$];
    int t0, t1, v, w;
    addr_t src = 13'h0100, dst = 13'h1000, work = 13'h0400;
    v = 100;
    for (int i = 0; i < len; i++) begin
      case (kind)
        0: begin v = v + int'($urandom_range(0, 6)) - 3; if (v < 0) v = 0; if (v > 255) v = 255; end
        1: v = 77;
        default: v = int'($urandom_range(0, 255));
      endcase
      xs.push_back(v);
      ram.mem[src + addr_t'(i)] = byte_t'(v);
    end
    lift(xs, lo, hi);
    if (two) begin
      lift(lo, lo2, hi2);
      enc(lo2, 1'b1, exp); enc(hi2, 1'b0, exp); enc(hi, 1'b0, exp);
    end else begin
      enc(lo, 1'b1, exp); enc(hi, 1'b0, exp);
    end
    cfg = '{src: src, dst: dst, work: work, len: addr_t'(len), two_level: two};
    n_in = 0; n_out = 0;
    @(negedge clk); start = 1'b1; t0 = cycles;
    @(negedge clk); start = 1'b0;
    chk(state == 1'b1, "state rises after start");
    while (!done) @(negedge clk);
    t1 = cycles;
    chk(state == 1'b0, "state low when done");
    chk(int'(out_len) == exp.size(), $sformatf("out_len %0d expected %0d", out_len, exp.size()));
    for (int i = 0; i < exp.size(); i++)
      chk(int'(ram.mem[dst + addr_t'(i)]) == exp[i],
          $sformatf("kind %0d two %0d byte %0d: %02x expected %02x", kind, two, i, ram.mem[dst + addr_t'(i)], exp[i]));
    for (int i = 0; i < len/2; i++) begin
      w = int'(shortint'({ram.mem[work + addr_t'(2*i+1)], ram.mem[work + addr_t'(2*i)]}));
      chk(w == lo[i], $sformatf("low-pass %0d: %0d expected %0d", i, w, lo[i]));
      w = int'(shortint'({ram.mem[work + addr_t'(len + 2*i+1)], ram.mem[work + addr_t'(len + 2*i)]}));
      chk(w == hi[i], $sformatf("high-pass %0d: %0d expected %0d", i, w, hi[i]));
    end
    chk(n_in == len, $sformatf("in_byte count %0d", n_in));
    chk(n_out == exp.size(), $sformatf("out_byte count %0d", n_out));
    chk((t1 - t0) <= 60 * len, $sformatf("%0d cycles for %0d bytes", t1 - t0, len));
    $display("job kind=%0d len=%0d two=%0d: %0d bytes out, %0d cycles (%0d.%0d per byte)",
             kind, len, two, exp.size(), t1 - t0, (t1 - t0) / len, ((t1 - t0) * 10 / len) % 10);
  endtask

  initial begin
    en = 1'b1; start = 1'b0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    run_job(0, 64, 1'b0);
    run_job(0, 64, 1'b1);
    run_job(1, 600, 1'b0);
    run_job(1, 600, 1'b1);
    run_job(2, 32, 1'b0);
    run_job(2, 48, 1'b1);
    run_job(0, 2, 1'b0);
    run_job(0, 4, 1'b1);
    run_job(0, 256, 1'b1);
    // A switched-off CA ignores start.
    en = 1'b0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    chk(state == 1'b0 && mem.req == 1'b0, "disabled CA stays idle");
    en = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
