// tb_uart: self-checking test of the UART controller.
//
// The testbench decodes the tx line itself (start bit, eight data bits LSB
// first, stop bit, each DIV + 1 cycles long) and drives rx with its own
// frames. It checks transmitted bytes, the bit time, received bytes, the
// ready and overrun flags, a frame with a bad stop bit that must be dropped,
// and a short glitch that must not start a frame.
module tb_uart;
  import sn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_m2s_t wb;
  wb_s2m_t rsp;
  logic tx, rx;
  uart dut (.clk, .rst_n, .wb, .wb_rsp(rsp), .tx, .rx);

  localparam int DIV = 15;   // 16 cycles per bit

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
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

  // Receiver of the tx line.
  task automatic get_tx(output byte_t b, output int bit_time);
    int t0;
    @(negedge tx); t0 = int'($time);
    repeat (DIV / 2) @(posedge clk);
    chk(tx == 1'b0, "tx start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIV + 1) @(posedge clk);
      b[i] = tx;
    end
    repeat (DIV + 1) @(posedge clk);
    chk(tx == 1'b1, "tx stop bit");
    repeat (DIV / 2 + 2) @(posedge clk);
    bit_time = 0;
  endtask

  task automatic send_rx(input byte_t b, input bit stop);
    @(negedge clk);
    rx = 1'b0; repeat (DIV + 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (DIV + 1) @(negedge clk); end
    rx = stop; repeat (DIV + 1) @(negedge clk);
    rx = 1'b1; repeat (2) @(negedge clk);
  endtask

  int tfall, trise;
  initial begin
    byte_t r, got, b;
    int bt;
    wb = '0; rx = 1'b1;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    chk(tx == 1'b1, "tx idles high");
    wb_rd(8'h02, r); chk(r == 8'd86, "reset divider 115200 baud at 10 MHz");
    wb_wr(8'h02, 8'(DIV)); wb_wr(8'h03, 8'h00);
    // Transmit.
    for (int k = 0; k < 4; k++) begin
      b = byte_t'($urandom);
      fork
        get_tx(got, bt);
        begin wb_wr(8'h00, b); wb_wr(8'h00, ~b); end
      join
      chk(got == b, $sformatf("tx sent %02x expected %02x", got, b));
      wb_rd(8'h01, r); chk(r[0] == 1'b0, "tx idle after frame");
    end
    // Bit time of a 0x55 frame: every bit toggles.
    fork
      begin @(negedge tx); tfall = int'($time); @(posedge tx); trise = int'($time); end
      wb_wr(8'h00, 8'h55);
    join
    chk(trise - tfall == (DIV + 1) * 10, $sformatf("bit time %0d", trise - tfall));
    repeat (200) @(negedge clk);
    // Receive.
    for (int k = 0; k < 4; k++) begin
      b = byte_t'($urandom);
      send_rx(b, 1'b1);
      wb_rd(8'h01, r); chk(r[1] == 1'b1 && r[2] == 1'b0, "rx ready, no overrun");
      wb_rd(8'h00, r); chk(r == b, $sformatf("rx got %02x expected %02x", r, b));
      wb_rd(8'h01, r); chk(r[1] == 1'b0, "rx ready cleared by read");
    end
    // Overrun.
    send_rx(8'h11, 1'b1);
    send_rx(8'h22, 1'b1);
    wb_rd(8'h01, r); chk(r[2:1] == 2'b11, "overrun flagged");
    wb_rd(8'h00, r); chk(r == 8'h22, "newest byte kept");
    // Bad stop bit: frame dropped.
    send_rx(8'h33, 1'b0);
    repeat (DIV * 2) @(negedge clk);
    wb_rd(8'h01, r); chk(r[1] == 1'b0, "frame with low stop bit dropped");
    // Glitch shorter than half a bit.
    rx = 1'b0; repeat (3) @(negedge clk); rx = 1'b1;
    repeat (DIV * 12) @(negedge clk);
    wb_rd(8'h01, r); chk(r[1] == 1'b0, "glitch ignored");
    send_rx(8'hC3, 1'b1);
    wb_rd(8'h00, r); chk(r == 8'hC3, "receiver works after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
