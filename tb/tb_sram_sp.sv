// tb_sram_sp: self-checking test of the external data SRAM.
//
// Fills the whole 8 KB memory with a pattern derived from the address,
// overwrites random locations while keeping a reference copy, and reads
// everything back. Read data must appear exactly one cycle after the read
// request and hold while no read is issued.
module tb_sram_sp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int D = 8192;
  logic req, we;
  logic [12:0] adr;
  logic [7:0] wdata, rdata;
  sram_sp dut (.clk, .req, .we, .adr, .wdata, .rdata);

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

  byte unsigned ref_mem [D];
  initial begin
    req = 0; we = 0; adr = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); req = 1; we = 1; adr = 13'(i); wdata = 8'((i * 37) ^ (i >> 8)); ref_mem[i] = wdata;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk); req = 1; we = 1; adr = 13'($urandom); wdata = 8'($urandom); ref_mem[adr] = wdata;
    end
    for (int i = 0; i < D; i++) begin
      @(negedge clk); req = 1; we = 0; adr = 13'(i);
      @(negedge clk); req = 0; adr = 13'(i + 1);
      chk(rdata == ref_mem[i], $sformatf("address %0d: %02x expected %02x", i, rdata, ref_mem[i]));
      if (i % 1024 == 0) begin
        @(negedge clk);
        chk(rdata == ref_mem[i], "read data holds while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
