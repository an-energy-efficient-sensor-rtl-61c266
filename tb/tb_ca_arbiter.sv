// tb_ca_arbiter: self-checking test of the CA bus protocol and SRAM arbiter.
//
// Two accelerators are modelled by the testbench itself (it drives their
// State, done and memory request lines), so that the arbiter's choices can
// be observed directly: normal-mode processor accesses to a real sram_sp,
// the start pulse and latched job after a Ctrl edge, power enables that
// follow Sel, the switch of the SRAM port to the active CA, processor stalls
// during compression, status bits, and a Ctrl edge ignored while busy.
// A random phase then runs 20 jobs on randomly chosen CAs. The active CA
// reads and writes random addresses, and the inactive CA and the stalled
// processor drive conflicting writes all the while. Every read is compared
// with a shadow copy of the memory, and the whole memory region is read
// back by the processor at the end.
module tb_ca_arbiter;
  import sn_pkg::*;
  localparam int N = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t cpu_mem, sram;
  byte_t cpu_rdata, ca_rdata, sram_rdata;
  logic cpu_stall, ctrl, comp_mode;
  logic [0:0] sel;
  ca_cfg_t cfg, ca_cfg;
  logic [N-1:0] ca_state_o, ca_status, ca_on, ca_start, ca_state, ca_done;
  mem_req_t ca_mem [N];

  ca_arbiter #(.N_CA(N)) dut (.clk, .rst_n, .cpu_mem, .cpu_rdata, .cpu_stall, .sel, .ctrl, .cfg,
    .ca_state_o, .ca_status, .comp_mode, .ca_on, .ca_start, .ca_cfg, .ca_mem, .ca_state, .ca_done,
    .ca_rdata, .sram, .sram_rdata);
  sram_sp ram (.clk, .req(sram.req), .we(sram.we), .adr(sram.adr), .wdata(sram.wdata), .rdata(sram_rdata));

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

  task automatic cpu_wr(input addr_t a, input byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b1, adr: a, wdata: d};
    @(negedge clk); cpu_mem = '0;
  endtask

  task automatic cpu_rd(input addr_t a, output byte_t d);
    @(negedge clk); cpu_mem = '{req: 1'b1, we: 1'b0, adr: a, wdata: 8'h00};
    @(negedge clk); cpu_mem = '0; d = cpu_rdata;
  endtask

  byte_t r;
  initial begin
    cpu_mem = '0; ctrl = 1'b0; sel = '0; cfg = '0; ca_state = '0; ca_done = '0;
    ca_mem[0] = '0; ca_mem[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    // Normal mode: the processor owns the SRAM.
    cpu_wr(13'h0010, 8'hA5);
    cpu_rd(13'h0010, r);
    chk(r == 8'hA5, "processor read back");
    chk(!comp_mode && !cpu_stall, "normal mode");
    // Sel picks the powered CA.
    sel = 1'b1; #1;
    chk(ca_on == 2'b10, "ca_on follows sel");
    sel = 1'b0; #1;
    chk(ca_on == 2'b01, "ca_on follows sel 0");
    // Start CA 1 with a job.
    @(negedge clk);
    sel = 1'b1; cfg = '{src: 13'h0100, dst: 13'h0200, work: 13'h0300, len: 13'd40, two_level: 1'b1};
    ctrl = 1'b1;
    @(negedge clk);
    chk(ca_start == 2'b10, "start pulse goes to CA 1");
    chk(ca_cfg == cfg, "job latched for the CA");
    chk(comp_mode, "compression mode from start");
    cfg = '0;   // processor may change its registers now
    ca_state[1] = 1'b1;
    @(negedge clk);
    chk(ca_start == 2'b00, "start is one pulse");
    chk(ca_cfg.len == 13'd40, "job held while running");
    // The CA writes, the processor is stalled.
    ca_mem[1] = '{req: 1'b1, we: 1'b1, adr: 13'h0200, wdata: 8'h3C};
    cpu_mem = '{req: 1'b1, we: 1'b1, adr: 13'h0200, wdata: 8'hFF};
    #1;
    chk(cpu_stall, "processor stalled in compression mode");
    chk(sram == ca_mem[1], "SRAM port follows active CA");
    @(negedge clk);
    ca_mem[1] = '{req: 1'b1, we: 1'b0, adr: 13'h0010, wdata: 8'h00};
    // A second Ctrl edge while busy is ignored.
    ctrl = 1'b0;
    @(negedge clk);
    chk(ca_rdata == 8'hA5, "CA reads processor data");
    ca_mem[1] = '0;
    ctrl = 1'b1; sel = 1'b0;
    @(negedge clk);
    chk(ca_start == 2'b00, "no start while busy");
    ctrl = 1'b0; sel = 1'b1;
    // CA 1 finishes.
    ca_state[1] = 1'b0; ca_done[1] = 1'b1;
    @(negedge clk);
    ca_done[1] = 1'b0;
    chk(ca_status == 2'b10, "status set on done");
    chk(!comp_mode, "back to normal mode");
    #1 chk(!cpu_stall, "processor released");
    @(negedge clk); cpu_mem = '0;
    cpu_rd(13'h0200, r);
    chk(r == 8'hFF, "stalled processor write lands after the job");
    // Start CA 0: its status clears, CA 1 keeps its own.
    sel = 1'b0; ctrl = 1'b1;
    @(negedge clk);
    chk(ca_start == 2'b01, "start pulse goes to CA 0");
    chk(ca_status == 2'b10, "status of CA 1 kept");
    ctrl = 1'b0;
    @(negedge clk);
    chk(!comp_mode, "CA 0 did not raise State: mode ends");
    // Random phase on addresses 0x400..0x4ff.
    begin
      byte_t shadow [256];
      int a, c, n_rd;
      for (int i = 0; i < 256; i++) begin
        shadow[i] = byte_t'($urandom);
        cpu_wr(addr_t'(1024 + i), shadow[i]);
      end
      n_rd = 0;
      for (int job = 0; job < 20; job++) begin
        c = $urandom_range(0, 1);
        @(negedge clk); sel = 1'(c); ctrl = 1'b1;
        @(negedge clk); ctrl = 1'b0; ca_state[c] = 1'b1;
        for (int k = 0; k < 40; k++) begin
          a = $urandom_range(0, 255);
          if ($urandom_range(0, 1) != 0) begin
            ca_mem[c] = '{req: 1'b1, we: 1'b1, adr: addr_t'(1024 + a), wdata: byte_t'($urandom)};
            shadow[a] = ca_mem[c].wdata;
          end else begin
            ca_mem[c] = '{req: 1'b1, we: 1'b0, adr: addr_t'(1024 + a), wdata: 8'h00};
          end
          ca_mem[1 - c] = '{req: 1'b1, we: 1'b1, adr: addr_t'(1024 + $urandom_range(0, 255)), wdata: 8'hEE};
          cpu_mem = '{req: 1'b1, we: 1'b1, adr: addr_t'(1024 + $urandom_range(0, 255)), wdata: 8'hDD};
          @(negedge clk);
          if (!ca_mem[c].we) begin
            chk(ca_rdata == shadow[a], $sformatf("job %0d on CA %0d: read %02x expected %02x", job, c, ca_rdata, shadow[a]));
            n_rd++;
          end
        end
        ca_mem[c] = '0; ca_mem[1 - c] = '0; cpu_mem = '0;
        ca_state[c] = 1'b0; ca_done[c] = 1'b1;
        @(negedge clk); ca_done[c] = 1'b0;
        chk(ca_status[c], $sformatf("job %0d: status of CA %0d set", job, c));
      end
      chk(n_rd > 100, "enough CA reads checked");
      for (int i = 0; i < 256; i++) begin
        cpu_rd(addr_t'(1024 + i), r);
        chk(r == shadow[i], $sformatf("memory 0x%03x holds %02x expected %02x", 1024 + i, r, shadow[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
