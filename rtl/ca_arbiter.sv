// ca_arbiter: CA bus controller and shared-SRAM arbiter.
//
// The processor drives the CA bus: sel names one of N_CA compression
// accelerators, cfg carries the job (addresses, length, levels) and a rising
// edge on ctrl starts it. On that edge the arbiter latches cfg and sel, and
// one cycle later pulses start to the selected CA together with the latched
// job. The CA then holds its State line high while it works and drops it at
// the end; ca_state_o mirrors the State lines to the processor and
// ca_status records, per CA, a finished job until the next start of that CA.
// ca_on powers exactly the selected CA and keeps the others off.
//
// The SRAM has one port. In normal mode it carries the processor's accesses;
// in compression mode (from the start pulse until the active CA drops State)
// it carries the active CA's accesses, and a processor access is held off
// with cpu_stall until the mode ends. Read data of the SRAM goes to every
// user; it belongs to whoever issued the read in the previous cycle.
// The protocol steps and the mode-based address choice follow the document;
// the edge-triggered Ctrl, the stall and the status bits are this design's
// own choices. A Ctrl edge while a job runs is ignored (and flagged by an
// assertion).
module ca_arbiter
  import sn_pkg::*;
#(
  parameter int unsigned N_CA  = 1,
  parameter int unsigned SEL_W = (N_CA > 1) ? $clog2(N_CA) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor side
  input  mem_req_t         cpu_mem,
  output byte_t            cpu_rdata,
  output logic             cpu_stall,
  input  logic [SEL_W-1:0] sel,
  input  logic             ctrl,
  input  ca_cfg_t          cfg,
  output logic [N_CA-1:0]  ca_state_o,
  output logic [N_CA-1:0]  ca_status,
  output logic             comp_mode,
  // accelerator side
  output logic [N_CA-1:0]  ca_on,
  output logic [N_CA-1:0]  ca_start,
  output ca_cfg_t          ca_cfg,
  input  mem_req_t         ca_mem [N_CA],
  input  logic [N_CA-1:0]  ca_state,
  input  logic [N_CA-1:0]  ca_done,
  output byte_t            ca_rdata,
  // SRAM side
  output mem_req_t         sram,
  input  byte_t            sram_rdata
);
  logic             ctrl_q, pending;
  logic [SEL_W-1:0] active;

  logic go;
  assign go = ctrl && !ctrl_q && !comp_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= 1'b0; pending <= 1'b0; active <= '0; ca_cfg <= '0;
      ca_start <= '0; ca_status <= '0;
    end else begin
      ctrl_q   <= ctrl;
      ca_start <= '0;
      pending  <= 1'b0;
      if (go) begin
        ca_cfg  <= cfg;
        active  <= sel;
        pending <= 1'b1;
        ca_start[sel] <= 1'b1;
        ca_status[sel] <= 1'b0;
      end
      for (int i = 0; i < N_CA; i++)
        if (ca_done[i]) ca_status[i] <= 1'b1;
    end
  end

  always_comb begin
    ca_on = '0;
    ca_on[sel] = 1'b1;
  end

  assign comp_mode  = pending || ca_start[active] || ca_state[active];
  assign sram       = comp_mode ? ca_mem[active] : cpu_mem;
  assign cpu_stall  = comp_mode && cpu_mem.req;
  assign cpu_rdata  = sram_rdata;
  assign ca_rdata   = sram_rdata;
  assign ca_state_o = ca_state;

  // Protocol rules.
  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n) ctrl |-> (int'(sel) < N_CA));
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ctrl && !ctrl_q) |-> !comp_mode)
    else $warning("CA bus: Ctrl raised while a compression runs; ignored");
endmodule
