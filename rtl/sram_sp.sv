// sram_sp: single-port synchronous byte memory, the node's external data memory.
//
// Both the processor and the compression accelerators reach this memory
// through the CA arbiter. A write stores wdata at adr on the clock edge when
// req and we are high. A read (req high, we low) returns mem[adr] on rdata
// after the next clock edge, so read data has one cycle of latency; rdata
// holds its value while no read is issued. DEPTH defaults to the 8 KB given
// for the chip's external data memory; the access timing is this design's own
// choice. Contents are not reset.
module sram_sp #(
  parameter int unsigned DEPTH = sn_pkg::MEM_BYTES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] adr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[adr] <= wdata;
      else    rdata    <= mem[adr];
    end
  end
endmodule
