// wb_interconnect: shared Wishbone bus from the processor to its peripherals.
//
// One master (the processor) reaches N_SLV slaves (SPI, I2C and UART
// controllers by default). The top SEL_BITS address bits pick the slave; cyc
// and stb go only to that slave, address, data and write enable go to all,
// and the picked slave's ack and read data return to the master. An address
// with no slave behind it is answered by the interconnect itself with ack
// and read data 0 one cycle later, so the master never hangs.
// Classic Wishbone cycles, 8-bit data: a slave acknowledges each strobe.
// The bus and its three peripherals follow the document; the address map
// (slave i at i * 2**(WB_ADR_W - SEL_BITS)) is this design's own choice.
module wb_interconnect
  import sn_pkg::*;
#(
  parameter int unsigned N_SLV    = 3,
  parameter int unsigned SEL_BITS = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_m2s_t m,
  output wb_s2m_t m_rsp,
  output wb_m2s_t s     [N_SLV],
  input  wb_s2m_t s_rsp [N_SLV]
);
  logic [SEL_BITS-1:0] idx;
  logic                hit, err_ack;

  assign idx = m.adr[WB_ADR_W-1 -: SEL_BITS];
  assign hit = int'(idx) < N_SLV;

  always_comb begin
    for (int i = 0; i < N_SLV; i++) begin
      s[i] = m;
      s[i].cyc = m.cyc && (int'(idx) == i);
      s[i].stb = m.stb && (int'(idx) == i);
    end
    m_rsp = '0;
    if (hit) begin
      for (int i = 0; i < N_SLV; i++)
        if (int'(idx) == i) m_rsp = s_rsp[i];
    end else begin
      m_rsp.ack = err_ack;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_ack <= 1'b0;
    else        err_ack <= m.cyc && m.stb && !hit && !err_ack;
  end

  initial assert (N_SLV <= 2**SEL_BITS) else $error("wb_interconnect: too many slaves for SEL_BITS");
endmodule
