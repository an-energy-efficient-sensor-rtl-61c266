// sn_pkg: types and constants shared by the sensor node processor.
//
// The external data memory is 8 KB of bytes (13-bit address), shared by the
// processor and the compression accelerators (CAs). The CA bus carries a job
// description (ca_cfg_t) from the processor, and each memory user drives the
// SRAM through a mem_req_t bundle. The Wishbone structs describe the
// single-master classic-cycle bus to the SPI, I2C and UART controllers.
// The compression ratio (CR = compressed bytes / original bytes) is an
// unsigned fixed-point number with CR_FRAC fraction bits.
// The 8 KB size follows the document; all widths and encodings are this
// design's own choice.
package sn_pkg;

  localparam int unsigned MEM_BYTES = 8192;
  localparam int unsigned ADDR_W    = $clog2(MEM_BYTES);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [7:0]        byte_t;

  // One access to the shared SRAM; read data returns one cycle later.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t adr;
    byte_t wdata;
  } mem_req_t;

  // Job given to a CA over the CA bus.
  typedef struct packed {
    addr_t src;        // first original sample (one byte each)
    addr_t dst;        // first byte of the encoded output
    addr_t work;       // scratch area for 16-bit coefficients, 3*len bytes
    addr_t len;        // number of samples, even (multiple of 4 for two levels)
    logic  two_level;  // 0: one wavelet level, 1: two levels
  } ca_cfg_t;

  // Compression ratio format.
  localparam int unsigned CR_W    = 10;
  localparam int unsigned CR_FRAC = 8;
  typedef logic [CR_W-1:0] cr_t;

  // Wishbone (classic cycles, 8-bit data, 8-bit address).
  localparam int unsigned WB_ADR_W = 8;
  typedef struct packed {
    logic                cyc;
    logic                stb;
    logic                we;
    logic [WB_ADR_W-1:0] adr;
    byte_t               dat;
  } wb_m2s_t;

  typedef struct packed {
    logic  ack;
    byte_t dat;
  } wb_s2m_t;

endpackage
