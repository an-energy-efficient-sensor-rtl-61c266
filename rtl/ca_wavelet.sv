// ca_wavelet: compression accelerator (CA) for distributed wavelet compression.
//
// A job compresses cfg.len one-byte sensor readings D(n) stored at cfg.src
// in the shared SRAM and writes an encoded byte stream to cfg.dst. It runs in
// two phases driven by one hardwired state machine with counters; the
// datapath holds a few coefficient registers, multiplexers and the adders,
// shifters and comparators the algorithm needs.
//
// 1. Transform. The 5/3 biorthogonal wavelet is computed with lifting:
//      d(2n+1) = D(2n+1) - floor((D(2n) + D(2n+2)) / 2)
//      s(2n)   = D(2n)   + floor((d(2n-1) + d(2n+1)) / 4)
//    The readings stream through three registers (even, odd, next even) and
//    the previous high-pass value, so each reading is fetched once. At the
//    edges the sequence is mirrored: D(len) = D(len-2) and d(-1) = d(1).
//    Coefficients are written to the scratch area cfg.work as 16-bit
//    little-endian words: low-pass at work, high-pass at work+len. With
//    cfg.two_level the low-pass half is transformed again, giving a second
//    low-pass set at work+2*len and a second high-pass set at work+2.5*len.
// 2. Encode. The coefficient sets are read back in the order: last-level
//    low-pass (as differences to the previous one, the first from 0), then
//    the high-pass sets from the last level to the first. Each value goes to
//    one token stream:
//      1rrrrrrr         run of r+1 zero values (1..128)
//      0vvvvvvv         value v in -63..63, 7-bit two's complement, v != 0
//      0x40, hi, lo     escape: any other value as a 16-bit two's complement
//    The run-length coding of the small high-pass values follows the
//    document; the token format, the differencing of the low-pass values and
//    the memory layout are this design's own choices.
//
// Interface: start (one cycle, while en) latches cfg and raises state; state
// falls and done pulses for one cycle when the last byte is written, and
// out_len then holds the number of encoded bytes. en low freezes the unit
// (a CA that the processor has switched off). in_byte and out_byte pulse for
// every original byte read and every encoded byte written, for the online CR
// sensor. The memory port issues at most one access per cycle and expects
// read data on mem_rdata one cycle after the request.
// Timing: about 5 cycles per sample for the one-level transform, 3 cycles per
// coefficient read plus one per written byte for the encoding.
module ca_wavelet
  import sn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     start,
  input  ca_cfg_t  cfg,
  output mem_req_t mem,
  input  byte_t    mem_rdata,
  output logic     state,
  output logic     done,
  output logic [15:0] out_len,
  output logic     in_byte,
  output logic     out_byte
);

  typedef enum logic [4:0] {
    S_IDLE, S_T_INIT, S_T_FIRST, S_T_ODD, S_T_EVEN, S_T_CALC,
    S_T_WSL, S_T_WSH, S_T_WDL, S_T_WDH, S_T_NEXT,
    S_F_LO, S_F_HI, S_F_CAP8, S_F_CAP16,
    S_E_SEG, S_E_FETCH, S_E_DIFF, S_E_CLASS, S_E_RUN, S_E_V1,
    S_E_ESC, S_E_VH, S_E_VL, S_E_NEXT, S_E_END, S_E_RUNEND, S_DONE
  } st_e;

  typedef logic signed [15:0] coef_t;

  st_e     st, f_ret;
  ca_cfg_t c;
  logic    pass;           // transform pass: 0 first level, 1 second level
  logic [1:0] seg;         // encode segment index
  addr_t   n;              // pair index (transform) or element index (encode)
  addr_t   f_adr;          // address of the element being fetched
  logic    f16;            // element is a 16-bit word
  logic [1:0] f_dst;       // 0: de, 1: dodd, 2: dn, 3: x
  byte_t   f_lo;
  coef_t   de, dodd, dn, dprev, x, prev, vreg, d_r, s_r;
  logic [7:0]  run;
  logic [15:0] ocnt;

  // Pass description.
  addr_t t_in, t_lo, t_hi, t_m;
  logic  t_in16;
  always_comb begin
    if (!pass) begin
      t_in = c.src;  t_in16 = 1'b0; t_m = c.len >> 1;
      t_lo = c.work; t_hi = c.work + c.len;
    end else begin
      t_in = c.work; t_in16 = 1'b1; t_m = c.len >> 2;
      t_lo = c.work + (c.len << 1);
      t_hi = c.work + (c.len << 1) + (c.len >> 1);
    end
  end

  // Segment description for the encoder.
  addr_t e_base, e_cnt;
  logic  e_delta, e_last;
  always_comb begin
    e_delta = 1'b0; e_last = 1'b0;
    e_base = c.work + c.len; e_cnt = c.len >> 1;
    if (!c.two_level) begin
      unique case (seg)
        2'd0:    begin e_base = c.work; e_cnt = c.len >> 1; e_delta = 1'b1; end
        default: begin e_base = c.work + c.len; e_cnt = c.len >> 1; e_last = 1'b1; end
      endcase
    end else begin
      unique case (seg)
        2'd0: begin e_base = c.work + (c.len << 1); e_cnt = c.len >> 2; e_delta = 1'b1; end
        2'd1: begin e_base = c.work + (c.len << 1) + (c.len >> 1); e_cnt = c.len >> 2; end
        default: begin e_base = c.work + c.len; e_cnt = c.len >> 1; e_last = 1'b1; end
      endcase
    end
  end

  // Lifting arithmetic.
  logic signed [16:0] sum_e, sum_d;
  coef_t d_c, dp, s_c;
  always_comb begin
    sum_e = 17'(de) + 17'(dn);
    d_c   = dodd - coef_t'(sum_e >>> 1);
    dp    = (n == '0) ? d_c : dprev;
    sum_d = 17'(dp) + 17'(d_c);
    s_c   = de + coef_t'(sum_d >>> 2);
  end

  logic v_small;
  assign v_small = (vreg >= -16'sd63) && (vreg <= 16'sd63);

  // Memory requests.
  always_comb begin
    mem = '0;
    out_byte = 1'b0;
    unique case (st)
      S_F_LO: begin mem.req = 1'b1; mem.adr = f_adr; end
      S_F_HI: begin mem.req = 1'b1; mem.adr = f_adr + 1'b1; end
      S_T_WSL: begin mem.req = 1'b1; mem.we = 1'b1; mem.adr = t_lo + (n << 1);        mem.wdata = s_r[7:0];  end
      S_T_WSH: begin mem.req = 1'b1; mem.we = 1'b1; mem.adr = t_lo + (n << 1) + 1'b1; mem.wdata = s_r[15:8]; end
      S_T_WDL: begin mem.req = 1'b1; mem.we = 1'b1; mem.adr = t_hi + (n << 1);        mem.wdata = d_r[7:0];  end
      S_T_WDH: begin mem.req = 1'b1; mem.we = 1'b1; mem.adr = t_hi + (n << 1) + 1'b1; mem.wdata = d_r[15:8]; end
      S_E_RUN, S_E_RUNEND: begin mem.req = 1'b1; mem.we = 1'b1; mem.wdata = {1'b1, 7'(run - 8'd1)}; end
      S_E_V1:  begin mem.req = 1'b1; mem.we = 1'b1; mem.wdata = {1'b0, vreg[6:0]}; end
      S_E_ESC: begin mem.req = 1'b1; mem.we = 1'b1; mem.wdata = 8'h40; end
      S_E_VH:  begin mem.req = 1'b1; mem.we = 1'b1; mem.wdata = vreg[15:8]; end
      S_E_VL:  begin mem.req = 1'b1; mem.we = 1'b1; mem.wdata = vreg[7:0]; end
      default: ;
    endcase
    if (mem.we && (st inside {S_E_RUN, S_E_RUNEND, S_E_V1, S_E_ESC, S_E_VH, S_E_VL})) begin
      mem.adr  = c.dst + addr_t'(ocnt);
      out_byte = en;
    end
    if (!en) mem = '0;
  end

  assign state   = (st != S_IDLE);
  assign out_len = ocnt;
  assign in_byte = en && (st == S_F_CAP8);

  // Fetched value.
  coef_t fval;
  assign fval = (st == S_F_CAP16) ? coef_t'({mem_rdata, f_lo}) : coef_t'({8'h00, mem_rdata});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; f_ret <= S_IDLE; c <= '0; pass <= 1'b0; seg <= '0; n <= '0;
      f_adr <= '0; f16 <= 1'b0; f_dst <= '0; f_lo <= '0;
      de <= '0; dodd <= '0; dn <= '0; dprev <= '0; x <= '0; prev <= '0; vreg <= '0;
      d_r <= '0; s_r <= '0; run <= '0; ocnt <= '0; done <= 1'b0;
    end else if (en) begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          c <= cfg; pass <= 1'b0; seg <= '0; ocnt <= '0; run <= '0;
          if (cfg.len < 2 || (cfg.two_level && cfg.len < 4)) st <= S_DONE;
          else st <= S_T_INIT;
        end
        // ---------------- transform ----------------
        S_T_INIT: begin   // fetch element 0
          n <= '0; f_adr <= t_in; f16 <= t_in16; f_dst <= 2'd0; f_ret <= S_T_ODD; st <= S_F_LO;
        end
        S_T_ODD: begin    // fetch element 2n+1
          f_adr <= t_in + (t_in16 ? ((n << 2) + 2) : ((n << 1) + 1));
          f16 <= t_in16; f_dst <= 2'd1; f_ret <= S_T_EVEN; st <= S_F_LO;
        end
        S_T_EVEN: begin   // fetch element 2n+2, or mirror at the end
          if (n + 1'b1 < t_m) begin
            f_adr <= t_in + (t_in16 ? ((n << 2) + 4) : ((n << 1) + 2));
            f16 <= t_in16; f_dst <= 2'd2; f_ret <= S_T_CALC; st <= S_F_LO;
          end else begin
            dn <= de; st <= S_T_CALC;
          end
        end
        S_T_CALC: begin d_r <= d_c; s_r <= s_c; st <= S_T_WSL; end
        S_T_WSL:  st <= S_T_WSH;
        S_T_WSH:  st <= S_T_WDL;
        S_T_WDL:  st <= S_T_WDH;
        S_T_WDH:  st <= S_T_NEXT;
        S_T_NEXT: begin
          de <= dn; dprev <= d_r;
          if (n + 1'b1 < t_m) begin
            n <= n + 1'b1; st <= S_T_ODD;
          end else if (c.two_level && !pass) begin
            pass <= 1'b1; st <= S_T_INIT;
          end else begin
            seg <= '0; st <= S_E_SEG;
          end
        end
        // ---------------- element fetch ----------------
        S_F_LO:  st <= f16 ? S_F_HI : S_F_CAP8;
        S_F_HI:  begin f_lo <= mem_rdata; st <= S_F_CAP16; end
        S_F_CAP8, S_F_CAP16: begin
          unique case (f_dst)
            2'd0: de   <= fval;
            2'd1: dodd <= fval;
            2'd2: dn   <= fval;
            default: x <= fval;
          endcase
          st <= f_ret;
        end
        // ---------------- encode ----------------
        S_E_SEG: begin n <= '0; prev <= '0; run <= '0; st <= S_E_FETCH; end
        S_E_FETCH: begin
          f_adr <= e_base + (n << 1); f16 <= 1'b1; f_dst <= 2'd3; f_ret <= S_E_DIFF; st <= S_F_LO;
        end
        S_E_DIFF: begin
          vreg <= e_delta ? (x - prev) : x;
          prev <= x;
          st <= S_E_CLASS;
        end
        S_E_CLASS: begin
          if (vreg == '0 && run != 8'd128) begin
            run <= run + 8'd1; st <= S_E_NEXT;
          end else if (run != '0) st <= S_E_RUN;
          else if (v_small) st <= S_E_V1;
          else st <= S_E_ESC;
        end
        S_E_RUN: begin run <= '0; ocnt <= ocnt + 1'b1; st <= S_E_CLASS; end
        S_E_V1:  begin ocnt <= ocnt + 1'b1; st <= S_E_NEXT; end
        S_E_ESC: begin ocnt <= ocnt + 1'b1; st <= S_E_VH; end
        S_E_VH:  begin ocnt <= ocnt + 1'b1; st <= S_E_VL; end
        S_E_VL:  begin ocnt <= ocnt + 1'b1; st <= S_E_NEXT; end
        S_E_NEXT: begin
          if (n + 1'b1 < e_cnt) begin n <= n + 1'b1; st <= S_E_FETCH; end
          else st <= S_E_END;
        end
        S_E_END: st <= (run != '0) ? S_E_RUNEND : (e_last ? S_DONE : S_E_SEG);
        S_E_RUNEND: begin
          run <= '0; ocnt <= ocnt + 1'b1;
          st <= e_last ? S_DONE : S_E_SEG;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
      if (st == S_E_END && run == '0 && !e_last) seg <= seg + 1'b1;
      if (st == S_E_RUNEND && !e_last) seg <= seg + 1'b1;
    end
  end

endmodule
