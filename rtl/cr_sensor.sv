// cr_sensor: online compression-ratio sensor of a compression accelerator.
//
// Two saturating counters count the original bytes the CA consumes
// (in_byte) and the compressed bytes it writes (out_byte). A sample pulse
// closes the current window: both counts are captured, the counters restart
// (a byte strobe in the same cycle opens the new window) and a restoring
// divider computes CR = out / in as an unsigned fixed-point number with
// CR_FRAC fraction bits, one quotient bit per cycle. When it ends, cr is
// updated and cr_valid pulses for one cycle. A window with no original bytes
// leaves cr unchanged but still pulses cr_valid, so a request never goes
// unanswered; a ratio beyond the range of cr saturates to its maximum.
// A sample that arrives while a division runs is ignored (busy is high).
// A sample that arrives while hold is high (the CA is in the middle of a
// job) is remembered and closes the window when hold falls, because the CA
// reads all of a job's input before it writes any output: a window cut
// inside a job would report a ratio that is far too low.
// Counting compressed bytes and reporting the CR follows the document; the
// windowing, the number format and the divider are this design's choices.
// Latency: cr_valid comes CNT_W + CR_FRAC + 1 cycles after sample (or after
// hold falls).
module cr_sensor
  import sn_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_byte,
  input  logic out_byte,
  input  logic sample,
  input  logic hold,
  output cr_t  cr,
  output logic cr_valid,
  output logic busy
);
  localparam int unsigned NUM_W = CNT_W + CR_FRAC;
  localparam int unsigned STEPS = NUM_W;

  logic [CNT_W-1:0] n_in, n_out, den;
  logic [NUM_W-1:0] num, quo;
  logic [CNT_W-1:0] rem;
  logic [$clog2(STEPS+1)-1:0] step;

  logic pend, close;
  assign close = (sample || pend) && !hold && !busy;

  logic [CNT_W:0] rem_sh;
  assign rem_sh = {rem[CNT_W-1:0], num[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in <= '0; n_out <= '0; den <= '0; num <= '0; quo <= '0; rem <= '0;
      step <= '0; busy <= 1'b0; cr <= '0; cr_valid <= 1'b0; pend <= 1'b0;
    end else begin
      cr_valid <= 1'b0;
      if (sample && hold && !busy) pend <= 1'b1;
      if (close) begin
        pend  <= 1'b0;
        n_in  <= CNT_W'(in_byte);
        n_out <= CNT_W'(out_byte);
        den   <= n_in;
        num   <= {n_out, CR_FRAC'(0)};
        quo   <= '0;
        rem   <= '0;
        step  <= '0;
        busy  <= 1'b1;
      end else begin
        if (in_byte  && n_in  != '1) n_in  <= n_in + 1'b1;
        if (out_byte && n_out != '1) n_out <= n_out + 1'b1;
      end
      if (busy) begin
        if (den == '0) begin
          busy <= 1'b0; cr_valid <= 1'b1;
        end else if (int'(step) == STEPS) begin
          busy <= 1'b0; cr_valid <= 1'b1;
          cr <= (quo > NUM_W'({CR_W{1'b1}})) ? '1 : quo[CR_W-1:0];
        end else begin
          num  <= num << 1;
          step <= step + 1'b1;
          if (rem_sh >= {1'b0, den}) begin
            rem <= CNT_W'(rem_sh - {1'b0, den});
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[CNT_W-1:0];
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
