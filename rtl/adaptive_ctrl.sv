// adaptive_ctrl: comparison and arbitration module of the adaptive compression.
//
// A timer divides the clock into interval units (CYCLES_PER_UNIT cycles,
// 1 ms at the node's 10 MHz clock) and pulses sample every cur_inter units;
// the pulse asks the online CR sensor for a fresh compression ratio. Each
// arriving ratio (hw_cr_valid from the sensor, or sw_cr_valid when use_sw
// selects a ratio computed by the processor) is an arbitration request and
// runs one step of the tuning algorithm:
//   - if compression is on and CR > CR0, or off and CR < CR0 (compressing is
//     useless, or would save energy or latency), the interval shrinks by STEP;
//     once it is already R_MIN the compression state flips instead;
//   - otherwise the interval grows by STEP up to R_MAX, state unchanged.
// After reset compression is off and the interval is R_MAX. comp_en is the
// compression state for the processor and the CA, cur_inter the interval in
// units. ev_dec, ev_inc and ev_flip pulse when the corresponding branch is
// taken. cr0 is the reference ratio that the processor derives from the
// energy and latency models for its optimisation goal.
// The algorithm and the R_MAX = 7 ms, R_MIN = 3 ms and STEP = 1 ms defaults
// follow the document. The time unit, the clamp at R_MIN when STEP does not
// divide the range, and the choice of ratio source are this design's own.
// Timing: the new state and interval are visible one cycle after the ratio.
module adaptive_ctrl
  import sn_pkg::*;
#(
  parameter int unsigned CYCLES_PER_UNIT = 10000,
  parameter int unsigned INT_W = 8,
  parameter int unsigned R_MAX = 7,
  parameter int unsigned R_MIN = 3,
  parameter int unsigned STEP  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cr_t              cr0,
  input  cr_t              hw_cr,
  input  logic             hw_cr_valid,
  input  cr_t              sw_cr,
  input  logic             sw_cr_valid,
  input  logic             use_sw,
  output logic             sample,
  output logic             comp_en,
  output logic [INT_W-1:0] cur_inter,
  output logic             ev_dec,
  output logic             ev_inc,
  output logic             ev_flip
);
  localparam int unsigned PRE_W = (CYCLES_PER_UNIT > 1) ? $clog2(CYCLES_PER_UNIT) : 1;
  localparam logic [INT_W-1:0] RMAX = INT_W'(R_MAX);
  localparam logic [INT_W-1:0] RMIN = INT_W'(R_MIN);
  localparam logic [INT_W-1:0] STP  = INT_W'(STEP);

  logic [PRE_W-1:0] pre;
  logic [INT_W-1:0] units;
  logic             tick;

  // Interval timer.
  assign tick = (pre == PRE_W'(CYCLES_PER_UNIT - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; units <= '0; sample <= 1'b0;
    end else begin
      sample <= 1'b0;
      pre <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        if (units + 1'b1 >= cur_inter) begin
          units  <= '0;
          sample <= 1'b1;
        end else begin
          units <= units + 1'b1;
        end
      end
    end
  end

  // Tuning algorithm.
  cr_t  cr;
  logic req, act;
  assign cr  = use_sw ? sw_cr : hw_cr;
  assign req = use_sw ? sw_cr_valid : hw_cr_valid;
  assign act = (comp_en && (cr > cr0)) || (!comp_en && (cr < cr0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_en <= 1'b0; cur_inter <= RMAX;
      ev_dec <= 1'b0; ev_inc <= 1'b0; ev_flip <= 1'b0;
    end else begin
      ev_dec <= 1'b0; ev_inc <= 1'b0; ev_flip <= 1'b0;
      if (req) begin
        if (act) begin
          if (cur_inter <= RMIN) begin
            comp_en <= !comp_en;
            ev_flip <= 1'b1;
          end else begin
            cur_inter <= (cur_inter < RMIN + STP) ? RMIN : cur_inter - STP;
            ev_dec <= 1'b1;
          end
        end else if ({1'b0, cur_inter} + {1'b0, STP} <= {1'b0, RMAX}) begin
          cur_inter <= cur_inter + STP;
          ev_inc <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (R_MIN >= 1 && R_MIN <= R_MAX && STEP >= 1 && R_MAX < 2**INT_W)
      else $error("adaptive_ctrl: need 1 <= R_MIN <= R_MAX < 2**INT_W and STEP >= 1");
  end
endmodule
