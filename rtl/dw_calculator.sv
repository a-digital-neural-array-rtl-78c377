// Delta-w calculator, one per neuron and shared by all of its synapses.
//
// From the present weight w and the spike interval dt it produces the weight
// change dw without a look-up table or multiplier:
//   Max    = |w| >> max_sh          (max-value control)
//   2d0    = Max >> slope_sh        (slope control)
//   offset = Max >> off_sh          (offset control)
//   Y      = piecewise-linear curve of dt (pwl_curve_gen)
//   dw     = +/-(Y - offset + noise) (sign control; offset only if off_en)
// The noise term is the low noise+1 bits of an LFSR read as a signed number
// (zero when noise = 0). Because every term scales with |w|, the curve is a
// fraction of the existing weight, as in biological STDP.
//
// The shift-based derivation of Max, 2d0 and offset from |w|, the adder fed
// by Y, offset and the LFSR, and the final sign stage follow the published
// block diagram. Offset is subtracted (the published offset examples move
// the curve down); the noise width encoding is this design's choice.
//
// Timing: pulse `start` with w, dt and curve valid (they are captured);
// `done` pulses XW+1 cycles later with `dw` valid until the next start.
module dw_calculator
  import dna_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [W_W-1:0]  w,
  input  logic [T_W-1:0]         dt,
  input  curve_t                 curve,
  output logic                   busy,
  output logic                   done,
  output logic signed [DW_W-1:0] dw
);
  logic [W_W-1:0] mag, max_v, d2, off_v;
  curve_t         cv_q;
  logic [W_W-1:0] off_q;
  logic           pwl_busy, pwl_done;
  logic [W_W-1:0] y;
  logic [15:0]    rnd;

  // |w|; -512 maps to 512, which fits in 10 unsigned bits.
  assign mag   = w[W_W-1] ? W_W'(-w) : W_W'(w);
  assign max_v = mag >> curve.max_sh;
  assign d2    = max_v >> curve.slope_sh;
  assign off_v = max_v >> curve.off_sh;

  pwl_curve_gen #(.XW(T_W), .VW(W_W)) u_pwl (
    .clk, .rst_n, .start, .x(dt), .max_v, .d2, .slope_sh(curve.slope_sh),
    .busy(pwl_busy), .done(pwl_done), .y
  );

  lfsr #(.SEED(SEED)) u_lfsr (.clk, .rst_n, .en(pwl_done), .q(rnd));

  logic signed [DW_W-1:0] noise, sum;
  always_comb begin
    unique case (cv_q.noise)
      2'd0:    noise = '0;
      2'd1:    noise = DW_W'($signed(rnd[1:0]));
      2'd2:    noise = DW_W'($signed(rnd[2:0]));
      default: noise = DW_W'($signed(rnd[3:0]));
    endcase
    sum = $signed({2'b00, y}) + noise;
    if (cv_q.off_en) sum = sum - $signed({2'b00, off_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv_q <= '0; off_q <= '0; done <= 1'b0; dw <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cv_q <= curve; off_q <= off_v;
      end
      if (pwl_done) begin
        dw   <= cv_q.neg ? -sum : sum;
        done <= 1'b1;
      end
    end
  end

  assign busy = pwl_busy | pwl_done;
endmodule
