// Bit-serial piecewise-linear curve generator (the core of the delta-w unit).
//
// It evaluates a decaying curve Y(X) that starts at Max for X = 0 and halves
// its value at every octave of X past the first segment:
//   segment 0 : 0 <= X < 2^s         slope d0      = (2d0) >> 1
//   segment i : 2^(s+i-1) <= X < 2^(s+i), i >= 1
//               starts at Max >> i, slope d_i = (2d0) >> 2i
// where s = slope_sh and 2d0 = Max >> s, so each segment drops by half of
// the value at its start. No multiplier is used: X is scanned one bit per
// cycle from the MSB (Idx) down to bit 0. The first set bit at or above s
// fixes the segment ("interval") and loads Y with Max >> interval; every
// later set bit subtracts d_v << Idx from Y.
//
// This structure (Max, 2d0, interval-dependent shifts of 2d0, the Y register
// loaded with Max and decremented by a partial difference d_v << Idx) follows
// the published block diagram; the exact rule that picks the interval from
// the leading one of X relative to slope_sh is this design's reading of it.
//
// Timing: pulse `start` with the inputs valid; `done` pulses XW cycles later
// with `y` valid until the next start. `busy` is high in between.
module pwl_curve_gen #(
  parameter int XW = 8,    // width of X (the STDP timer)
  parameter int VW = 10    // width of Max, 2d0 and Y
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x,
  input  logic [VW-1:0] max_v,
  input  logic [VW-1:0] d2,        // 2*d0
  input  logic [2:0]    slope_sh,  // length of segment 0 is 2^slope_sh
  output logic          busy,
  output logic          done,
  output logic [VW-1:0] y
);
  localparam int IW = $clog2(XW) + 1;

  logic [XW-1:0] x_q;
  logic [VW-1:0] max_q, d2_q, dv_q;
  logic [2:0]    s_q;
  logic [IW-1:0] idx;
  logic          decided;

  // Combinational step for the current bit.
  logic [IW-1:0] intv;
  logic [VW-1:0] dv_n, y_n, pdiff;
  logic          dec_n;
  always_comb begin
    dec_n = decided;
    dv_n  = dv_q;
    y_n   = y;
    intv  = '0;
    pdiff = '0;
    if (!decided) begin
      if (x_q[idx[IW-2:0]] && (int'(idx) >= int'(s_q))) begin
        // first set bit in the octave region: interval revealed
        intv  = idx - IW'(s_q) + 1'b1;
        dec_n = 1'b1;
        dv_n  = d2_q >> (2 * intv);
        y_n   = max_q >> intv;
      end else if (int'(idx) < int'(s_q)) begin
        // no set bit above: X lies in the first segment
        dec_n = 1'b1;
        dv_n  = d2_q >> 1;
        pdiff = VW'(dv_n << idx);
        if (x_q[idx[IW-2:0]]) y_n = (y > pdiff) ? y - pdiff : '0;
      end
    end else if (x_q[idx[IW-2:0]]) begin
      pdiff = VW'(dv_q << idx);
      y_n   = (y > pdiff) ? y - pdiff : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; decided <= 1'b0;
      idx <= '0; x_q <= '0; max_q <= '0; d2_q <= '0; dv_q <= '0; s_q <= '0; y <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; decided <= 1'b0;
        idx <= IW'(XW - 1);
        x_q <= x; max_q <= max_v; d2_q <= d2; s_q <= slope_sh;
        y <= max_v; dv_q <= '0;
      end else if (busy) begin
        decided <= dec_n; dv_q <= dv_n; y <= y_n;
        if (idx == '0) begin
          busy <= 1'b0; done <= 1'b1;
        end
        idx <= idx - 1'b1;
      end
    end
  end
endmodule
