// Self-checking test of pwl_curve_gen against a closed-form model of the
// octave-halving piecewise-linear curve. Latency check: done is seen on the
// ninth falling edge after start is raised (XW = 8 cycles after the start edge).
module tb_pwl_curve_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start = 0, busy, done;
  logic [7:0] x;
  logic [9:0] max_v, d2, y;
  logic [2:0] s;

  pwl_curve_gen #(.XW(8), .VW(10)) dut (.clk, .rst_n, .start, .x, .max_v, .d2, .slope_sh(s),
                                        .busy, .done, .y);

  // Y(x): segment 0 linear from Max with slope (2d0>>1); segment i >= 1
  // starts at Max>>i at x = 2^(s+i-1) with slope 2d0>>2i.
  function automatic int model(int xv, int mx, int dd, int sh);
    int m, i, dv, yy;
    if (xv < (1 << sh)) begin
      yy = mx - (dd >> 1) * xv;
    end else begin
      m = 0;
      for (int b = 0; b < 8; b++) if (xv[b]) m = b;
      i  = m - sh + 1;
      dv = dd >> (2 * i);
      yy = (mx >> i) - dv * (xv - (1 << m));
    end
    return (yy < 0) ? 0 : yy;
  endfunction

  task automatic run(int xv, int mx, int sh);
    int lat, exp_y;
    x = 8'(xv); max_v = 10'(mx); s = 3'(sh); d2 = 10'(mx >> sh);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    exp_y = model(xv, mx, mx >> sh, sh);
    checks++;
    if (int'(y) != exp_y || lat != 9) begin
      failures++;
      $display("FAIL x=%0d max=%0d s=%0d y=%0d exp=%0d lat=%0d", xv, mx, sh, y, exp_y, lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // breakpoints of the curve halve: Max, Max/2, Max/4 ... at 2^s, 2^(s+1) ...
    run(0, 256, 4); run(16, 256, 4); run(32, 256, 4); run(64, 256, 4); run(128, 256, 4);
    run(8, 256, 4); run(255, 511, 3); run(1, 100, 0); run(200, 512, 7);
    for (int k = 0; k < 400; k++) run($urandom_range(0, 255), $urandom_range(0, 512), $urandom_range(0, 7));
    // segment ends land on Max >> i for a power-of-two Max
    checks++;
    if (model(32, 256, 16, 4) != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
