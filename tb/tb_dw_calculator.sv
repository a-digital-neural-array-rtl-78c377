// Self-checking test of dw_calculator: Max/2d0/offset derivation from |w|,
// offset subtraction, sign control, LFSR noise bounds and the XW+1 latency.
module tb_dw_calculator;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done;
  logic signed [W_W-1:0]  w;
  logic [T_W-1:0]         dt;
  curve_t                 cv;
  logic signed [DW_W-1:0] dw;

  dw_calculator dut (.clk, .rst_n, .start, .w, .dt, .curve(cv), .busy, .done, .dw);

  function automatic int pwl(int xv, int mx, int dd, int sh);
    int m, i, yy;
    if (xv < (1 << sh)) yy = mx - (dd >> 1) * xv;
    else begin
      m = 0;
      for (int b = 0; b < 8; b++) if (xv[b]) m = b;
      i  = m - sh + 1;
      yy = (mx >> i) - (dd >> (2 * i)) * (xv - (1 << m));
    end
    return (yy < 0) ? 0 : yy;
  endfunction

  task automatic run(int wv, int dtv, curve_t c);
    int mag, mx, dd, off, y, exp_dw, lat, nb, lo, hi;
    w = 10'(wv); dt = 8'(dtv); cv = c;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    mag = (wv < 0) ? -wv : wv;
    mx  = mag >> c.max_sh;
    dd  = mx >> c.slope_sh;
    off = c.off_en ? (mx >> c.off_sh) : 0;
    y   = pwl(dtv, mx, dd, c.slope_sh);
    exp_dw = y - off;
    nb  = (c.noise == 0) ? 0 : int'(c.noise) + 1;
    lo  = (nb == 0) ? 0 : -(1 << (nb - 1));
    hi  = (nb == 0) ? 0 : (1 << (nb - 1)) - 1;
    checks++;
    if (c.neg) begin
      if (int'(dw) < -(exp_dw + hi) || int'(dw) > -(exp_dw + lo)) failures++;
    end else begin
      if (int'(dw) < exp_dw + lo || int'(dw) > exp_dw + hi) failures++;
    end
    checks++;
    if (lat != 10) failures++;
    if (failures > 0 && failures < 5)
      $display("w=%0d dt=%0d dw=%0d exp=%0d neg=%0d lat=%0d", wv, dtv, dw, exp_dw, c.neg, lat);
  endtask

  initial begin
    curve_t c;
    int seen_noise;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 50 % of w at dt = 0, 25 % at dt = 16 (max_sh 1, slope_sh 4)
    c = '{max_sh: 1, slope_sh: 4, off_sh: 3, off_en: 0, neg: 0, noise: 0};
    run(400, 0, c);  checks++; if (dw != 200) failures++;
    run(400, 16, c); checks++; if (dw != 100) failures++;
    run(-400, 16, c); checks++; if (dw != 100) failures++;
    c.neg = 1; run(400, 16, c); checks++; if (dw != -100) failures++;
    c.neg = 0; c.off_en = 1; run(400, 255, c); // tail below the offset turns negative
    checks++; if (dw >= 0) failures++;
    for (int k = 0; k < 300; k++) begin
      c = curve_t'($urandom);
      run($urandom_range(0, 1023) - 512, $urandom_range(0, 255), c);
    end
    // noise must actually vary
    c = '{max_sh: 1, slope_sh: 4, off_sh: 3, off_en: 0, neg: 0, noise: 3};
    seen_noise = 0;
    for (int k = 0; k < 20; k++) begin
      run(400, 0, c);
      if (dw != 200) seen_noise++;
    end
    checks++; if (seen_noise == 0) failures++;
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
