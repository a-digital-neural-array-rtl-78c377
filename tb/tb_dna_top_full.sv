// tb_dna_top_full -- full-size end-to-end smoke test of dna_top at its
// default parameters (225 tiles x 15 synapses, 225-line spike bus).
//
// What it does: drives only the chip pins (configuration SPI, spike-forcing
// serial port, CLK_SP) and reads only the pins (monitor stream, spike bus).
// Tile 20 gets four synapses from tiles 0..3. Tiles 0 and 1 are forced one
// timestep before tile 20 (causal pairs, must potentiate), tiles 2 and 3 one
// timestep after it (anti-causal pairs, must depress). A last phase turns
// integration on and checks that a forced volley on the now strong inputs
// makes tile 20 fire by threshold, and that the monitor frames are complete
// (225 words per timestep, 3375 with the weight stream on, which is
// switched on for the last training frame only).
//
// Timing: CLK_OP is the bench clock; one timestep is one CLK_SP period of
// 620 CLK_OP cycles, 4000 when the full weight frame is streamed. The run is
// kept short because the full array simulates slowly.
//
// The causal curve has an offset, so the late pre-before-post pairs of the
// anti-causal inputs (four timesteps) depress as well.
//
// Own choices: the stimulus, curve settings and thresholds belong to this
// bench; the document gives no numbers for them.
module tb_dna_top_full;
  import dna_pkg::*;
  localparam int N = 225, S = 15, POST = 20, REPS = 12;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic clk_sp = 0, spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, frc_sclk = 0, frc_sdi = 0;
  logic [N-1:0] fire_o;
  logic mon_valid, mon_last, mon_overrun, busy_o;
  mon_word_t mon_word;
  nev_t ev_o;

  dna_top dut (
    .clk_op(clk), .rst_n, .clk_sp, .spi_sclk, .spi_cs_n, .spi_mosi, .frc_sclk, .frc_sdi,
    .fire_o, .mon_valid, .mon_word, .mon_last, .mon_overrun, .busy_o, .ev_o);

  int c_fire = 0, c_forced = 0, c_pp = 0, c_pq = 0, c_ovr = 0, mon_words = 0, mon_frames = 0;
  logic signed [W_W-1:0] mw [N][S];
  always @(negedge clk) if (rst_n) begin
    if (mon_overrun) c_ovr++;
    if (ev_o.fire) c_fire++;
    if (ev_o.forced) c_forced++;
    if (ev_o.prepost) c_pp++;
    if (ev_o.postpre) c_pq++;
    if (mon_valid) begin
      mon_words++;
      mw[mon_word.neuron][mon_word.syn] = mon_word.w;
      if (mon_last) mon_frames++;
    end
  end

  task automatic spi_frame(logic [31:0] f);
    spi_cs_n = 0;
    repeat (2) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (2) @(negedge clk); spi_sclk = 1;
      repeat (2) @(negedge clk); spi_sclk = 0;
    end
    repeat (4) @(negedge clk);
    spi_cs_n = 1;
    repeat (4) @(negedge clk);
  endtask
  task automatic wr_param(int a, int d);
    spi_frame({2'd0, 8'd0, 6'(a), 16'(d)});
  endtask
  task automatic wr_map(int n, int s, logic li, int src);
    spi_frame({2'd1, 8'(n), 4'(s), 2'd0, 1'b1, li, 6'd0, 8'(src)});
  endtask
  task automatic wr_w(int n, int s, int w);
    spi_frame({2'd2, 8'(n), 4'(s), 2'd0, 16'(w)});
  endtask
  task automatic force_addr(int a);
    for (int b = 7; b >= 0; b--) begin
      frc_sdi = 1'(a >> b);
      repeat (2) @(negedge clk); frc_sclk = 1;
      repeat (2) @(negedge clk); frc_sclk = 0;
    end
  endtask
  int tlen = 620;
  task automatic timestep(logic [N-1:0] frc);
    for (int i = 0; i < N; i++) if (frc[i]) force_addr(i);
    repeat (6) @(negedge clk);
    clk_sp = 1;
    repeat (tlen) @(negedge clk);
    clk_sp = 0;
    repeat (20) @(negedge clk);
  endtask

  function automatic logic [15:0] mk(int mx, int sl, int off, int ne, int nz);
    curve_t c;
    c = '0; c.max_sh = 3'(mx); c.slope_sh = 3'(sl); c.neg = 1'(ne); c.noise = 2'(nz);
    c.off_en = (off >= 0); c.off_sh = 3'(off < 0 ? 0 : off);
    return 16'(c);
  endfunction

  initial begin
    logic [N-1:0] frc;
    int steps, free_fires;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    wr_param(PA_VTH, 400); wr_param(PA_VRESET, 0); wr_param(PA_LEAK, 8);
    wr_param(PA_ARP, 1); wr_param(PA_RRP, 0); wr_param(PA_DLY, 0); wr_param(PA_WIN, 100);
    wr_param(32'(PA_CURVE0) + 32'(C_EXC_PREPOST), 32'(mk(1, 0, 2, 0, 0)));
    wr_param(32'(PA_CURVE0) + 32'(C_EXC_POSTPRE), 32'(mk(1, 0, -1, 1, 0)));
    wr_param(PA_SWITCH, 32'(7'b0010011));  // refractory, leak, stdp
    for (int i = 0; i < 4; i++) begin
      wr_map(POST, i, 1'b0, i); wr_w(POST, i, 160);
    end
    steps = 0;
    for (int r = 0; r < REPS; r++) begin
      frc = '0; frc[0] = 1'b1; frc[1] = 1'b1; timestep(frc);
      frc = '0; frc[POST] = 1'b1;             timestep(frc);
      frc = '0; frc[2] = 1'b1; frc[3] = 1'b1; timestep(frc);
      repeat (2) timestep('0);
      steps += 5;
    end
    // one frame with the weight stream on
    wr_param(PA_SWITCH, 32'(7'b1010011));
    tlen = 4000;
    timestep('0);
    steps++;
    checks++;
    if (mon_words != (steps - 1) * N + N * S) begin
      failures++; $display("FAIL words %0d", mon_words);
    end
    $display("weights %0d %0d %0d %0d  prepost %0d postpre %0d", mw[POST][0], mw[POST][1],
             mw[POST][2], mw[POST][3], c_pp, c_pq);
    checks++;
    if (mw[POST][0] <= 300 || mw[POST][1] <= 300) begin failures++; $display("FAIL no potentiation"); end
    checks++;
    if (mw[POST][2] >= 60 || mw[POST][3] >= 60) begin failures++; $display("FAIL no depression"); end
    checks++;
    if (mon_frames != steps || c_ovr != 0) begin
      failures++; $display("FAIL monitor frames %0d of %0d overrun %0d", mon_frames, steps, c_ovr);
    end

    // integration on: a volley on inputs 0 and 1 must make tile 20 fire itself
    wr_param(PA_SWITCH, 32'(7'b0010111));
    tlen = 620;
    c_fire = 0; c_forced = 0;
    frc = '0; frc[0] = 1'b1; frc[1] = 1'b1; timestep(frc);
    repeat (2) timestep('0);
    free_fires = c_fire - c_forced;
    checks++;
    if (free_fires != 1) begin failures++; $display("FAIL threshold fires %0d", free_fires); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
