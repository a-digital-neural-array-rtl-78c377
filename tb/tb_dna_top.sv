// End-to-end test of dna_top: network replication in miniature.
//
// A reference ("source") network lives in this testbench: 10 input neurons
// fire as independent Bernoulli trains (p = 1/20 per timestep) and drive 2
// LIF output neurons through bimodal weights (511 strong, 1 weak). The chip
// is configured over SPI with the same topology but every weight at the
// mid value 256, and every source spike is injected through the spike
// forcing interface into the matching chip neuron. After the training
// timesteps, the weights read back through the monitoring stream must have
// split: strong synapses well above weak ones. A 13th tile with one lateral-
// inhibition dendrite and new connections enabled exercises those paths.
// Finally the axonal delay is set to 2 and a forced spike must reach the
// spike outputs 3 timesteps later.
//
// Every mechanism (forced fire, threshold fire, integration, ARP and RRP
// drops, lateral inhibition, new connection, pre-post and post-pre updates,
// queue overflow, timer stop, weight monitoring) is counted and must occur.
module tb_dna_top;
  import dna_pkg::*;
  localparam int N = 13, S = 10, NPRE = 10, TSTEPS = 3000;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;                          // CLK_OP
  int checks = 0, failures = 0;

  logic clk_sp = 0, spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, frc_sclk = 0, frc_sdi = 0;
  logic [N-1:0] fire_o;
  logic mon_valid, mon_last, mon_overrun, busy_o;
  mon_word_t mon_word;
  nev_t ev_o;

  dna_top #(.N_NEURONS(N), .NUM_SYN(S), .QDEPTH(16)) dut (
    .clk_op(clk), .rst_n, .clk_sp, .spi_sclk, .spi_cs_n, .spi_mosi, .frc_sclk, .frc_sdi,
    .fire_o, .mon_valid, .mon_word, .mon_last, .mon_overrun, .busy_o, .ev_o);

  // ---- mechanism counters ----------------------------------------------
  int c_fire, c_forced, c_integ, c_arp, c_rrp, c_li, c_new, c_pp, c_pq, c_ovf, c_stop;
  int mon_words, mon_frames;
  logic signed [W_W-1:0] mw [N][S];
  initial begin
    c_fire = 0; c_forced = 0; c_integ = 0; c_arp = 0; c_rrp = 0; c_li = 0; c_new = 0;
    c_pp = 0; c_pq = 0; c_ovf = 0; c_stop = 0; mon_words = 0; mon_frames = 0;
  end
  int c_ovr = 0;
  always @(negedge clk) if (rst_n) begin
    if (mon_overrun) c_ovr++;
    if (ev_o.fire) c_fire++;
    if (ev_o.forced) c_forced++;
    if (ev_o.integ) c_integ++;
    if (ev_o.arp_drop) c_arp++;
    if (ev_o.rrp_drop) c_rrp++;
    if (ev_o.li) c_li++;
    if (ev_o.newconn) c_new++;
    if (ev_o.prepost) c_pp++;
    if (ev_o.postpre) c_pq++;
    if (ev_o.q_ovf) c_ovf++;
    if (ev_o.t_stop) c_stop++;
    if (mon_valid) begin
      mon_words++;
      mw[mon_word.neuron][mon_word.syn] = mon_word.w;
      if (mon_last) mon_frames++;
    end
  end

  // ---- pin-level drivers -------------------------------------------------
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
  // one CLK_SP period; the addresses in frc are sent before its rising edge
  task automatic timestep(logic [N-1:0] frc);
    for (int i = 0; i < N; i++) if (frc[i]) force_addr(i);
    repeat (6) @(negedge clk);
    clk_sp = 1;
    repeat (700) @(negedge clk);
    clk_sp = 0;
    repeat (20) @(negedge clk);
  endtask

  // ---- reference network -------------------------------------------------
  int wsrc [2][NPRE];
  int mps [2];
  logic [NPRE-1:0] pre_prev;

  function automatic curve_t mk(int mx, int sl, int off, int ne, int nz);
    curve_t c;
    c = '0; c.max_sh = 3'(mx); c.slope_sh = 3'(sl); c.neg = 1'(ne); c.noise = 2'(nz);
    c.off_en = (off >= 0); c.off_sh = 3'(off < 0 ? 0 : off);
    return c;
  endfunction

  initial begin
    logic [N-1:0] frc;
    logic [NPRE-1:0] pre;
    logic [1:0] post;
    int sum_s, n_s, sum_w, n_w, seen_delay;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    // common parameters
    wr_param(PA_VTH, 511); wr_param(PA_VREST, 0); wr_param(PA_VRESET, 0); wr_param(PA_LEAK, 8);
    wr_param(PA_RRPWTH, 300); wr_param(PA_ARP, 1); wr_param(PA_RRP, 2); wr_param(PA_DLY, 0);
    wr_param(PA_WIN, 100); wr_param(PA_LIAMT, 100); wr_param(PA_NEWW, 128);
    // causal pairs: +37.5 % at dt 0, falling below the offset after dt 2;
    // anti-causal pairs: a short depression dip (cf. a Hebbian STDP curve
    // with a negative tail)
    wr_param(PA_CURVE0 + C_EXC_PREPOST, mk(1, 0, 2, 0, 0));
    wr_param(PA_CURVE0 + C_EXC_POSTPRE, mk(2, 1, -1, 1, 1));
    wr_param(PA_CURVE0 + C_INH_PREPOST, mk(1, 0, 2, 1, 0));
    wr_param(PA_CURVE0 + C_INH_POSTPRE, mk(2, 1, -1, 0, 1));
    // switches: mon_w, newconn, li, refr, integ, leak, stdp. Training runs
    // with integration and new connections off: the outputs fire only when
    // forced.
    wr_param(PA_SWITCH, 7'b1010011);
    // source weights: post 0 strong on even inputs, post 1 strong on inputs 0..4
    for (int i = 0; i < NPRE; i++) begin
      wsrc[0][i] = (i % 2 == 0) ? 511 : 1;
      wsrc[1][i] = (i < 5) ? 511 : 1;
    end
    // destination: posts are chip neurons 10 and 11, all weights mid-range
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < NPRE; i++) begin
        wr_map(NPRE + j, i, 1'b0, i); wr_w(NPRE + j, i, 256);
      end
    // tile 12: lateral-inhibition dendrite on line 1, grows the rest itself
    wr_map(12, 0, 1'b1, 1);
    // the first monitor frame must show the configured mid-range weights
    timestep('0);
    checks++;
    if (mw[10][3] != 256 || mw[11][9] != 256 || mon_frames != 1) begin
      failures++; $display("FAIL initial readback %0d %0d frames %0d", mw[10][3], mw[11][9], mon_frames);
    end

    mps[0] = 0; mps[1] = 0; pre_prev = '0;
    for (int t = 0; t < TSTEPS; t++) begin
      // source network step: outputs integrate the inputs of the previous step
      for (int i = 0; i < NPRE; i++) pre[i] = ($urandom_range(0, 19) == 0);
      for (int j = 0; j < 2; j++) begin
        for (int i = 0; i < NPRE; i++) if (pre_prev[i]) mps[j] += wsrc[j][i];
        mps[j] = (mps[j] > 8) ? mps[j] - 8 : 0;
        post[j] = (mps[j] >= 400);
        if (post[j]) mps[j] = 0;
      end
      pre_prev = pre;
      frc = '0;
      frc[NPRE-1:0] = pre;
      frc[NPRE +: 2] = post;
      timestep(frc);
    end

    // learned weights, as streamed by the monitor
    sum_s = 0; n_s = 0; sum_w = 0; n_w = 0;
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < NPRE; i++)
        if (wsrc[j][i] == 511) begin sum_s += mw[NPRE + j][i]; n_s++; end
        else begin sum_w += mw[NPRE + j][i]; n_w++; end
    $display("mean strong %0d  mean weak %0d", sum_s / n_s, sum_w / n_w);
    for (int j = 0; j < 2; j++) begin
      $write("post %0d:", j);
      for (int i = 0; i < NPRE; i++) $write(" %0d", mw[NPRE + j][i]);
      $write("\n");
    end
    checks++;
    if (sum_s / n_s < 350 || sum_w / n_w > 150) begin failures++; $display("FAIL weights did not split"); end
    checks++;
    if (mon_frames != TSTEPS + 1 || mon_words != (TSTEPS + 1) * N * S || c_ovr != 0) begin
      failures++; $display("FAIL monitor frames %0d words %0d", mon_frames, mon_words);
    end

    // mechanism phase: integration on, same random inputs, no forcing of outputs
    wr_param(PA_SWITCH, 7'b1111111);
    for (int t = 0; t < 200; t++) begin
      frc = '0;
      for (int i = 0; i < NPRE; i++) frc[i] = ($urandom_range(0, 9) == 0);
      timestep(frc);
    end

    // axonal delay: forced spike of neuron 5 reaches fire_o 3 timesteps later
    wr_param(PA_SWITCH, 7'b1010011);
    wr_param(PA_DLY, 2);
    repeat (4) timestep('0);
    seen_delay = -1;
    for (int t = 0; t < 6; t++) begin
      frc = '0; if (t == 0) frc[5] = 1'b1;
      timestep(frc);
      if (fire_o[5] && seen_delay < 0) seen_delay = t;
    end
    checks++;
    if (seen_delay != 3) begin failures++; $display("FAIL delay seen at %0d", seen_delay); end

    $display("fire %0d forced %0d integ %0d arp %0d rrp %0d li %0d new %0d prepost %0d postpre %0d ovf %0d stop %0d",
             c_fire, c_forced, c_integ, c_arp, c_rrp, c_li, c_new, c_pp, c_pq, c_ovf, c_stop);
    checks++; if (c_fire == c_forced) begin failures++; $display("FAIL no threshold fire"); end
    checks++; if (c_forced == 0) failures++;
    checks++; if (c_integ == 0) failures++;
    checks++; if (c_arp == 0) begin failures++; $display("FAIL no ARP drop"); end
    checks++; if (c_rrp == 0) begin failures++; $display("FAIL no RRP drop"); end
    checks++; if (c_li == 0) begin failures++; $display("FAIL no lateral inhibition"); end
    checks++; if (c_new == 0) begin failures++; $display("FAIL no new connection"); end
    checks++; if (c_pp == 0 || c_pq == 0) begin failures++; $display("FAIL no STDP update"); end
    checks++; if (c_ovf == 0) begin failures++; $display("FAIL no queue overflow"); end
    checks++; if (c_stop == 0) begin failures++; $display("FAIL no timer stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
