// Self-checking test of neuron_module on a directed spike sequence worked
// out by hand from the neuron rules and the delta-w curve formula:
// integration of excitatory and inhibitory inputs, threshold fire, spike
// on the bus one timestep later, pre-to-post updates of the queued inputs
// after a fire, ARP drop, post-to-pre update, lateral inhibition, a new
// connection, and a forced fire. Also checks the busy length of an empty
// timestep (N_IN + 4 cycles).
module tb_neuron_module;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NIN = 8, NS = 4;

  logic tick = 0, force_in = 0, spike_out, fired, busy;
  params_t prm;
  logic [NIN-1:0] spikes_in = '0;
  cfg_wr_t cfg = '0;
  logic signed [MP_W-1:0] mp;
  logic signed [W_W-1:0]  w_all [NS];
  nev_t ev;
  int n_prepost = 0, n_postpre = 0, n_newconn = 0, n_li = 0, n_arp = 0, n_forced = 0;

  neuron_module #(.ID(0), .N_IN(NIN), .NUM_SYN(NS), .QDEPTH(4)) dut (
    .clk, .rst_n, .tick, .prm, .spikes_in, .force_in, .cfg, .spike_out, .fired, .mp, .w_all,
    .busy, .ev);

  always @(negedge clk) begin
    if (ev.prepost) n_prepost++;
    if (ev.postpre) n_postpre++;
    if (ev.newconn) n_newconn++;
    if (ev.li) n_li++;
    if (ev.arp_drop) n_arp++;
    if (ev.forced) n_forced++;
  end

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
  // weight after one update with curve c (no offset, no noise)
  function automatic int upd(int w, int dt, curve_t c);
    int mag, mx, y, r;
    mag = w < 0 ? -w : w;
    mx = mag >> c.max_sh;
    y = pwl(dt, mx, mx >> c.slope_sh, c.slope_sh);
    r = w + (c.neg ? -y : y);
    if (w >= 0) r = r > 511 ? 511 : (r < 1 ? 1 : r);
    else        r = r > -1 ? -1 : (r < -512 ? -512 : r);
    return r;
  endfunction

  task automatic cfgw(cfg_tgt_e t, int slot, logic [15:0] d);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tgt = t; cfg.neuron = 8'd0; cfg.slot = 4'(slot); cfg.data = d;
    @(negedge clk) cfg = '0;
  endtask

  // run one timestep with the given input lines; returns busy length
  task automatic ts(logic [NIN-1:0] sp, logic frc, output int blen);
    @(negedge clk) begin spikes_in = sp; force_in = frc; tick = 1; end
    @(negedge clk) begin tick = 0; force_in = 0; end
    blen = 0;
    while (busy) begin @(negedge clk); blen++; end
    repeat (2) @(negedge clk);
  endtask

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s: mp=%0d w=%0d %0d %0d %0d", what, mp, w_all[0], w_all[1], w_all[2], w_all[3]); end
  endtask

  initial begin
    int bl, w0, w1, w3, m;
    prm = '0;
    prm.stdp_en = 1; prm.integ_en = 1; prm.refr_en = 1; prm.li_en = 1; prm.newconn_en = 1;
    prm.v_th = 10'sd150; prm.v_rest = 0; prm.v_reset = 0; prm.leak = 0;
    prm.arp_len = 8'd1; prm.rrp_len = 8'd0; prm.stdp_win = 8'd255; prm.li_amt = 10'd60;
    prm.new_w = 10'sd200; prm.axon_dly = 0;
    prm.curve[C_EXC_PREPOST] = '{max_sh: 1, slope_sh: 4, off_sh: 0, off_en: 0, neg: 0, noise: 0};
    prm.curve[C_EXC_POSTPRE] = '{max_sh: 2, slope_sh: 4, off_sh: 0, off_en: 0, neg: 1, noise: 0};
    prm.curve[C_INH_PREPOST] = '{max_sh: 1, slope_sh: 4, off_sh: 0, off_en: 0, neg: 1, noise: 0};
    prm.curve[C_INH_POSTPRE] = '{max_sh: 2, slope_sh: 4, off_sh: 0, off_en: 0, neg: 0, noise: 0};
    repeat (3) @(negedge clk); rst_n = 1;
    cfgw(T_SYNMAP, 0, 16'h8001); cfgw(T_WEIGHT, 0, 16'd100);
    cfgw(T_SYNMAP, 1, 16'h8002); cfgw(T_WEIGHT, 1, 16'h03CE);   // -50
    cfgw(T_SYNMAP, 2, 16'hC003);                                 // lateral inhibition on line 3
    chk(w_all[0] == 100 && w_all[1] == -50, "config");

    ts('0, 0, bl);           chk(bl == NIN + 4, "empty timestep length");
    ts(8'b0000_0010, 0, bl); chk(mp == 100, "TS1 integrate +100");
    ts(8'b0000_0100, 0, bl); chk(mp == 50,  "TS2 integrate -50");
    ts(8'b0000_0010, 0, bl); chk(mp == 0 && fired, "TS3 fire and reset");
    // TS4: queue (s0,t0) (s1,t1) (s0,t2), fire at t2 -> dt 2, 1, 0; then ARP drop and post-pre dt 1
    w0 = upd(100, 2, prm.curve[C_EXC_PREPOST]);
    w1 = upd(-50, 1, prm.curve[C_INH_PREPOST]);
    w0 = upd(w0, 0, prm.curve[C_EXC_PREPOST]);
    w0 = upd(w0, 1, prm.curve[C_EXC_POSTPRE]);
    chk(!spike_out, "no spike on the bus before the next timestep");
    ts(8'b0000_0010, 0, bl);
    chk(spike_out, "spike on the bus in the timestep after the fire");
    chk(w_all[0] == w0 && w_all[1] == w1, "TS4 pre-post and post-pre updates");
    chk(mp == 0 && n_arp == 1, "TS4 input ignored in ARP");
    // TS5: line 1 integrates, line 3 inhibits; post-pre dt 2
    m = w0 - 60;
    w0 = upd(w0, 2, prm.curve[C_EXC_POSTPRE]);
    ts(8'b0000_1010, 0, bl);
    chk(mp == m && n_li == 1 && w_all[0] == w0, "TS5 integrate then lateral inhibition");
    chk(!spike_out, "spike lasts one timestep");
    // TS6: new connection on line 5 -> slot 3 with new_w
    ts(8'b0010_0000, 0, bl);
    chk(n_newconn == 1 && w_all[3] == 200 && mp == m, "TS6 new connection");
    // TS7: line 5 now integrates 200 -> fire; post-pre dt 4 on slot 3
    w3 = upd(200, 4, prm.curve[C_EXC_POSTPRE]);
    ts(8'b0010_0000, 0, bl);
    chk(w_all[3] == w3 && fired && mp == 0, "TS7 fire via new synapse");
    // TS8: forced fire; pre-post from TS7 fire (t_fire 4): s0 dt 3, s0 dt 2, s3 dt 0
    w0 = upd(w0, 3, prm.curve[C_EXC_PREPOST]);
    w0 = upd(w0, 2, prm.curve[C_EXC_PREPOST]);
    w3 = upd(w3, 0, prm.curve[C_EXC_PREPOST]);
    ts('0, 1, bl);
    chk(w_all[0] == w0 && w_all[3] == w3, "TS8 pre-post updates");
    chk(fired && n_forced == 1, "TS8 forced fire");
    chk(n_prepost == 6 && n_postpre == 3, "update counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
