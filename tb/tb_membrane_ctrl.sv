// Self-checking test of membrane_ctrl against an integer model of the LIF
// rules: leak toward rest, saturating integration, ARP (inputs ignored, no
// fire), RRP (only |w| > rrp_wth integrates), lateral inhibition, forced
// and threshold fire with reset. Directed cases first, then random
// timesteps; each rule must be exercised at least once.
module tb_membrane_ctrl;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  params_t prm;
  logic op_tick = 0, op_leak = 0, op_integ = 0, op_li = 0, op_fire = 0, force_fire = 0;
  logic signed [W_W-1:0] w;
  logic fire_now, in_arp, in_rrp;
  logic signed [MP_W-1:0] mp;
  int n_arp = 0, n_rrp = 0, n_fire = 0, n_forced = 0, n_li = 0;

  membrane_ctrl dut (.clk, .rst_n, .prm, .op_tick, .op_leak, .op_integ, .w, .op_li, .op_fire,
                     .force_fire, .fire_now, .mp, .in_arp, .in_rrp);

  int m_mp, m_arp, m_rrp, m_arp_now, m_rrp_now;

  function automatic int sat(int v);
    return v > 511 ? 511 : (v < -512 ? -512 : v);
  endfunction

  task automatic cyc(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic check(string what);
    checks++;
    if (int'(mp) != m_mp || in_arp != 1'(m_arp_now) || in_rrp != 1'(m_rrp_now)) begin
      failures++;
      $display("FAIL %s mp=%0d exp=%0d arp=%0d/%0d rrp=%0d/%0d", what, mp, m_mp, in_arp, m_arp_now, in_rrp, m_rrp_now);
    end
  endtask

  // one timestep: tick, leak, n inputs, maybe LI, fire check
  task automatic timestep(int nin, logic do_li, logic frc);
    int wv, mag, gap;
    logic exp_fire;
    cyc(op_tick);
    m_arp_now = (m_arp != 0); m_rrp_now = (m_arp == 0) && (m_rrp != 0);
    if (m_arp != 0) m_arp--; else if (m_rrp != 0) m_rrp--;
    check("tick");
    cyc(op_leak);
    if (prm.leak_en) begin end
    gap = m_mp - int'(prm.v_rest);
    if (gap > int'(prm.leak)) m_mp -= int'(prm.leak);
    else if (gap < -int'(prm.leak)) m_mp += int'(prm.leak);
    else m_mp = int'(prm.v_rest);
    check("leak");
    for (int i = 0; i < nin; i++) begin
      wv = $urandom_range(0, 1023) - 512;
      w = 10'(wv);
      mag = wv < 0 ? -wv : wv;
      cyc(op_integ);
      if (m_arp_now) n_arp++;
      else if (m_rrp_now && mag <= int'(prm.rrp_wth)) n_rrp++;
      else m_mp = sat(m_mp + wv);
      check("integ");
    end
    if (do_li) begin
      cyc(op_li); n_li++;
      m_mp = sat(m_mp - int'(prm.li_amt));
      check("li");
    end
    @(negedge clk) begin op_fire = 1; force_fire = frc; end
    #1;
    exp_fire = frc || (m_mp >= int'(prm.v_th) && !m_arp_now);
    checks++; if (fire_now != exp_fire) begin failures++; $display("FAIL fire"); end
    @(negedge clk) begin op_fire = 0; force_fire = 0; end
    if (exp_fire) begin
      m_mp = int'(prm.v_reset); m_arp = prm.arp_len; m_rrp = prm.rrp_len;
      n_fire++; if (frc && !(m_mp >= int'(prm.v_th))) n_forced++;
    end
    check("fire");
  endtask

  initial begin
    prm = '0;
    prm.integ_en = 1; prm.refr_en = 1; prm.leak_en = 1; prm.li_en = 1;
    prm.v_th = 10'sd150; prm.v_rest = 10'sd0; prm.v_reset = -10'sd40; prm.leak = 10'd3;
    prm.rrp_wth = 10'd200; prm.arp_len = 8'd2; prm.rrp_len = 8'd3; prm.li_amt = 10'd100;
    w = 0;
    m_mp = 0; m_arp = 0; m_rrp = 0; m_arp_now = 0; m_rrp_now = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // directed: integrate 200 -> fire, MP reset
    w = 10'sd200; cyc(op_integ); m_mp = 200; check("d-integ");
    @(negedge clk) op_fire = 1; #1;
    checks++; if (!fire_now) failures++;
    @(negedge clk) op_fire = 0;
    m_mp = -40; m_arp = 2; m_rrp = 3; n_fire++;
    check("d-reset");
    for (int k = 0; k < 400; k++)
      timestep($urandom_range(0, 4), ($urandom_range(0, 5) == 0), ($urandom_range(0, 9) == 0));
    checks++;
    if (n_arp == 0 || n_rrp == 0 || n_fire == 0 || n_li == 0) begin
      failures++; $display("coverage arp=%0d rrp=%0d fire=%0d li=%0d", n_arp, n_rrp, n_fire, n_li);
    end
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
