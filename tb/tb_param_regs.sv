// Self-checking test of param_regs: reset defaults, every register address
// written through the configuration bus lands in its params_t field, and
// writes to other targets are ignored.
module tb_param_regs;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_wr_t cfg;
  params_t prm;

  param_regs dut (.clk, .rst_n, .cfg, .prm);

  task automatic wr(cfg_tgt_e t, int a, logic [15:0] d);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tgt = t; cfg.paddr = 6'(a); cfg.data = d;
    @(negedge clk) cfg = '0;
  endtask
  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(prm.v_th == 10'sd200 && prm.stdp_en && !prm.newconn_en && prm.stdp_win == 8'd255, "defaults");
    wr(T_PARAM, PA_SWITCH, 16'h0055);
    chk({prm.mon_w_en, prm.newconn_en, prm.li_en, prm.refr_en, prm.integ_en, prm.leak_en, prm.stdp_en} == 7'h55, "switch");
    wr(T_PARAM, PA_VTH, 16'h03F0);   chk(prm.v_th == -10'sd16, "vth");
    wr(T_PARAM, PA_VREST, 16'h0005); chk(prm.v_rest == 10'sd5, "vrest");
    wr(T_PARAM, PA_VRESET, 16'h0300); chk(prm.v_reset == -10'sd256, "vreset");
    wr(T_PARAM, PA_LEAK, 16'h0007);  chk(prm.leak == 10'd7, "leak");
    wr(T_PARAM, PA_RRPWTH, 16'h0123); chk(prm.rrp_wth == 10'h123, "rrpwth");
    wr(T_PARAM, PA_ARP, 16'h0009);   chk(prm.arp_len == 8'd9, "arp");
    wr(T_PARAM, PA_RRP, 16'h000B);   chk(prm.rrp_len == 8'd11, "rrp");
    wr(T_PARAM, PA_DLY, 16'h000D);   chk(prm.axon_dly == 4'd13, "dly");
    wr(T_PARAM, PA_WIN, 16'h0080);   chk(prm.stdp_win == 8'd128, "win");
    wr(T_PARAM, PA_LIAMT, 16'h0041); chk(prm.li_amt == 10'd65, "liamt");
    wr(T_PARAM, PA_NEWW, 16'h0064);  chk(prm.new_w == 10'sd100, "neww");
    for (int c = 0; c < 4; c++) begin
      wr(T_PARAM, PA_CURVE0 + c, 16'(13'h1000 + c * 13'h111));
      chk(prm.curve[c] == curve_t'(13'h1000 + c * 13'h111), "curve");
    end
    wr(T_WEIGHT, PA_VTH, 16'h0001);  chk(prm.v_th == -10'sd16, "other target ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
