// Common parameter registers of the neural array.
//
// Holds the params_t record that every neuron tile reads: the switches
// (STDP, integration, leak, refractory periods, lateral inhibition, new
// connections, weight monitoring), the LIF levels (threshold, rest, reset,
// leak), the RRP weight threshold, the ARP/RRP lengths, the axonal delay,
// the STDP tracking window, the lateral-inhibition depth, the weight given
// to a new connection and the four STDP curves. A configuration write with
// target T_PARAM loads the register at `cfg.paddr` from the low data bits.
//
// The kinds of parameter follow the published list of initialization
// parameters; the register map and the reset values are this design's
// choices. Writes take effect at the next clock edge.
module param_regs
  import dna_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  output params_t prm
);
  function automatic params_t defaults();
    params_t p;
    p = '0;
    p.stdp_en = 1'b1; p.integ_en = 1'b1; p.leak_en = 1'b1; p.refr_en = 1'b1;
    p.li_en = 1'b1;   p.newconn_en = 1'b0; p.mon_w_en = 1'b0;
    p.v_th = 10'sd200; p.v_rest = 10'sd0; p.v_reset = -10'sd64;
    p.leak = 10'd2; p.rrp_wth = 10'd256; p.arp_len = 8'd2; p.rrp_len = 8'd4;
    p.axon_dly = '0; p.stdp_win = 8'd255; p.li_amt = 10'd128; p.new_w = 10'sd256;
    // potentiation for input-then-fire, depression for fire-then-input
    p.curve[C_EXC_PREPOST] = '{max_sh: 3'd1, slope_sh: 3'd4, off_sh: 3'd4, off_en: 1'b0, neg: 1'b0, noise: 2'd0};
    p.curve[C_EXC_POSTPRE] = '{max_sh: 3'd2, slope_sh: 3'd4, off_sh: 3'd4, off_en: 1'b0, neg: 1'b1, noise: 2'd0};
    p.curve[C_INH_PREPOST] = '{max_sh: 3'd1, slope_sh: 3'd4, off_sh: 3'd4, off_en: 1'b0, neg: 1'b1, noise: 2'd0};
    p.curve[C_INH_POSTPRE] = '{max_sh: 3'd2, slope_sh: 3'd4, off_sh: 3'd4, off_en: 1'b0, neg: 1'b0, noise: 2'd0};
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm <= defaults();
    end else if (cfg.we && cfg.tgt == T_PARAM) begin
      unique case (int'(cfg.paddr))
        PA_SWITCH: {prm.mon_w_en, prm.newconn_en, prm.li_en, prm.refr_en,
                    prm.integ_en, prm.leak_en, prm.stdp_en} <= cfg.data[6:0];
        PA_VTH:    prm.v_th     <= cfg.data[MP_W-1:0];
        PA_VREST:  prm.v_rest   <= cfg.data[MP_W-1:0];
        PA_VRESET: prm.v_reset  <= cfg.data[MP_W-1:0];
        PA_LEAK:   prm.leak     <= cfg.data[MP_W-1:0];
        PA_RRPWTH: prm.rrp_wth  <= cfg.data[W_W-1:0];
        PA_ARP:    prm.arp_len  <= cfg.data[T_W-1:0];
        PA_RRP:    prm.rrp_len  <= cfg.data[T_W-1:0];
        PA_DLY:    prm.axon_dly <= cfg.data[DLY_W-1:0];
        PA_WIN:    prm.stdp_win <= cfg.data[T_W-1:0];
        PA_LIAMT:  prm.li_amt   <= cfg.data[MP_W-1:0];
        PA_NEWW:   prm.new_w    <= cfg.data[W_W-1:0];
        PA_CURVE0, PA_CURVE0 + 1, PA_CURVE0 + 2, PA_CURVE0 + 3:
                   prm.curve[int'(cfg.paddr) - PA_CURVE0] <= cfg.data[12:0];
        default: ;
      endcase
    end
  end
endmodule
