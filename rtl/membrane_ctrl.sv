// Membrane potential control: the digital leaky integrate-and-fire core of a
// neuron tile, with refractory periods and lateral inhibition.
//
// The signed 10-bit membrane potential (MP) is changed by one operation per
// cycle, issued by the neuron's controller in the order of a timestep:
//   op_tick  : start of timestep; advance the refractory counters
//   op_leak  : move MP toward the resting potential by `leak`, no overshoot
//   op_integ : add weight `w` (saturating). Ignored in the absolute
//              refractory period (ARP); in the relative refractory period
//              (RRP) only weights with |w| > rrp_wth are added
//   op_li    : lateral inhibition, MP lowered by li_amt (saturating)
//   op_fire  : fire if forced, or if MP >= v_th outside the ARP; on a fire
//              MP is set to v_reset and ARP, then RRP, start
// `fire_now` is combinational in the op_fire cycle. After a fire the next
// arp_len timesteps are ARP and the rrp_len after those are RRP.
//
// Leak, integrate, threshold fire and reset, ARP/RRP with a weight threshold
// and suppression at pre-selected dendrites follow the published neuron;
// linear leak toward rest and subtractive inhibition are this design's
// choices.
module membrane_ctrl
  import dna_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  params_t                prm,
  input  logic                   op_tick,
  input  logic                   op_leak,
  input  logic                   op_integ,
  input  logic signed [W_W-1:0]  w,
  input  logic                   op_li,
  input  logic                   op_fire,
  input  logic                   force_fire,
  output logic                   fire_now,
  output logic signed [MP_W-1:0] mp,
  output logic                   in_arp,
  output logic                   in_rrp
);
  logic [T_W-1:0] arp_cnt, rrp_cnt;
  logic [W_W-1:0] w_mag;
  logic           integ_ok;

  assign w_mag    = w[W_W-1] ? W_W'(-w) : W_W'(w);
  assign integ_ok = prm.integ_en &&
                    !(prm.refr_en && in_arp) &&
                    !(prm.refr_en && in_rrp && (w_mag <= prm.rrp_wth));
  // leak toward rest without overshoot
  logic signed [MP_W+1:0] gap, lk;
  logic signed [MP_W-1:0] mp_leak;
  always_comb begin
    gap = (MP_W+2)'(mp) - (MP_W+2)'(prm.v_rest);
    lk  = $signed({2'b00, prm.leak});
    if (gap > lk)       mp_leak = MP_W'((MP_W+2)'(mp) - lk);
    else if (gap < -lk) mp_leak = MP_W'((MP_W+2)'(mp) + lk);
    else                mp_leak = prm.v_rest;
  end

  assign fire_now = op_fire && (force_fire ||
                    ((mp >= prm.v_th) && !(prm.refr_en && in_arp)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mp <= '0; arp_cnt <= '0; rrp_cnt <= '0; in_arp <= 1'b0; in_rrp <= 1'b0;
    end else begin
      if (op_tick) begin
        in_arp <= (arp_cnt != '0);
        in_rrp <= (arp_cnt == '0) && (rrp_cnt != '0);
        if (arp_cnt != '0)      arp_cnt <= arp_cnt - 1'b1;
        else if (rrp_cnt != '0) rrp_cnt <= rrp_cnt - 1'b1;
      end
      if (op_leak) mp <= mp_leak;
      if (op_integ && integ_ok)
        mp <= sat_mp((MP_W+2)'(mp) + (MP_W+2)'(w));
      if (op_li)
        mp <= sat_mp((MP_W+2)'(mp) - $signed({2'b00, prm.li_amt}));
      if (fire_now) begin
        mp      <= prm.v_reset;
        arp_cnt <= prm.arp_len;
        rrp_cnt <= prm.rrp_len;
      end
    end
  end
endmodule
