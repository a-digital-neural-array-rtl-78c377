// Unit neuron module: one tile of the neural array.
//
// A tile holds everything it needs: membrane potential control (LIF with
// refractory periods and lateral inhibition), a weight array, a dynamic
// synapse map, an in-spike queue, the STDP timer, a delta-t calculator, one
// shared delta-w calculator and the spike generator with axonal delay.
//
// Work is time-shared inside each spike timestep. A `tick` (new CLK_SP
// period) starts the fixed sequence of the published operation flow:
//   1. LEAK     membrane leak toward rest
//   2. PREPOST  if the neuron fired in the previous timestep, drain the
//               in-spike queue; each (slot, stamp) gives dt = t_fire-stamp
//               and a weight update through the delta-w calculator
//   3. INTEG    scan the N_IN lines of the spike bus, one per cycle. A line
//               with a spike that the synapse map owns is integrated (or
//               flags lateral inhibition), is stamped into the queue, and,
//               if the timer counts from the last fire, updates its weight
//               with dt = timer. A spiking line with no slot gets a free
//               slot with weight new_w when new connections are enabled.
//   4. LI       lateral inhibition if an inhibition dendrite received a spike
//   5. FIRE     threshold check or forced spike; fire resets MP and timer
// then the tile idles (its operation clock would be gated) until the next
// tick. Each delta-w update costs T_W+3 cycles; the scan costs N_IN cycles.
//
// Interface: `spikes_in` must stay stable during the timestep (the spike
// generators only change at a tick). `force_in` is sampled at the tick.
// Configuration writes (`cfg`) addressed to ID load synapse-map slots and
// weights. Pairing order selects the STDP curve: excitatory (w > 0) or
// inhibitory (w < 0) synapse, pre-then-post or post-then-pre.
//
// The sequence, the single timer, the queue and the shared delta-w unit
// follow the published design. Scanning the whole spike bus as the tile's
// input lines and the order of sub-steps inside each published step are
// this design's choices.
//
// The only synchronous use of rst_n is the `disable iff` of the tick
// assertion at the end; lint reports it as a net used both ways.
module neuron_module
  import dna_pkg::*;
#(
  parameter int          ID      = 0,
  parameter int          N_IN    = 225,
  parameter int          NUM_SYN = 15,
  parameter int          QDEPTH  = 16,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  params_t                prm,
  input  logic [N_IN-1:0]        spikes_in,
  input  logic                   force_in,
  input  cfg_wr_t                cfg,
  output logic                   spike_out,
  output logic                   fired,
  output logic signed [MP_W-1:0] mp,
  output logic signed [W_W-1:0]  w_all [NUM_SYN],
  output logic                   busy,
  output nev_t                   ev
);
  localparam int SLOT_W = $clog2(NUM_SYN + 1);
  localparam int SRC_W  = 8;
  localparam int LW     = $clog2(N_IN + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_LEAK, S_PREPOST, S_PP_WAIT, S_INTEG, S_IN_WAIT, S_LI, S_FIRE
  } state_e;
  state_e st;

  logic [LW-1:0]     line;
  logic              force_q, li_hit, fired_prev;
  logic [T_W-1:0]    t_fire;
  logic [SLOT_W-1:0] cur_slot;
  logic signed [W_W-1:0] cur_w;

  // ---- sub-blocks -------------------------------------------------------
  logic              cfg_me;
  assign cfg_me = cfg.we && (cfg.neuron == 8'(ID));

  // synapse map
  logic              map_we, map_wvalid, map_wli;
  logic [SLOT_W-1:0] map_waddr;
  logic [SRC_W-1:0]  map_wsrc;
  logic              hit, hit_li, free_ok;
  logic [SLOT_W-1:0] hit_slot, free_slot;
  logic [NUM_SYN-1:0] slot_valid;

  synapse_map #(.NUM_SYN(NUM_SYN), .SLOT_W(SLOT_W), .SRC_W(SRC_W)) u_map (
    .clk, .rst_n, .we(map_we), .waddr(map_waddr), .wvalid(map_wvalid), .wli(map_wli),
    .wsrc(map_wsrc), .line(SRC_W'(line)), .hit, .hit_slot, .hit_li, .free_ok, .free_slot,
    .valid_all(slot_valid)
  );

  // weight array
  logic              wa_we;
  logic [SLOT_W-1:0] wa_waddr, wa_raddr;
  logic signed [W_W-1:0] wa_wdata, wa_rdata;

  weight_array #(.NUM_SYN(NUM_SYN), .SLOT_W(SLOT_W)) u_w (
    .clk, .rst_n, .we(wa_we), .waddr(wa_waddr), .wdata(wa_wdata),
    .raddr(wa_raddr), .rdata(wa_rdata), .w_all
  );

  // STDP timer
  logic [T_W-1:0] t_now;
  logic           t_run, post_ref, t_stop, tm_fire, tm_in;
  stdp_timer u_tmr (
    .clk, .rst_n, .tick, .fire(tm_fire), .in_spike(tm_in), .win(prm.stdp_win),
    .t(t_now), .running(t_run), .post_ref, .stop_evt(t_stop)
  );

  // in-spike queue
  logic              q_push, q_pop, q_empty, q_full, q_ovf;
  logic [SLOT_W-1:0] q_slot;
  logic [T_W-1:0]    q_stamp;
  in_spike_queue #(.DEPTH(QDEPTH), .SLOT_W(SLOT_W), .T_W(T_W)) u_q (
    .clk, .rst_n, .flush(t_stop), .push(q_push), .push_slot(hit_slot),
    .push_stamp(t_run ? t_now : '0), .pop(q_pop), .q_slot, .q_stamp,
    .empty(q_empty), .full(q_full), .overflow(q_ovf)
  );

  // delta-t
  logic [T_W-1:0] dt_pp, dt_pq;   // post-to-pre, pre-to-post
  logic           pp_ok, pq_ok;
  dt_calculator u_dt (
    .post_ref, .t_now, .t_fire, .stamp(q_stamp),
    .dt_postpre(dt_pp), .postpre_ok(pp_ok), .dt_prepost(dt_pq), .prepost_ok(pq_ok)
  );

  // delta-w
  logic                   dw_start, dw_done, dw_busy;
  logic signed [W_W-1:0]  dw_w;
  logic [T_W-1:0]         dw_dt;
  curve_sel_e             dw_sel;
  logic signed [DW_W-1:0] dw;
  dw_calculator #(.SEED(SEED)) u_dw (
    .clk, .rst_n, .start(dw_start), .w(dw_w), .dt(dw_dt), .curve(prm.curve[dw_sel]),
    .busy(dw_busy), .done(dw_done), .dw
  );

  // membrane potential
  logic op_leak, op_integ, op_li, op_fire, fire_now, in_arp, in_rrp;
  membrane_ctrl u_mp (
    .clk, .rst_n, .prm, .op_tick(tick), .op_leak, .op_integ, .w(wa_rdata), .op_li,
    .op_fire, .force_fire(force_q), .fire_now, .mp, .in_arp, .in_rrp
  );

  // spike generator
  spike_generator #(.DLY_W(DLY_W)) u_sg (
    .clk, .rst_n, .tick, .fire(fire_now), .dly(prm.axon_dly), .spike_out, .fired
  );

  // ---- control ----------------------------------------------------------
  logic line_spk, pq_use, last_line, new_conn;
  assign line_spk  = spikes_in[line[LW-1:0]];
  assign last_line = (int'(line) == N_IN - 1);
  assign pq_use    = prm.stdp_en && pq_ok && slot_valid[q_slot];
  assign new_conn  = (st == S_INTEG) && line_spk && !hit && prm.newconn_en && free_ok &&
                     (int'(line) != ID);

  always_comb begin
    op_leak  = (st == S_LEAK) && prm.leak_en;
    op_integ = (st == S_INTEG) && line_spk && hit && !hit_li;
    op_li    = (st == S_LI) && li_hit && prm.li_en;
    op_fire  = (st == S_FIRE);
    tm_fire  = fire_now;
    tm_in    = op_integ;
    q_push   = op_integ && prm.stdp_en;
    q_pop    = (st == S_PREPOST) && fired_prev && !q_empty;

    dw_start = 1'b0; dw_w = wa_rdata; dw_dt = dt_pq; dw_sel = C_EXC_PREPOST;
    wa_raddr = hit_slot;
    if (st == S_PREPOST) begin
      wa_raddr = q_slot;
      dw_start = q_pop && pq_use;
      dw_sel   = wa_rdata[W_W-1] ? C_INH_PREPOST : C_EXC_PREPOST;
    end else if (st == S_INTEG) begin
      dw_start = op_integ && prm.stdp_en && pp_ok && t_run;
      dw_dt    = dt_pp;
      dw_sel   = wa_rdata[W_W-1] ? C_INH_POSTPRE : C_EXC_POSTPRE;
    end

    // write ports: configuration first, then the controller
    map_we = 1'b0; map_waddr = free_slot; map_wvalid = 1'b1; map_wli = 1'b0;
    map_wsrc = SRC_W'(line);
    wa_we = 1'b0; wa_waddr = cur_slot; wa_wdata = upd_w(cur_w, dw);
    if (cfg_me && cfg.tgt == T_SYNMAP) begin
      map_we = 1'b1; map_waddr = SLOT_W'(cfg.slot); map_wvalid = cfg.data[15];
      map_wli = cfg.data[14]; map_wsrc = cfg.data[7:0];
    end else if (new_conn) begin
      map_we = 1'b1;
    end
    if (cfg_me && cfg.tgt == T_WEIGHT) begin
      wa_we = 1'b1; wa_waddr = SLOT_W'(cfg.slot); wa_wdata = cfg.data[W_W-1:0];
    end else if (new_conn) begin
      wa_we = 1'b1; wa_waddr = free_slot; wa_wdata = prm.new_w;
    end else if ((st == S_PP_WAIT || st == S_IN_WAIT) && dw_done) begin
      wa_we = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; line <= '0; force_q <= 1'b0; li_hit <= 1'b0; fired_prev <= 1'b0;
      t_fire <= '0; cur_slot <= '0; cur_w <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (tick) begin
          force_q <= force_in; li_hit <= 1'b0; line <= '0; st <= S_LEAK;
        end
        S_LEAK: st <= S_PREPOST;
        S_PREPOST: begin
          if (!fired_prev || q_empty) begin
            fired_prev <= 1'b0; st <= S_INTEG;
          end else if (dw_start) begin
            cur_slot <= q_slot; cur_w <= wa_rdata; st <= S_PP_WAIT;
          end
        end
        S_PP_WAIT: if (dw_done) st <= S_PREPOST;
        S_INTEG: begin
          if (line_spk && hit && hit_li && prm.li_en) li_hit <= 1'b1;
          if (dw_start) begin
            cur_slot <= hit_slot; cur_w <= wa_rdata; st <= S_IN_WAIT;
          end else begin
            line <= line + 1'b1;
            if (last_line) st <= S_LI;
          end
        end
        S_IN_WAIT: if (dw_done) begin
          line <= line + 1'b1;
          st   <= last_line ? S_LI : S_INTEG;
        end
        S_LI: st <= S_FIRE;
        S_FIRE: begin
          if (fire_now) begin
            t_fire <= t_now; fired_prev <= 1'b1;
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  always_comb begin
    ev          = '0;
    ev.fire     = fire_now;
    ev.forced   = fire_now && force_q;
    ev.integ    = op_integ && u_mp.integ_ok;
    ev.arp_drop = op_integ && prm.refr_en && in_arp;
    ev.rrp_drop = op_integ && prm.refr_en && !in_arp && in_rrp && !u_mp.integ_ok;
    ev.li       = op_li;
    ev.newconn  = new_conn;
    ev.prepost  = (st == S_PP_WAIT) && dw_done;
    ev.postpre  = (st == S_IN_WAIT) && dw_done;
    ev.q_ovf    = q_ovf;
    ev.t_stop   = t_stop;
  end

  // A tick must never arrive while the tile is still working on a timestep.
  a_tick_idle: assert property (@(posedge clk) disable iff (!rst_n) tick |-> st == S_IDLE)
    else $error("neuron %0d: timestep overrun", ID);
endmodule
