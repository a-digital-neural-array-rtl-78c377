// Shared types and constants of the digital neural array.
//
// The array is made of identical neuron tiles. Each tile keeps a signed
// 10-bit membrane potential, a small set of signed 10-bit synaptic weights,
// one 8-bit STDP timer and one shared delta-w generator. All tiles see one
// set of common parameters (params_t), written through the SPI
// initialization interface.
//
// Widths that follow the published design: 10-bit membrane potential,
// 10-bit weights (-512..511), 8-bit STDP timer, 225 neurons with 15
// synapses each. The register map, the per-curve control field widths and
// the configuration frame format are this design's own choices.
package dna_pkg;

  localparam int MP_W  = 10;   // membrane potential, signed
  localparam int W_W   = 10;   // synaptic weight, signed
  localparam int T_W   = 8;    // STDP timer
  localparam int DLY_W = 4;    // axonal delay setting, timesteps
  localparam int DW_W  = 12;   // delta-w, signed

  localparam logic signed [MP_W-1:0] MP_MAX = 10'sd511;
  localparam logic signed [MP_W-1:0] MP_MIN = -10'sd512;
  // Weights keep their sign: excitatory 1..511, inhibitory -512..-1.
  localparam logic signed [W_W-1:0]  WE_MAX = 10'sd511;
  localparam logic signed [W_W-1:0]  WE_MIN = 10'sd1;
  localparam logic signed [W_W-1:0]  WI_MAX = -10'sd1;
  localparam logic signed [W_W-1:0]  WI_MIN = -10'sd512;

  // One STDP curve: the four hyper-parameters (max value, slope, offset,
  // sign) plus the LFSR noise amplitude.
  typedef struct packed {
    logic [2:0] max_sh;    // Max   = |w| >> max_sh
    logic [2:0] slope_sh;  // 2d0   = Max >> slope_sh ; first segment 2^slope_sh long
    logic [2:0] off_sh;    // offset = Max >> off_sh
    logic       off_en;    // subtract the offset
    logic       neg;       // sign control: negate the result
    logic [1:0] noise;     // 0: no noise, k: k+1 LSBs of LFSR noise
  } curve_t;               // 13 bits

  // Curve selection: excitatory/inhibitory synapse x pairing order.
  typedef enum logic [1:0] {
    C_EXC_PREPOST  = 2'd0,  // input spike before fire
    C_EXC_POSTPRE  = 2'd1,  // input spike after fire
    C_INH_PREPOST  = 2'd2,
    C_INH_POSTPRE  = 2'd3
  } curve_sel_e;

  typedef struct packed {
    logic                     mon_w_en;    // monitor also streams weights
    logic                     newconn_en;  // allow new connections
    logic                     li_en;       // lateral inhibition
    logic                     refr_en;     // refractory periods
    logic                     integ_en;    // integration of inputs
    logic                     leak_en;     // leakage
    logic                     stdp_en;     // STDP learning
    logic signed [MP_W-1:0]   v_th;        // firing threshold
    logic signed [MP_W-1:0]   v_rest;      // resting potential
    logic signed [MP_W-1:0]   v_reset;     // reset potential after fire
    logic [MP_W-1:0]          leak;        // leak per timestep
    logic [W_W-1:0]           rrp_wth;     // |w| must exceed this in RRP
    logic [T_W-1:0]           arp_len;     // absolute refractory, timesteps
    logic [T_W-1:0]           rrp_len;     // relative refractory, timesteps
    logic [DLY_W-1:0]         axon_dly;    // axonal delay, timesteps
    logic [T_W-1:0]           stdp_win;    // STDP tracking window (timer max)
    logic [MP_W-1:0]          li_amt;      // lateral inhibition depth
    logic signed [W_W-1:0]    new_w;       // weight of a new connection
    curve_t [3:0]             curve;       // indexed by curve_sel_e
  } params_t;

  // Register map of params_t (SPI target T_PARAM).
  localparam int PA_SWITCH  = 0;
  localparam int PA_VTH     = 1;
  localparam int PA_VREST   = 2;
  localparam int PA_VRESET  = 3;
  localparam int PA_LEAK    = 4;
  localparam int PA_RRPWTH  = 5;
  localparam int PA_ARP     = 6;
  localparam int PA_RRP     = 7;
  localparam int PA_DLY     = 8;
  localparam int PA_WIN     = 9;
  localparam int PA_LIAMT   = 10;
  localparam int PA_NEWW    = 11;
  localparam int PA_CURVE0  = 12;  // 12..15

  // 32-bit configuration frame:
  //   [31:30] target  [29:22] neuron  [21:18] synapse slot  [21:16] param address
  //   [15:0]  data
  typedef enum logic [1:0] {
    T_PARAM  = 2'd0,
    T_SYNMAP = 2'd1,   // data: [15] valid [14] lateral-inhibition dendrite [7:0] source line
    T_WEIGHT = 2'd2    // data: [9:0] signed weight
  } cfg_tgt_e;

  typedef struct packed {
    logic       we;
    cfg_tgt_e   tgt;
    logic [7:0] neuron;
    logic [3:0] slot;    // frame[21:18]
    logic [5:0] paddr;   // frame[21:16]
    logic [15:0] data;
  } cfg_wr_t;

  // Per-cycle event flags of a neuron tile (for monitoring and tests).
  typedef struct packed {
    logic fire;       // neuron fired (threshold or forced)
    logic forced;     // fire caused by the spike forcing interface
    logic integ;      // an input weight was added to the MP
    logic arp_drop;   // input ignored in the absolute refractory period
    logic rrp_drop;   // input below the RRP weight threshold ignored
    logic li;         // lateral inhibition applied
    logic newconn;    // new synaptic connection made
    logic prepost;    // weight updated for an input-then-fire pair
    logic postpre;    // weight updated for a fire-then-input pair
    logic q_ovf;      // in-spike queue overflow
    logic t_stop;     // STDP timer reached its window and stopped
  } nev_t;

  // One word of the monitoring stream.
  typedef struct packed {
    logic [7:0]             neuron;
    logic [3:0]             syn;
    logic                   fire;
    logic signed [MP_W-1:0] mp;
    logic signed [W_W-1:0]  w;
  } mon_word_t;

  function automatic logic signed [MP_W-1:0] sat_mp(input logic signed [MP_W+1:0] v);
    if (v > (MP_W+2)'(MP_MAX)) return MP_MAX;
    if (v < (MP_W+2)'(MP_MIN)) return MP_MIN;
    return v[MP_W-1:0];
  endfunction

  // Weight update that keeps the synapse's sign class.
  function automatic logic signed [W_W-1:0] upd_w(input logic signed [W_W-1:0] w,
                                                  input logic signed [DW_W-1:0] dw);
    logic signed [DW_W+1:0] s;
    s = (DW_W+2)'(w) + (DW_W+2)'(dw);
    if (!w[W_W-1]) begin
      if (s > (DW_W+2)'(WE_MAX)) return WE_MAX;
      if (s < (DW_W+2)'(WE_MIN)) return WE_MIN;
    end else begin
      if (s > (DW_W+2)'(WI_MAX)) return WI_MAX;
      if (s < (DW_W+2)'(WI_MIN)) return WI_MIN;
    end
    return s[W_W-1:0];
  endfunction

endpackage
