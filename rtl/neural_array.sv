// Neural array: N identical neuron tiles on one spike bus.
//
// Every tile drives one line of the spike bus (its axon output) and reads
// the whole bus as its candidate input lines; which lines it actually
// listens to is set by its own synapse map, so any tile can connect to
// any other and the connection pattern is pure configuration. All tiles
// share the common parameters, the timestep tick and the configuration
// bus; each gets its own forced-spike bit. Tile i has ID i and its own
// LFSR seed.
//
// Tiling identical self-contained neuron modules follows the published
// architecture. The published array wires tiles to their neighbours; the
// shared bus here is a superset of that wiring and is this design's
// choice. Latency: a tile's spike is on the bus one timestep after it
// fires, plus its axonal delay.
module neural_array
  import dna_pkg::*;
#(
  parameter int N       = 225,
  parameter int NUM_SYN = 15,
  parameter int QDEPTH  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  params_t                prm,
  input  cfg_wr_t                cfg,
  input  logic [N-1:0]           force_vec,
  output logic [N-1:0]           spikes,    // spike bus (axon outputs)
  output logic [N-1:0]           fired,     // fired in the current timestep
  output logic signed [MP_W-1:0] mp    [N],
  output logic signed [W_W-1:0]  w_all [N][NUM_SYN],
  output logic                   busy_any,
  output nev_t                   ev_any
);
  logic [N-1:0] busy;
  nev_t         ev [N];

  for (genvar i = 0; i < N; i++) begin : g_n
    neuron_module #(
      .ID(i), .N_IN(N), .NUM_SYN(NUM_SYN), .QDEPTH(QDEPTH),
      .SEED(16'hACE1 ^ 16'(i * 40503 + 1))
    ) u_neuron (
      .clk, .rst_n, .tick, .prm, .spikes_in(spikes), .force_in(force_vec[i]), .cfg,
      .spike_out(spikes[i]), .fired(fired[i]), .mp(mp[i]), .w_all(w_all[i]),
      .busy(busy[i]), .ev(ev[i])
    );
  end

  assign busy_any = |busy;
  always_comb begin
    ev_any = '0;
    for (int i = 0; i < N; i++) ev_any = ev_any | ev[i];
  end
endmodule
