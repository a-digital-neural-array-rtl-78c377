// Digital neural array chip top.
//
// Replicates a biological (or reference) spiking network on-chip: tiles of
// LIF neurons with on-chip STDP are forced to fire with the recorded spikes
// of the network's neurons and learn its synaptic weights from the spike
// timing alone. Blocks:
//   timestep_sync    CLK_SP (8 kHz timestep) -> one-cycle tick in CLK_OP
//   spi_init         32-bit SPI frames -> configuration writes
//   param_regs       common parameters read by all tiles
//   spike_forcing_if serial neuron addresses -> forced spikes per timestep
//   neural_array     N neuron tiles on a shared spike bus
//   net_monitor      per-timestep stream of fire, MP and weights
// `fire_o` carries the spike bus, i.e. every neuron's (axon-delayed) spikes.
//
// Use: hold rst_n low, release, write parameters and per-neuron synapse
// maps and weights over SPI, then run CLK_SP. During each CLK_SP period
// send the addresses of neurons to force for the next timestep.
// The block set and the 225-neuron, 15-synapse size follow the published
// chip; the pin-level protocols are this design's choices.
module dna_top
  import dna_pkg::*;
#(
  parameter int N_NEURONS = 225,
  parameter int NUM_SYN   = 15,
  parameter int QDEPTH    = 16
) (
  input  logic           clk_op,
  input  logic           rst_n,
  input  logic           clk_sp,
  // SPI initialization
  input  logic           spi_sclk,
  input  logic           spi_cs_n,
  input  logic           spi_mosi,
  // spike forcing
  input  logic           frc_sclk,
  input  logic           frc_sdi,
  // spike events and monitoring
  output logic [N_NEURONS-1:0] fire_o,
  output logic           mon_valid,
  output mon_word_t      mon_word,
  output logic           mon_last,
  output logic           mon_overrun,
  output logic           busy_o,
  output nev_t           ev_o
);
  logic                   tick;
  cfg_wr_t                cfg;
  params_t                prm;
  logic [N_NEURONS-1:0]   force_vec, fired;
  logic                   addr_done, busy_any;
  logic signed [MP_W-1:0] mp    [N_NEURONS];
  logic signed [W_W-1:0]  w_all [N_NEURONS][NUM_SYN];

  timestep_sync u_ts (.clk(clk_op), .rst_n, .clk_sp, .tick);

  spi_init u_spi (.clk(clk_op), .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .cfg);

  param_regs u_prm (.clk(clk_op), .rst_n, .cfg, .prm);

  spike_forcing_if #(.N(N_NEURONS), .ADDR_W(8)) u_frc (
    .clk(clk_op), .rst_n, .tick, .f_sclk(frc_sclk), .f_sdi(frc_sdi),
    .force_vec, .addr_done
  );

  neural_array #(.N(N_NEURONS), .NUM_SYN(NUM_SYN), .QDEPTH(QDEPTH)) u_array (
    .clk(clk_op), .rst_n, .tick, .prm, .cfg, .force_vec,
    .spikes(fire_o), .fired, .mp, .w_all, .busy_any, .ev_any(ev_o)
  );

  net_monitor #(.N(N_NEURONS), .NUM_SYN(NUM_SYN)) u_mon (
    .clk(clk_op), .rst_n, .tick, .busy_any, .mon_w_en(prm.mon_w_en), .fired, .mp, .w_all,
    .mon_valid, .mon_word, .mon_last, .overrun(mon_overrun)
  );

  assign busy_o = busy_any;
endmodule
