// Timestep detector: brings the spike clock CLK_SP into the operation clock
// CLK_OP domain.
//
// The array works in two clock domains: an 8 kHz spike clock that sets the
// 0.125 ms timestep, and a 50 MHz operation clock that does all the work
// of a timestep in a burst. Here CLK_SP is passed through a two-flop
// synchronizer and its rising edge becomes `tick`, a one-cycle CLK_OP pulse
// that starts the operation flow of every neuron tile. The tiles idle
// between bursts, which is where the operation clock is gated in silicon.
//
// The two clock frequencies follow the published design; treating CLK_SP
// as a sampled level rather than a second clock is this design's choice.
// Latency: `tick` rises at the second CLK_OP edge after the CLK_SP rising
// edge and lasts one cycle.
module timestep_sync (
  input  logic clk,      // CLK_OP
  input  logic rst_n,
  input  logic clk_sp,   // CLK_SP, asynchronous to clk
  output logic tick
);
  logic [2:0] s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= {s[1:0], clk_sp};
  end
  assign tick = s[1] & ~s[2];
endmodule
