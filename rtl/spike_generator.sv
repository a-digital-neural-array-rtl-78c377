// Spike generator with adjustable axonal delay.
//
// A fire event during timestep t is held in `pend` until the next timestep
// starts, then shifted into a delay line that advances once per timestep.
// `spike_out` is tap `dly` of that line, so it is high during timestep
// t+1+dly and stable for the whole timestep, which lets every other tile
// scan the spike bus at any point of the timestep. `fired` is high from the
// fire until the next tick, for monitoring.
//
// An adjustable axonal delay follows the published neuron; the one-timestep
// minimum latency and the 0..2^DLY_W-1 range are this design's choices.
module spike_generator #(
  parameter int DLY_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             fire,
  input  logic [DLY_W-1:0] dly,
  output logic             spike_out,
  output logic             fired
);
  localparam int L = 2 ** DLY_W;
  logic         pend;
  logic [L-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; line <= '0;
    end else begin
      if (tick) begin
        line <= {line[L-2:0], pend};
        pend <= fire;
      end else if (fire) begin
        pend <= 1'b1;
      end
    end
  end

  assign spike_out = line[dly];
  assign fired     = pend;
endmodule
