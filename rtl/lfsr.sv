// 16-bit Fibonacci LFSR used as the noise source of the delta-w generator.
//
// Polynomial x^16 + x^14 + x^13 + x^11 + 1 (maximal length, 65535 states).
// The register advances by one step on every cycle with `en` high and
// reloads SEED on reset; a zero seed is replaced by 1 so the register never
// locks up. The published design only states that an LFSR adds stochastic
// variation to weight updates; the length, polynomial and seed are this
// design's choice. Output `q` is the current state, valid every cycle.
module lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] q
);
  localparam logic [15:0] SEED_NZ = (SEED == 16'h0) ? 16'h1 : SEED;
  logic fb;
  assign fb = q[15] ^ q[13] ^ q[12] ^ q[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED_NZ;
    else if (en) q <= {q[14:0], fb};
  end
endmodule
