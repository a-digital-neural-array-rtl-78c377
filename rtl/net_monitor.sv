// Network monitoring interface.
//
// Streams the state of every neuron once per timestep so the host can watch
// the network while it runs. After a `tick`, it waits until no tile is busy
// (the timestep's work is done) and then emits one word per cycle:
//   weights off : N words, one per neuron    {neuron, fire, MP}
//   weights on  : N*NUM_SYN words, one per synapse {neuron, syn, fire, MP, w}
// `mon_w_en` is sampled when the stream starts. At 50 MHz and 8 kHz a
// timestep has 6250 cycles, enough for the full 225 x 15 weight stream.
// If a tick arrives while streaming, `overrun` pulses and the stream
// restarts for the new timestep.
//
// Monitoring of spike events, membrane potentials and weights follows the
// published chip; the word-per-cycle streaming order is this design's
// choice.
module net_monitor
  import dna_pkg::*;
#(
  parameter int N       = 225,
  parameter int NUM_SYN = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  logic                   busy_any,
  input  logic                   mon_w_en,
  input  logic [N-1:0]           fired,
  input  logic signed [MP_W-1:0] mp    [N],
  input  logic signed [W_W-1:0]  w_all [N][NUM_SYN],
  output logic                   mon_valid,
  output mon_word_t              mon_word,
  output logic                   mon_last,
  output logic                   overrun
);
  localparam int NW = $clog2(N + 1);
  localparam int SW = $clog2(NUM_SYN + 1);

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_SETTLE, M_STREAM} mstate_e;
  mstate_e         st;
  logic [NW-1:0]   n;
  logic [SW-1:0]   s;
  logic            wmode;
  logic            last;

  assign last = (int'(n) == N - 1) && (!wmode || int'(s) == NUM_SYN - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; n <= '0; s <= '0; wmode <= 1'b0;
      mon_valid <= 1'b0; mon_word <= '0; mon_last <= 1'b0; overrun <= 1'b0;
    end else begin
      mon_valid <= 1'b0; mon_last <= 1'b0;
      overrun   <= tick && (st == M_STREAM);
      if (tick) begin
        st <= M_WAIT;            // tiles become busy the cycle after tick
      end else begin
        unique case (st)
          M_IDLE:   ;
          M_WAIT:   st <= M_SETTLE;
          M_SETTLE: if (!busy_any) begin
            st <= M_STREAM; n <= '0; s <= '0; wmode <= mon_w_en;
          end
          M_STREAM: begin
            mon_valid       <= 1'b1;
            mon_last        <= last;
            mon_word.neuron <= 8'(n);
            mon_word.syn    <= wmode ? 4'(s) : 4'd0;
            mon_word.fire   <= fired[n];
            mon_word.mp     <= mp[n];
            mon_word.w      <= wmode ? w_all[n][s] : '0;
            if (last) st <= M_IDLE;
            if (wmode && int'(s) != NUM_SYN - 1) begin
              s <= s + 1'b1;
            end else begin
              s <= '0; n <= n + 1'b1;
            end
          end
          default: st <= M_IDLE;
        endcase
      end
    end
  end
endmodule
