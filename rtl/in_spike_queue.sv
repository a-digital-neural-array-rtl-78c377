// In-spike queue: FIFO of (synapse index, STDP-timer stamp) pairs.
//
// Every integrated input spike is pushed with the timer value of its
// timestep. When the neuron fires, the queue is drained one entry per pop
// and each entry yields a pre-to-post interval. A push into a full queue
// drops the oldest entry (`overflow` pulses) so the most recent spikes are
// kept. `flush` empties the queue when the STDP timer stops.
//
// Storing input time stamps in a queue follows the published design; the
// depth, the drop-oldest policy and the flush are this design's choices.
//
// Timing: head (`q_slot`, `q_stamp`) is valid whenever `empty` is low. A
// pop and a push may happen in the same cycle; flush has priority.
module in_spike_queue #(
  parameter int DEPTH  = 16,
  parameter int SLOT_W = 4,
  parameter int T_W    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              push,
  input  logic [SLOT_W-1:0] push_slot,
  input  logic [T_W-1:0]    push_stamp,
  input  logic              pop,
  output logic [SLOT_W-1:0] q_slot,
  output logic [T_W-1:0]    q_stamp,
  output logic              empty,
  output logic              full,
  output logic              overflow
);
  localparam int AW = $clog2(DEPTH);
  typedef struct packed {
    logic [SLOT_W-1:0] slot;
    logic [T_W-1:0]    stamp;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   cnt;
  logic          do_pop;

  assign empty   = (cnt == '0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign q_slot  = mem[rd].slot;
  assign q_stamp = mem[rd].stamp;
  // an extra pop makes room when pushing into a full queue
  assign do_pop  = (pop && !empty) || (push && full);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0; overflow <= 1'b0;
    end else begin
      overflow <= push && full && !pop && !flush;
      if (flush) begin
        rd <= '0; wr <= '0; cnt <= '0;
      end else begin
        if (push)   wr <= inc(wr);
        if (do_pop) rd <= inc(rd);
        cnt <= cnt + (AW+1)'(push) - (AW+1)'(do_pop);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && !flush) mem[wr] <= '{slot: push_slot, stamp: push_stamp};
  end
endmodule
