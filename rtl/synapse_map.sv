// Dynamic synapse map of one neuron tile.
//
// Each of the NUM_SYN synapse slots records which input line (the index of a
// source neuron on the array's spike bus) it listens to, whether it is in
// use, and whether it is a lateral-inhibition dendrite. For the input line
// being scanned the map returns, in the same cycle, the slot that owns it
// (parallel compare) and, for new connections, the lowest free slot.
// Slots are written by the configuration interface or, when a new
// connection is made, by the neuron's controller.
//
// The published design names this block and a "make new connection" step;
// the content-addressed organisation and first-free allocation are this
// design's choices.
module synapse_map #(
  parameter int NUM_SYN = 15,
  parameter int SLOT_W  = 4,
  parameter int SRC_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              we,
  input  logic [SLOT_W-1:0] waddr,
  input  logic              wvalid,
  input  logic              wli,
  input  logic [SRC_W-1:0]  wsrc,
  // lookup of one input line
  input  logic [SRC_W-1:0]  line,
  output logic              hit,
  output logic [SLOT_W-1:0] hit_slot,
  output logic              hit_li,
  output logic              free_ok,
  output logic [SLOT_W-1:0] free_slot,
  // slot read (monitoring/test)
  output logic [NUM_SYN-1:0] valid_all
);
  logic             valid [NUM_SYN];
  logic             li    [NUM_SYN];
  logic [SRC_W-1:0] src   [NUM_SYN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SYN; i++) begin
        valid[i] <= 1'b0; li[i] <= 1'b0; src[i] <= '0;
      end
    end else if (we && (int'(waddr) < NUM_SYN)) begin
      valid[waddr] <= wvalid; li[waddr] <= wli; src[waddr] <= wsrc;
    end
  end

  always_comb begin
    hit = 1'b0; hit_slot = '0; hit_li = 1'b0;
    free_ok = 1'b0; free_slot = '0;
    for (int i = NUM_SYN - 1; i >= 0; i--) begin
      if (valid[i] && src[i] == line) begin
        hit = 1'b1; hit_slot = SLOT_W'(i); hit_li = li[i];
      end
      if (!valid[i]) begin
        free_ok = 1'b1; free_slot = SLOT_W'(i);
      end
    end
    for (int i = 0; i < NUM_SYN; i++) valid_all[i] = valid[i];
  end
endmodule
