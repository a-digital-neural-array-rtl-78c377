// Synaptic weight array of one neuron tile.
//
// NUM_SYN signed W_W-bit weights kept as registers, one write port and one
// asynchronous read port, plus the whole array as an output for the
// monitoring interface. Each tile stores its own weights, as in the
// published tile-able architecture; a register array instead of a memory
// macro is this design's choice. Writes take effect at the clock edge.
module weight_array
  import dna_pkg::*;
#(
  parameter int NUM_SYN = 15,
  parameter int SLOT_W  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [SLOT_W-1:0]     waddr,
  input  logic signed [W_W-1:0] wdata,
  input  logic [SLOT_W-1:0]     raddr,
  output logic signed [W_W-1:0] rdata,
  output logic signed [W_W-1:0] w_all [NUM_SYN]
);
  logic signed [W_W-1:0] w [NUM_SYN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SYN; i++) w[i] <= '0;
    end else if (we && (int'(waddr) < NUM_SYN)) begin
      w[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < NUM_SYN) ? w[raddr] : '0;
  assign w_all = w;
endmodule
