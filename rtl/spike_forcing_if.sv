// Spike forcing interface.
//
// Injects spikes of a biological (or reference) network into chosen neuron
// tiles so that they fire in step with it. The host sends n-bit neuron
// addresses bit by bit, MSB first, on two pins (serial clock and data). A
// shift register collects the bits; when the bit counter reaches n the
// address is complete and a one-hot decoder sets that neuron's bit in the
// pending force vector. Any number of addresses may be sent per timestep;
// at the next `tick` the neurons sample `force_vec` and it is cleared.
// Addresses at or above N are ignored.
//
// Shift register, "CNT = n" counter and one-hot decoder follow the
// published block diagram. The serial pins are oversampled by CLK_OP; the
// accumulate-until-tick behaviour is this design's choice.
module spike_forcing_if #(
  parameter int N      = 225,
  parameter int ADDR_W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         f_sclk,
  input  logic         f_sdi,
  output logic [N-1:0] force_vec,
  output logic         addr_done   // pulse: one address decoded
);
  localparam int CW = $clog2(ADDR_W + 1);
  logic [2:0]        sclk_s;
  logic [1:0]        sdi_s;
  logic [ADDR_W-1:0] sh;
  logic [CW-1:0]     cnt;
  logic              rise;
  logic [N-1:0]      onehot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; sdi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], f_sclk};
      sdi_s  <= {sdi_s[0], f_sdi};
    end
  end
  assign rise = sclk_s[1] & ~sclk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0;
    end else if (rise) begin
      sh  <= {sh[ADDR_W-2:0], sdi_s[1]};
      cnt <= (cnt == CW'(ADDR_W - 1)) ? '0 : cnt + 1'b1;
    end
  end

  // completed address (CNT = n) one cycle after the last bit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr_done <= 1'b0;
    else        addr_done <= rise && (cnt == CW'(ADDR_W - 1));
  end

  always_comb begin
    onehot = '0;
    for (int i = 0; i < N; i++) onehot[i] = addr_done && (sh == ADDR_W'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    force_vec <= '0;
    else if (tick) force_vec <= onehot;
    else           force_vec <= force_vec | onehot;
  end
endmodule
