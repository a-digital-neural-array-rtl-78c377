// SPI initialization interface.
//
// A write-only SPI slave (mode 0: data sampled on the rising SCLK edge,
// MSB first, frame framed by CS_N low) that receives 32-bit configuration
// frames and turns each into one write on the configuration bus `cfg`:
//   [31:30] target: 0 common parameter, 1 synapse-map slot, 2 weight
//   [29:22] neuron index   [21:18] synapse slot   [21:16] parameter address
//   [15:0]  data
// SCLK, CS_N and MOSI are oversampled by CLK_OP through two-flop
// synchronizers, so SCLK must be slower than a quarter of CLK_OP.
//
// Configuring common parameters and per-neuron synaptic data over SPI
// follows the published chip; the frame format is this design's choice.
// Timing: `cfg.we` pulses for one CLK_OP cycle about 3 cycles after the
// 32nd rising SCLK edge of a frame. Bits past 32 start a new frame.
module spi_init
  import dna_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sclk,
  input  logic    cs_n,
  input  logic    mosi,
  output cfg_wr_t cfg
);
  logic [2:0]  sclk_s;
  logic [1:0]  cs_s, mosi_s;
  logic [31:0] sh;
  logic [5:0]  cnt;
  logic        rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end
  assign rise = sclk_s[1] & ~sclk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; cfg <= '0;
    end else begin
      cfg.we <= 1'b0;
      if (cs_s[1]) begin
        cnt <= '0;
      end else if (rise) begin
        sh <= {sh[30:0], mosi_s[1]};
        if (cnt == 6'd31) begin
          cnt        <= '0;
          cfg.we     <= 1'b1;
          cfg.tgt    <= cfg_tgt_e'(sh[30:29]);
          cfg.neuron <= sh[28:21];
          cfg.slot   <= sh[20:17];
          cfg.paddr  <= sh[20:15];
          cfg.data   <= {sh[14:0], mosi_s[1]};
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
