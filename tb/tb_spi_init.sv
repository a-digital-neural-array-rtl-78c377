// Self-checking test of spi_init: random 32-bit frames sent MSB first in
// SPI mode 0 must come out as one configuration write each, fields split
// as documented; a frame cut short by CS_N produces no write.
module tb_spi_init;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, writes = 0;
  logic sclk = 0, cs_n = 1, mosi = 0;
  cfg_wr_t cfg, last;

  spi_init dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .cfg);
  always @(negedge clk) if (cfg.we) begin writes++; last = cfg; end

  task automatic send(logic [31:0] f, int nbits);
    cs_n = 0;
    repeat (4) @(negedge clk);
    for (int b = 31; b > 31 - nbits; b--) begin
      mosi = f[b];
      repeat (4) @(negedge clk); sclk = 1;
      repeat (4) @(negedge clk); sclk = 0;
    end
    repeat (8) @(negedge clk);
    cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [31:0] f;
    int w0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      f = $urandom;
      w0 = writes;
      send(f, 32);
      checks++;
      if (writes != w0 + 1 || last.tgt != cfg_tgt_e'(f[31:30]) || last.neuron != f[29:22] ||
          last.slot != f[21:18] || last.paddr != f[21:16] || last.data != f[15:0]) begin
        failures++; $display("FAIL frame %h", f);
      end
    end
    w0 = writes;
    send(32'h1234_5678, 20);
    send(32'h4000_8001, 32);           // next frame still aligned after the abort
    checks++; if (writes != w0 + 1 || last.data != 16'h8001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
