// Self-checking test of weight_array against an array model: random writes,
// asynchronous reads and the monitoring output.
module tb_weight_array;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [3:0] wa, ra;
  logic signed [W_W-1:0] wd, rd;
  logic signed [W_W-1:0] w_all [15];
  logic signed [W_W-1:0] m [15];

  weight_array #(.NUM_SYN(15), .SLOT_W(4)) dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd),
                                               .raddr(ra), .rdata(rd), .w_all);
  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      ra = 4'($urandom_range(0, 14)); #1;
      checks++; if (rd != m[ra]) failures++;
      checks++; if (w_all[k % 15] != m[k % 15]) failures++;
      we = 1'($urandom); wa = 4'($urandom_range(0, 15)); wd = 10'($urandom);
      if (we && wa < 15) m[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
