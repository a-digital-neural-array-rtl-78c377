// Self-checking test of timestep_sync: exactly one tick per CLK_SP rising
// edge, raised at the second CLK_OP edge after it, none on falling edges.
module tb_timestep_sync;
  logic clk = 0, rst_n = 0, clk_sp = 0, tick;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ticks = 0, lat;

  timestep_sync dut (.clk, .rst_n, .clk_sp, .tick);
  always @(negedge clk) if (rst_n && tick) ticks++;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      #3 clk_sp = 1;
      lat = 0;
      while (!tick) begin @(posedge clk); #1; lat++; end
      checks++; if (lat != 2) begin failures++; $display("lat %0d", lat); end
      repeat (17) @(posedge clk);
      #2 clk_sp = 0;
      repeat (20) @(posedge clk);
    end
    checks++; if (ticks != 20) failures++;
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
