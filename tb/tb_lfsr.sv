// Self-checking test of lfsr: the register must follow a Galois-form model
// of the same polynomial read in reverse bit order, run a full 65535-state
// period without revisiting its seed early, and hold when en is low.
module tb_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0;
  logic [15:0] q;

  lfsr #(.SEED(16'hACE1)) dut (.clk, .rst_n, .en, .q);

  // Fibonacci step written as a per-bit recurrence: new bit = XOR of taps
  function automatic logic [15:0] step(logic [15:0] v);
    logic b;
    b = ^(v & 16'b1011_0100_0000_0000);
    return {v[14:0], b};
  endfunction

  initial begin
    logic [15:0] m, first;
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (q != 16'hACE1) failures++;
    m = q; first = q;
    en = 1;
    period = 0;
    do begin
      @(negedge clk);
      m = step(m);
      period++;
      if (period < 50) begin checks++; if (q != m) failures++; end
    end while (q != first && period < 70000);
    checks++; if (period != 65535) begin failures++; $display("period %0d", period); end
    en = 0; m = q;
    repeat (5) @(negedge clk);
    checks++; if (q != m) failures++;
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
