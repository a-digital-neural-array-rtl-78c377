// Self-checking test of spike_generator: a fire in timestep t must appear
// on spike_out exactly during timestep t+1+dly, for every delay setting.
module tb_spike_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick = 0, fire = 0, so, fired;
  logic [3:0] dly;

  spike_generator #(.DLY_W(4)) dut (.clk, .rst_n, .tick, .fire, .dly, .spike_out(so), .fired);

  // one timestep = tick, then a few idle cycles; fire mid-timestep
  task automatic step(logic f, output logic out_seen);
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    out_seen = so;
    @(negedge clk) fire = f;
    @(negedge clk) fire = 0;
    checks++; if (fired != f) failures++;
    @(negedge clk);
  endtask

  initial begin
    logic o;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      dly = 4'(d);
      for (int k = 0; k < 20; k++) step(0, o);
      step(1, o);                       // fire in timestep 0
      for (int k = 1; k <= 18; k++) begin
        step(0, o);
        checks++;
        if (o != (k == d + 1)) begin failures++; $display("FAIL d=%0d k=%0d", d, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
