// Self-checking test of stdp_timer: reset on fire, one count per tick,
// stop at the window with stop_evt, restart on an input spike without the
// post reference, and fire taking priority.
module tb_stdp_timer;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick = 0, fire = 0, in_spike = 0;
  logic [T_W-1:0] win = 8'd10, t;
  logic running, post_ref, stop_evt;
  int stops = 0;

  stdp_timer dut (.clk, .rst_n, .tick, .fire, .in_spike, .win, .t, .running, .post_ref, .stop_evt);
  always @(posedge clk) if (stop_evt) stops++;

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask
  task automatic chk(int et, logic er, logic ep);
    checks++;
    if (int'(t) != et || running != er || post_ref != ep) begin
      failures++; $display("FAIL t=%0d run=%0d ref=%0d exp %0d %0d %0d", t, running, post_ref, et, er, ep);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(0, 0, 0);
    pulse(tick); chk(0, 0, 0);          // stopped timer does not count
    pulse(fire); chk(0, 1, 1);
    for (int k = 1; k <= 5; k++) begin pulse(tick); chk(k, 1, 1); end
    pulse(in_spike); chk(5, 1, 1);      // input spike does not disturb a running timer
    for (int k = 6; k <= 9; k++) begin pulse(tick); chk(k, 1, 1); end
    pulse(tick); chk(10, 0, 0);         // reached the window: stops
    checks++; if (stops != 1) failures++;
    pulse(tick); chk(10, 0, 0);
    pulse(in_spike); chk(0, 1, 0);      // restart from an input spike
    pulse(tick); chk(1, 1, 0);
    @(negedge clk) begin fire = 1; in_spike = 1; end
    @(negedge clk) begin fire = 0; in_spike = 0; end
    chk(0, 1, 1);
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
