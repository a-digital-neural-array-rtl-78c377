// Self-checking test of spike_forcing_if: serial 8-bit addresses, several
// per timestep, must set exactly those bits of force_vec at the next tick;
// addresses >= N are ignored; the vector clears after the tick.
module tb_spike_forcing_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 20;
  logic tick = 0, f_sclk = 0, f_sdi = 0, addr_done;
  logic [N-1:0] force_vec, exp_v, sampled;

  spike_forcing_if #(.N(N), .ADDR_W(8)) dut (.clk, .rst_n, .tick, .f_sclk, .f_sdi, .force_vec, .addr_done);

  task automatic send_addr(int a);
    for (int b = 7; b >= 0; b--) begin
      f_sdi = 1'(a >> b);
      repeat (3) @(negedge clk); f_sclk = 1;
      repeat (3) @(negedge clk); f_sclk = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      exp_v = '0;
      for (int k = 0; k < $urandom_range(0, 4); k++) begin
        int a;
        a = $urandom_range(0, N + 5);
        send_addr(a);
        if (a < N) exp_v[a] = 1'b1;
      end
      @(negedge clk);
      checks++; if (force_vec != exp_v) begin failures++; $display("FAIL %h %h", force_vec, exp_v); end
      tick = 1;
      @(negedge clk) tick = 0;
      checks++; if (force_vec != '0) failures++;
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
