// Self-checking test of net_monitor: after a tick it waits for busy_any to
// fall, then streams N words (or N*NUM_SYN with weights) with the right
// neuron/synapse order and values, one per cycle; a tick mid-stream flags
// overrun.
module tb_net_monitor;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 6, S = 3;
  logic tick = 0, busy_any = 0, mon_w_en = 0, mon_valid, mon_last, overrun;
  logic [N-1:0] fired;
  logic signed [MP_W-1:0] mp [N];
  logic signed [W_W-1:0]  w_all [N][S];
  mon_word_t word;
  int nwords, ovr = 0;

  net_monitor #(.N(N), .NUM_SYN(S)) dut (.clk, .rst_n, .tick, .busy_any, .mon_w_en, .fired, .mp,
    .w_all, .mon_valid, .mon_word(word), .mon_last, .overrun);
  always @(negedge clk) if (overrun) ovr++;

  task automatic frame(logic wen);
    int exp_n, exp_s, busy_cycles;
    mon_w_en = wen;
    for (int i = 0; i < N; i++) begin
      fired[i] = 1'($urandom); mp[i] = 10'($urandom);
      for (int j = 0; j < S; j++) w_all[i][j] = 10'($urandom);
    end
    @(negedge clk) tick = 1;
    @(negedge clk) begin tick = 0; busy_any = 1; end
    busy_cycles = $urandom_range(1, 10);
    repeat (busy_cycles) begin
      @(negedge clk);
      checks++; if (mon_valid) failures++;     // nothing while tiles are busy
    end
    busy_any = 0;
    nwords = 0; exp_n = 0; exp_s = 0;
    while (nwords < (wen ? N * S : N)) begin
      @(negedge clk);
      if (mon_valid) begin
        checks++;
        if (int'(word.neuron) != exp_n || int'(word.syn) != exp_s || word.fire != fired[exp_n] ||
            word.mp != mp[exp_n] || word.w != (wen ? w_all[exp_n][exp_s] : 10'sd0) ||
            mon_last != (nwords == (wen ? N * S : N) - 1)) begin
          failures++; $display("FAIL word n=%0d s=%0d", exp_n, exp_s);
        end
        nwords++;
        if (wen && exp_s < S - 1) exp_s++; else begin exp_s = 0; exp_n++; end
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (mon_valid) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    frame(0); frame(1); frame(0); frame(1);
    // overrun: tick while streaming
    mon_w_en = 1;
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    repeat (5) @(negedge clk);
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    repeat (2) @(negedge clk);
    checks++; if (ovr != 1) begin failures++; $display("overruns %0d", ovr); end
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
