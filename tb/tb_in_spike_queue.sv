// Self-checking test of in_spike_queue against a SystemVerilog queue model:
// random push/pop traffic, drop-oldest overflow and flush.
module tb_in_spike_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ovfs = 0;
  logic flush = 0, push = 0, pop = 0;
  logic [3:0] ps, qs;
  logic [7:0] pt, qt;
  logic empty, full, overflow;
  logic [11:0] model[$];

  in_spike_queue #(.DEPTH(4), .SLOT_W(4), .T_W(8)) dut (
    .clk, .rst_n, .flush, .push, .push_slot(ps), .push_stamp(pt), .pop,
    .q_slot(qs), .q_stamp(qt), .empty, .full, .overflow);


  initial begin
    int exp_ovf;
    logic ovf_due;
    exp_ovf = 0; ovf_due = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      // compare head and flags with the model
      checks++;
      if (overflow != ovf_due) failures++;
      if (overflow) ovfs++;
      ovf_due = 0;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4)) failures++;
      if (model.size() > 0) begin
        checks++;
        if ({qs, qt} != model[0]) failures++;
      end
      push  = ($urandom_range(0, 2) == 0);
      pop   = ($urandom_range(0, 3) == 0);
      flush = ($urandom_range(0, 60) == 0);
      ps = 4'($urandom); pt = 8'($urandom);
      // model update for this cycle
      if (flush) model.delete();
      else begin
        if (pop && model.size() > 0) void'(model.pop_front());
        else if (push && model.size() == 4) begin void'(model.pop_front()); exp_ovf++; ovf_due = 1; end
        if (push) model.push_back({ps, pt});
      end
    end
    @(negedge clk); push = 0; pop = 0; flush = 0;
    if (overflow) ovfs++;
    checks++; if (ovfs != exp_ovf || exp_ovf == 0) begin failures++; $display("ovf %0d exp %0d", ovfs, exp_ovf); end
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
