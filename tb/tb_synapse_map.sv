// Self-checking test of synapse_map: lookup of lines against a model of the
// slot table, lateral-inhibition flag, and lowest-free-slot allocation.
module tb_synapse_map;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0, wv, wl, hit, hit_li, free_ok;
  logic [3:0] wa, hs, fs;
  logic [7:0] ws, line;
  logic [14:0] va;
  logic       mv [15];
  logic       ml [15];
  logic [7:0] msrc [15];

  synapse_map #(.NUM_SYN(15), .SLOT_W(4), .SRC_W(8)) dut (.clk, .rst_n, .we, .waddr(wa),
    .wvalid(wv), .wli(wl), .wsrc(ws), .line, .hit, .hit_slot(hs), .hit_li, .free_ok,
    .free_slot(fs), .valid_all(va));

  initial begin
    int eh, es, ef, efs;
    foreach (mv[i]) begin mv[i] = 0; ml[i] = 0; msrc[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 0;
      line = 8'($urandom_range(0, 20)); #1;
      eh = 0; es = 0; ef = 0; efs = 0;
      for (int i = 14; i >= 0; i--) begin
        if (mv[i] && msrc[i] == line) begin eh = 1; es = i; end
        if (!mv[i]) begin ef = 1; efs = i; end
      end
      checks++;
      if (hit != 1'(eh) || (eh && (int'(hs) != es || hit_li != ml[es]))) failures++;
      checks++;
      if (free_ok != 1'(ef) || (ef && int'(fs) != efs)) failures++;
      we = 1'($urandom); wa = 4'($urandom_range(0, 14)); wv = ($urandom_range(0, 3) != 0);
      wl = 1'($urandom); ws = 8'($urandom_range(0, 20));
      if (we) begin mv[wa] = wv; ml[wa] = wl; msrc[wa] = ws; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
