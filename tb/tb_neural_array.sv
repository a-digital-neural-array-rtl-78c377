// Self-checking test of neural_array with 4 tiles: tile 1 listens to tile
// 0 (weight 300, threshold 250), tile 2 listens to tile 1, tile 3 listens
// to tiles 0 and 1. Forcing tile 0 must make the spike travel 0 -> 1 -> 2
// one timestep per hop on the shared bus; tile 3 must fire only when both
// its inputs arrive together. busy_any must drop every timestep.
module tb_neural_array;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 4, S = 3;
  logic tick = 0, busy_any;
  params_t prm;
  cfg_wr_t cfg = '0;
  logic [N-1:0] force_vec = '0, spikes, fired;
  logic signed [MP_W-1:0] mp [N];
  logic signed [W_W-1:0]  w_all [N][S];
  nev_t ev_any;

  neural_array #(.N(N), .NUM_SYN(S), .QDEPTH(4)) dut (.clk, .rst_n, .tick, .prm, .cfg, .force_vec,
    .spikes, .fired, .mp, .w_all, .busy_any, .ev_any);

  task automatic cfgw(int n, cfg_tgt_e t, int slot, logic [15:0] d);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tgt = t; cfg.neuron = 8'(n); cfg.slot = 4'(slot); cfg.data = d;
    @(negedge clk) cfg = '0;
  endtask
  task automatic ts(logic [N-1:0] frc);
    @(negedge clk) begin force_vec = frc; tick = 1; end
    @(negedge clk) begin tick = 0; force_vec = '0; end
    while (busy_any) @(negedge clk);
    checks++; // the timestep completed
    @(negedge clk);
  endtask

  initial begin
    logic [N-1:0] fh [8];
    prm = '0;
    prm.integ_en = 1; prm.v_th = 10'sd250; prm.v_reset = 0; prm.v_rest = 0;
    prm.stdp_win = 8'd255;
    repeat (3) @(negedge clk); rst_n = 1;
    cfgw(1, T_SYNMAP, 0, 16'h8000); cfgw(1, T_WEIGHT, 0, 16'd300);
    cfgw(2, T_SYNMAP, 0, 16'h8001); cfgw(2, T_WEIGHT, 0, 16'd300);
    cfgw(3, T_SYNMAP, 0, 16'h8000); cfgw(3, T_WEIGHT, 0, 16'd130);
    cfgw(3, T_SYNMAP, 1, 16'h8001); cfgw(3, T_WEIGHT, 1, 16'd130);
    for (int t = 0; t < 8; t++) begin
      ts(t == 0 ? 4'b0001 : 4'b0000);
      fh[t] = fired;
    end
    // t0: 0 forced; t1: 1 fires (0 on bus), 3 gets 130; t2: 2 fires, 3 reaches 260 and fires
    checks++; if (fh[0] != 4'b0001) failures++;
    checks++; if (fh[1] != 4'b0010) failures++;
    checks++; if (fh[2] != 4'b1100) failures++;
    checks++; if (fh[3] != 4'b0000) failures++;
    checks++; if (mp[3] != 0 || mp[1] != 0) failures++;
    if (failures) for (int t = 0; t < 4; t++) $display("t%0d fired=%b", t, fh[t]);
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
