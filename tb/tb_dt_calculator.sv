// Self-checking test of dt_calculator: exhaustive over stamp and fire
// times for pre-to-post, and the post-to-pre validity rule.
module tb_dt_calculator;
  import dna_pkg::*;
  int checks = 0, failures = 0;
  logic post_ref;
  logic [T_W-1:0] t_now, t_fire, stamp, dt_pp, dt_pq;
  logic pp_ok, pq_ok;

  dt_calculator dut (.post_ref, .t_now, .t_fire, .stamp, .dt_postpre(dt_pp), .postpre_ok(pp_ok),
                     .dt_prepost(dt_pq), .prepost_ok(pq_ok));

  initial begin
    for (int f = 0; f < 256; f += 3)
      for (int s = 0; s < 256; s += 5) begin
        t_fire = 8'(f); stamp = 8'(s); post_ref = 1'(f % 2); t_now = 8'(s);
        #1;
        checks++;
        if (pq_ok != (s <= f) || (s <= f && int'(dt_pq) != f - s)) failures++;
        checks++;
        if (pp_ok != post_ref || dt_pp != 8'(s)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
