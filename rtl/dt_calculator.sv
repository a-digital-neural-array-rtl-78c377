// Delta-t calculator of a neuron tile.
//
// Forms the two spike intervals STDP needs from the single STDP timer:
//   post-to-pre : the timer value when an input spike arrives, valid only
//                 while the timer is counting from the last fire;
//   pre-to-post : the timer value latched at the fire minus the stamp that
//                 the input spike left in the queue, valid when the stamp is
//                 not later than the fire.
// Purely combinational. The two formulas follow the published timer scheme;
// the validity rules are this design's choice.
module dt_calculator
  import dna_pkg::*;
(
  input  logic           post_ref,     // timer counts from the last fire
  input  logic [T_W-1:0] t_now,        // STDP timer now
  input  logic [T_W-1:0] t_fire,       // STDP timer value at the last fire
  input  logic [T_W-1:0] stamp,        // queue head stamp
  output logic [T_W-1:0] dt_postpre,
  output logic           postpre_ok,
  output logic [T_W-1:0] dt_prepost,
  output logic           prepost_ok
);
  always_comb begin
    dt_postpre = t_now;
    postpre_ok = post_ref;
    prepost_ok = (t_fire >= stamp);
    dt_prepost = prepost_ok ? t_fire - stamp : '0;
  end
endmodule
