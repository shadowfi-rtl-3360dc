// Type II saboteur: single event upset on one flip-flop.
//
// The saboteur sits in front of a flip-flop's data (D) and enable (En) pins.
// net_in / ff_ei are the D and enable values the source logic would drive;
// net_out / ff_eo go to the flip-flop. When the saboteur is both selected
// (s_en) and activated (tf_en) it inverts the data and forces the enable
// high, so the flip-flop loads the flipped value on the next clock edge: one
// cycle of tf_en upsets the stored bit once. Otherwise both pins pass
// unchanged. Several Type II saboteurs selected at once on adjacent
// flip-flops model a multibit upset (MEU).
//
// The port list keeps the fault-model input c[1:0] of the published
// saboteur cell so that both saboteur types share one control bundle; the
// Type II behaviour does not depend on it, which is why c is read nowhere
// (a lint tool reports it as unused).
//
// Ports:  net_in  - D value from the source logic
//         ff_ei   - flip-flop enable from the source logic (tie to 1 for a
//                   flip-flop without enable)
//         c       - fault model (not used by this saboteur type)
//         s_en    - saboteur selection bit from the SBTR shift register
//         tf_en   - fault activation, shared by all saboteurs
//         net_out - D pin of the flip-flop
//         ff_eo   - enable pin of the flip-flop
// Timing: combinational; the upset appears at Q one clock edge after tf_en.
module sab_type2
  import shadowfi_pkg::*;
(
  input  logic         net_in,
  input  logic         ff_ei,
  input  fault_model_e c,
  input  logic         s_en,
  input  logic         tf_en,
  output logic         net_out,
  output logic         ff_eo
);

  logic inject;
  assign inject  = s_en & tf_en;
  assign net_out = inject ? ~net_in : net_in;
  assign ff_eo   = inject | ff_ei;

endmodule
