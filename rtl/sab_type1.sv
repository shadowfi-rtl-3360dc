// Type I saboteur: fault injection on an arbitrary net (stuck-at-0,
// stuck-at-1, single event transient).
//
// The saboteur is spliced into a net between its source and its sink cells:
// net_in comes from the source logic, net_out goes on to the sinks. It is
// purely combinational. While the saboteur is not both selected (s_en) and
// activated (tf_en) the net passes unchanged. When both are high, the shared
// fault-model code c[1:0] picks the behaviour: 00 forces 0, 01 forces 1, and
// 1x inverts the net (a SET lasts exactly as long as tf_en is held high).
// The truth table and the port set are the ones of the published saboteur;
// the use of the shared shadowfi_pkg enum for c is this implementation's.
//
// Ports:  net_in  - value driven by the source logic
//         c       - fault model, shared by all saboteurs of one SBTR
//         s_en    - saboteur selection bit from the SBTR shift register
//         tf_en   - fault activation, shared by all saboteurs
//         net_out - value seen by the sink logic
// Timing: no state, no clock; net_out follows its inputs within one cycle.
module sab_type1
  import shadowfi_pkg::*;
(
  input  logic         net_in,
  input  fault_model_e c,
  input  logic         s_en,
  input  logic         tf_en,
  output logic         net_out
);

  always_comb begin
    net_out = net_in;
    if (s_en && tf_en) begin
      unique case (c)
        FM_SA0:             net_out = 1'b0;
        FM_SA1:             net_out = 1'b1;
        FM_SET, FM_SET_ALT: net_out = ~net_in;
      endcase
    end
  end

endmodule
