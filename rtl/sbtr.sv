// SBTR: saboteur infrastructure for one instrumented component.
//
// An SBTR groups N_T1 Type I saboteurs (on nets) and N_T2 Type II saboteurs
// (on flip-flops) behind one serial control port. A shift register of
// W = N_T1 + N_T2 + 2 bits holds the whole configuration:
//   sr[W-1:W-2]        fault-model bits C[1:0], shared by all saboteurs
//   sr[N_T1+N_T2-1:0]  saboteur selection bits (SSB), one per saboteur:
//                      sr[i] selects Type I saboteur i, sr[N_T1+m] selects
//                      Type II saboteur m
// The activation input tf_en is shared by every saboteur. Serial data enter
// at the fault-model end (si -> sr[W-1]) and leave from sr[0] (so), so a
// chain of SBTRs is configured by shifting one bit string through all of
// them. The fault-model bits in the two MSBs, the per-saboteur selection
// bits and the shared tf_en are the published architecture; the shift
// direction, the Type I / Type II split inside one register and the
// synchronous active-high reset are this implementation's choices.
//
// Ports:  clk, rst   - clock, synchronous reset (clears every bit: no fault)
//         en         - shift enable; one bit moves per clock while high
//         si, so     - serial input and output of the shift register
//         tf_en      - fault activation, shared
//         t1_*       - the N_T1 spliced nets (in from source, out to sinks)
//         t2_*       - D and enable of the N_T2 instrumented flip-flops
// Timing: the configuration changes one clock edge after en; saboteur
// outputs are combinational in their net inputs and in tf_en. tf_en must be
// low while the register shifts, or partly shifted bits would inject faults.
module sbtr
  import shadowfi_pkg::*;
#(
  parameter int unsigned N_T1 = 180,
  parameter int unsigned N_T2 = 60
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic            si,
  output logic            so,
  input  logic            tf_en,
  input  logic [N_T1-1:0] t1_net_in,
  output logic [N_T1-1:0] t1_net_out,
  input  logic [N_T2-1:0] t2_net_in,
  input  logic [N_T2-1:0] t2_ff_ei,
  output logic [N_T2-1:0] t2_net_out,
  output logic [N_T2-1:0] t2_ff_eo
);

  localparam int unsigned N_SAB = N_T1 + N_T2;
  localparam int unsigned W     = N_SAB + FM_BITS;

  logic [W-1:0]     sr;
  logic [N_SAB-1:0] ssb;
  fault_model_e     fm;

  always_ff @(posedge clk) begin
    if (rst)     sr <= '0;
    else if (en) sr <= {si, sr[W-1:1]};
  end

  assign so  = sr[0];
  assign fm  = fault_model_e'(sr[W-1:W-FM_BITS]);
  assign ssb = sr[N_SAB-1:0];

  for (genvar i = 0; i < N_T1; i++) begin : g_t1
    sab_type1 u_sab (
      .net_in (t1_net_in[i]),
      .c      (fm),
      .s_en   (ssb[i]),
      .tf_en  (tf_en),
      .net_out(t1_net_out[i])
    );
  end

  for (genvar m = 0; m < N_T2; m++) begin : g_t2
    sab_type2 u_sab (
      .net_in (t2_net_in[m]),
      .ff_ei  (t2_ff_ei[m]),
      .c      (fm),
      .s_en   (ssb[N_T1+m]),
      .tf_en  (tf_en),
      .net_out(t2_net_out[m]),
      .ff_eo  (t2_ff_eo[m])
    );
  end

  initial begin
    assert (N_T1 >= 1 && N_T2 >= 1)
      else $error("sbtr: N_T1 and N_T2 must both be at least 1");
  end

endmodule
