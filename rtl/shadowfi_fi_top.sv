// Fault injection infrastructure of an instrumented design: the FIC and a
// chain of SBTR modules behind one Fault Injection Port (FIP).
//
// Saboteur insertion splits selected nets and flip-flop inputs of a design
// under test (DUT) and routes every instrumented component's SBTR into one
// scan chain, so a single serial port configures any number of saboteurs.
// This module is that infrastructure without the DUT itself: N_SBTR SBTR
// modules, each with N_T1 net saboteurs and N_T2 flip-flop saboteurs, are
// chained FIC -> SBTR 0 -> SBTR 1 -> ... -> SBTR N_SBTR-1 -> FIC, and all
// of them share the controller's tf_en. The DUT's spliced nets and
// flip-flop D/enable pins are brought out as flat ports; the DUT connects
// its source logic to the *_in ports and its sinks / flip-flops to the
// *_out ports.
//
// Chain layout. The chain is L = N_SBTR * (N_T1 + N_T2 + 2) bits long. Bit b
// of the configuration string (b = 0 is shifted first) ends up in
//   SBTR k = N_SBTR-1 - b / W,  register bit i = b % W,  W = N_T1 + N_T2 + 2
// so SBTR k owns string bits [Bit_start, Bit_end] with
// Bit_start = (N_SBTR-1-k) * W and Bit_end = Bit_start + W - 1; net j of the
// component (Type I for j < N_T1, Type II after) is bit Bit_start + j, and
// the fault-model bits C0, C1 are bits Bit_end-1 and Bit_end.
// Port-vector index: Type I saboteur j of SBTR k is net k*N_T1 + j, Type II
// saboteur m of SBTR k is flip-flop k*N_T2 + m.
//
// Defaults: five instrumented components as in the published placement
// example, each with 180 net and 60 flip-flop saboteurs, i.e. 5 * (180*3 +
// 60) = 3,000 distinct single faults (stuck-at-0, stuck-at-1 and SET per
// net, SEU per flip-flop), the size of the smallest infrastructure the
// document evaluates. The split between net and flip-flop saboteurs, and
// the per-fault counting, are this implementation's choice.
//
// Host ports and timing are those of the FIC; see fic.sv.
module shadowfi_fi_top
  import shadowfi_pkg::*;
#(
  parameter int unsigned N_SBTR = 5,
  parameter int unsigned N_T1   = 180,
  parameter int unsigned N_T2   = 60,
  parameter int unsigned LEN_W  = 24,
  parameter int unsigned TIME_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  // host side of the FIC
  input  logic                     clear,
  input  logic                     load_start,
  input  logic [LEN_W-1:0]         load_len,
  output logic                     loading,
  output logic                     load_done,
  input  logic                     cfg_valid,
  output logic                     cfg_ready,
  input  logic [CFG_WORD_W-1:0]    cfg_data,
  output logic                     rb_valid,
  output logic [CFG_WORD_W-1:0]    rb_data,
  input  logic [TIME_W-1:0]        act_time,
  input  logic [TIME_W-1:0]        duration,
  input  logic                     run_start,
  input  logic                     run_stop,
  output logic                     running,
  output logic [TIME_W-1:0]        cycle,
  output logic                     tf_en,
  // instrumented nets of the design under test
  input  logic [N_SBTR*N_T1-1:0]   dut_net_in,
  output logic [N_SBTR*N_T1-1:0]   dut_net_out,
  // instrumented flip-flops of the design under test
  input  logic [N_SBTR*N_T2-1:0]   dut_ff_d_in,
  input  logic [N_SBTR*N_T2-1:0]   dut_ff_en_in,
  output logic [N_SBTR*N_T2-1:0]   dut_ff_d_out,
  output logic [N_SBTR*N_T2-1:0]   dut_ff_en_out
);

  logic            fip_rst, fip_en, fip_si, fip_so, fip_tf_en;
  logic [N_SBTR:0] chain;   // chain[k] is the serial input of SBTR k

  fic #(
    .LEN_W (LEN_W),
    .TIME_W(TIME_W)
  ) u_fic (
    .clk       (clk),
    .rst       (rst),
    .clear     (clear),
    .load_start(load_start),
    .load_len  (load_len),
    .loading   (loading),
    .load_done (load_done),
    .cfg_valid (cfg_valid),
    .cfg_ready (cfg_ready),
    .cfg_data  (cfg_data),
    .rb_valid  (rb_valid),
    .rb_data   (rb_data),
    .act_time  (act_time),
    .duration  (duration),
    .run_start (run_start),
    .run_stop  (run_stop),
    .running   (running),
    .cycle     (cycle),
    .fip_rst   (fip_rst),
    .fip_en    (fip_en),
    .fip_si    (fip_si),
    .fip_so    (fip_so),
    .fip_tf_en (fip_tf_en)
  );

  assign chain[0] = fip_si;
  assign fip_so   = chain[N_SBTR];
  assign tf_en    = fip_tf_en;

  for (genvar k = 0; k < N_SBTR; k++) begin : g_sbtr
    sbtr #(
      .N_T1(N_T1),
      .N_T2(N_T2)
    ) u_sbtr (
      .clk       (clk),
      .rst       (fip_rst),
      .en        (fip_en),
      .si        (chain[k]),
      .so        (chain[k+1]),
      .tf_en     (fip_tf_en),
      .t1_net_in (dut_net_in   [k*N_T1 +: N_T1]),
      .t1_net_out(dut_net_out  [k*N_T1 +: N_T1]),
      .t2_net_in (dut_ff_d_in  [k*N_T2 +: N_T2]),
      .t2_ff_ei  (dut_ff_en_in [k*N_T2 +: N_T2]),
      .t2_net_out(dut_ff_d_out [k*N_T2 +: N_T2]),
      .t2_ff_eo  (dut_ff_en_out[k*N_T2 +: N_T2])
    );
  end

endmodule
