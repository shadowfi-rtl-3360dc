// FIC: fault injection controller driving the Fault Injection Port (FIP).
//
// The FIP of an instrumented design is one serial scan chain of SBTR shift
// registers plus a shared fault-activation line: tf_en, si, en, rst and so.
// The controller turns two host operations into FIP activity:
//
//  * Load: the host gives the chain length in bits (load_len) and pulses
//    load_start, then streams the configuration bit string as 32-bit words
//    on a valid/ready port, least significant bit first. The first bit sent
//    ends up at the far end of the chain. The controller shifts one bit per
//    clock with fip_en high, stalling (fip_en low) whenever no word is
//    available. Every bit that falls out of the chain end (fip_so) is
//    returned on the readback port, packed the same way, so the previous
//    configuration can be checked. load_done pulses after the last shift.
//  * Run: run_start marks the first cycle of the design's operating window.
//    From then on a cycle counter k runs (k = 0 in the first clock cycle
//    after run_start), and fip_tf_en is high for act_time <= k <
//    act_time + duration. duration = 0 means a permanent fault, held until
//    run_stop. The values are sampled at run_start.
//
// clear resets every SBTR register (no saboteur selected) through fip_rst.
// Load requests are ignored while running and run requests while loading,
// so tf_en is never high while the chain shifts.
//
// The document states only that this controller configures the saboteur
// chain and activates faults at a given cycle for a given number of cycles.
// The word-stream host port, the readback, the permanent-fault encoding and
// all timing details here are this implementation's own.
//
// Timing: one chain bit per clock with no bubble between words while the
// host keeps cfg_valid high; a load of L bits takes L cycles after the first
// word is accepted. fip_tf_en is registered.
module fic
  import shadowfi_pkg::*;
#(
  parameter int unsigned LEN_W  = 24,
  parameter int unsigned TIME_W = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  // host control
  input  logic                  clear,
  input  logic                  load_start,
  input  logic [LEN_W-1:0]      load_len,
  output logic                  loading,
  output logic                  load_done,
  input  logic                  cfg_valid,
  output logic                  cfg_ready,
  input  logic [CFG_WORD_W-1:0] cfg_data,
  output logic                  rb_valid,
  output logic [CFG_WORD_W-1:0] rb_data,
  input  logic [TIME_W-1:0]     act_time,
  input  logic [TIME_W-1:0]     duration,
  input  logic                  run_start,
  input  logic                  run_stop,
  output logic                  running,
  output logic [TIME_W-1:0]     cycle,
  // fault injection port
  output logic                  fip_rst,
  output logic                  fip_en,
  output logic                  fip_si,
  input  logic                  fip_so,
  output logic                  fip_tf_en
);

  localparam int unsigned WCNT_W = $clog2(CFG_WORD_W + 1);

  // ---------------------------------------------------------------- load
  logic [CFG_WORD_W-1:0] sbuf;       // bits waiting to be shifted
  logic [WCNT_W-1:0]     sbuf_cnt;   // valid bits in sbuf
  logic [LEN_W-1:0]      req_left;   // bits not yet taken from the host
  logic [LEN_W-1:0]      shift_left; // bits not yet shifted into the chain
  logic [CFG_WORD_W-2:0] rb_acc;     // readback bits, newest at the MSB
  logic [WCNT_W-1:0]     rb_cnt;
  logic                  accept;
  logic [WCNT_W-1:0]     take;
  logic [CFG_WORD_W-1:0] rb_next;

  assign fip_en    = loading && (sbuf_cnt != '0);
  assign fip_si    = sbuf[0];
  assign cfg_ready = loading && (req_left != '0) && (sbuf_cnt <= WCNT_W'(1));
  assign accept    = cfg_valid && cfg_ready;
  assign take      = (req_left >= LEN_W'(CFG_WORD_W)) ? WCNT_W'(CFG_WORD_W)
                                                      : WCNT_W'(req_left);
  assign rb_next   = {fip_so, rb_acc};
  assign fip_rst   = rst || clear;

  always_ff @(posedge clk) begin
    if (rst) begin
      loading    <= 1'b0;
      load_done  <= 1'b0;
      sbuf       <= '0;
      sbuf_cnt   <= '0;
      req_left   <= '0;
      shift_left <= '0;
      rb_acc     <= '0;
      rb_cnt     <= '0;
      rb_valid   <= 1'b0;
      rb_data    <= '0;
    end else begin
      load_done <= 1'b0;
      rb_valid  <= 1'b0;
      if (!loading) begin
        if (load_start && !running && load_len != '0) begin
          loading    <= 1'b1;
          req_left   <= load_len;
          shift_left <= load_len;
          sbuf_cnt   <= '0;
          rb_cnt     <= '0;
        end
      end else begin
        // shift register of pending bits, refilled from the host
        if (accept) begin
          sbuf     <= cfg_data;
          sbuf_cnt <= take;
          req_left <= req_left - LEN_W'(take);
        end else if (fip_en) begin
          sbuf     <= sbuf >> 1;
          sbuf_cnt <= sbuf_cnt - 1'b1;
        end
        if (fip_en) begin
          shift_left <= shift_left - 1'b1;
          rb_acc     <= rb_next[CFG_WORD_W-1:1];
          rb_cnt     <= rb_cnt + 1'b1;
          if (rb_cnt == WCNT_W'(CFG_WORD_W - 1)) begin
            rb_valid <= 1'b1;
            rb_data  <= rb_next;
            rb_cnt   <= '0;
          end else if (shift_left == LEN_W'(1)) begin
            rb_valid <= 1'b1;
            rb_data  <= rb_next >> (CFG_WORD_W - 1 - 32'(rb_cnt));
          end
          if (shift_left == LEN_W'(1)) begin
            loading   <= 1'b0;
            load_done <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- run
  logic [TIME_W-1:0] act_q, dur_q;

  function automatic logic fault_on(input logic [TIME_W-1:0] k,
                                    input logic [TIME_W-1:0] a,
                                    input logic [TIME_W-1:0] d);
    return (k >= a) && ((d == '0) || ((k - a) < d));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      cycle     <= '0;
      act_q     <= '0;
      dur_q     <= '0;
      fip_tf_en <= 1'b0;
    end else if (run_stop) begin
      running   <= 1'b0;
      fip_tf_en <= 1'b0;
    end else if (run_start && !loading) begin
      running   <= 1'b1;
      cycle     <= '0;
      act_q     <= act_time;
      dur_q     <= duration;
      fip_tf_en <= fault_on('0, act_time, duration);
    end else if (running) begin
      if (cycle != '1) cycle <= cycle + 1'b1;
      fip_tf_en <= fault_on(cycle + 1'b1, act_q, dur_q);
    end
  end

  // The chain must never shift while a fault is active.
  a_no_shift_when_active : assert property (@(posedge clk) disable iff (rst)
    !(fip_en && fip_tf_en));

endmodule
