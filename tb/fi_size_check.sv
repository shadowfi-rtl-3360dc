// Checker used by tb_fi_sizes: one fault injection infrastructure scaled to
// SCALE times the default number of saboteurs per SBTR (5 SBTRs, 180*SCALE
// net and 60*SCALE flip-flop saboteurs each, i.e. 3,000*SCALE faults).
//
// With random design-side inputs every cycle, it loads one fault of each
// model (stuck-at-0, stuck-at-1, SET, SEU, 3-bit MEU) into a different
// SBTR, the first one into the very last register bit of the chain end,
// runs a short operating window and checks every saboteur output in every
// cycle against the intended fault, plus the readback of the previous
// string after each load. When finished it raises 'finished' and reports
// its check and failure counts.
module fi_size_check #(
  parameter int unsigned SCALE = 1
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  import shadowfi_pkg::*;

  localparam int unsigned N_SBTR = 5;
  localparam int unsigned N_T1   = 180 * SCALE;
  localparam int unsigned N_T2   = 60 * SCALE;
  localparam int unsigned W      = N_T1 + N_T2 + 2;
  localparam int unsigned L      = N_SBTR * W;
  localparam int unsigned NW     = (L + 31) / 32;
  localparam int unsigned N_NET  = N_SBTR * N_T1;
  localparam int unsigned N_FF   = N_SBTR * N_T2;
  localparam int unsigned OP     = 12;

  logic rst, clear, load_start, loading, load_done, cfg_valid, cfg_ready;
  logic [23:0] load_len;
  logic [31:0] cfg_data, rb_data, act_time, duration, cycle;
  logic rb_valid, run_start, run_stop, running, tf_en;
  logic [N_NET-1:0] dut_net_in, dut_net_out;
  logic [N_FF-1:0]  dut_ff_d_in, dut_ff_en_in, dut_ff_d_out, dut_ff_en_out;

  shadowfi_fi_top #(.N_SBTR(N_SBTR), .N_T1(N_T1), .N_T2(N_T2)) dut (.*);

  // pseudo-random design-side values: 32 fresh random bits enter each
  // vector every cycle and the rest shift along
  always_ff @(posedge clk) begin
    dut_net_in   <= {dut_net_in[N_NET-33:0], $urandom};
    dut_ff_d_in  <= {dut_ff_d_in[N_FF-33:0], $urandom};
    dut_ff_en_in <= {dut_ff_en_in[N_FF-33:0], $urandom};
  end

  logic [L-1:0] cur = '0;
  logic [31:0]  rb_q[$];
  always_ff @(posedge clk) if (rb_valid) rb_q.push_back(rb_data);

  task automatic check(logic ok);
    checks++;
    if (!ok) failures++;
  endtask

  task automatic load(logic [L-1:0] s);
    int w;
    rb_q.delete();
    @(negedge clk);
    load_len = 24'(L); load_start = 1'b1;
    @(negedge clk);
    load_start = 1'b0; w = 0;
    while (!load_done) begin
      cfg_valid = (w < NW);
      cfg_data  = 32'(s >> (32 * w));
      #1;
      if (cfg_valid && cfg_ready) w++;
      @(negedge clk);
    end
    cfg_valid = 1'b0;
    @(negedge clk);
    check(rb_q.size() == NW);
    for (int i = 0; i < NW && i < rb_q.size(); i++) begin
      logic [31:0] e;
      e = 32'(cur >> (32 * i));
      if (i == NW - 1 && (L % 32) != 0) e &= (32'h1 << (L % 32)) - 1;
      check(rb_q[i] == e);
    end
    cur = s;
  endtask

  // kind: 0 SA0, 1 SA1, 2 SET, 3 SEU, 4 MEU (3 flip-flops)
  task automatic inject(int kind, int unsigned k, int unsigned idx, int unsigned act, int unsigned dur);
    logic [L-1:0] s;
    int unsigned b, wd;
    s = '0;
    b = (N_SBTR - 1 - k) * W;
    wd = (kind == 4) ? 3 : 1;
    if (kind < 3) begin
      s[b + idx] = 1'b1;
      s[b + W - 1] = (kind == 2);
      s[b + W - 2] = (kind == 1);
    end else
      for (int unsigned i = 0; i < wd; i++) s[b + N_T1 + idx + i] = 1'b1;
    load(s);
    @(negedge clk);
    act_time = act; duration = dur; run_start = 1'b1;
    @(negedge clk);
    run_start = 1'b0;
    for (int unsigned c = 0; c < OP; c++) begin
      logic [N_NET-1:0] en;
      logic [N_FF-1:0]  ed, ee;
      bit act_now;
      act_now = (c >= act) && (dur == 0 || c - act < dur);
      check(tf_en == act_now);
      en = dut_net_in; ed = dut_ff_d_in; ee = dut_ff_en_in;
      if (act_now) begin
        if (kind == 0) en[k * N_T1 + idx] = 1'b0;
        if (kind == 1) en[k * N_T1 + idx] = 1'b1;
        if (kind == 2) en[k * N_T1 + idx] = !dut_net_in[k * N_T1 + idx];
        if (kind >= 3)
          for (int unsigned i = 0; i < wd; i++) begin
            ed[k * N_T2 + idx + i] = !dut_ff_d_in[k * N_T2 + idx + i];
            ee[k * N_T2 + idx + i] = 1'b1;
          end
      end
      check(dut_net_out == en && dut_ff_d_out == ed && dut_ff_en_out == ee);
      @(negedge clk);
    end
    run_stop = 1'b1;
    @(negedge clk);
    run_stop = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    rst = 1; clear = 0; load_start = 0; load_len = '0; cfg_valid = 0; cfg_data = '0;
    act_time = '0; duration = '0; run_start = 0; run_stop = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    inject(0, N_SBTR - 1, 0, 0, 0);                          // chain end, permanent
    inject(1, 0, N_T1 - 1, 2, 0);                            // chain start
    inject(2, 1, $urandom_range(0, N_T1 - 1), 4, 1);
    inject(3, 2, $urandom_range(0, N_T2 - 1), 3, 1);
    inject(4, 3, $urandom_range(0, N_T2 - 3), 5, 1);
    load('0);
    finished = 1;
  end
endmodule
