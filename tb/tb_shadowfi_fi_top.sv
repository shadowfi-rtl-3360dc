// End-to-end testbench of the fault injection infrastructure: a complete
// fault injection campaign against a small design under test (cut_model),
// at the infrastructure's default size (5 SBTRs x (180 net + 60 flip-flop
// saboteurs), a 1,210-bit configuration chain).
//
// The testbench plays the host side: a fault list is generated (stuck-at-0,
// stuck-at-1, SET, SEU and 2..4-bit MEU, spread over all SBTRs, with random
// activation cycles), each fault is turned into its configuration bit
// string, loaded through the controller, and the design is run for its
// operating window. Its per-cycle output is compared with a fault-free
// (golden) run and the fault is classified:
//   DUE    - the design never raised 'done' (timeout),
//   SDC    - some output differs from the golden run,
//   masked - no visible difference.
// Independently of the classification, every cycle of every run checks all
// 900 net and 300 flip-flop saboteur outputs against the expected effect of
// the fault (only the addressed saboteur(s), only in the cycles the fault is
// active, with the fault model's value), checks the controller's cycle
// counter, and every load checks the readback of the previous string.
// Mechanisms that must occur at least once: each fault model, permanent and
// transient activation, every SBTR addressed, host stalls during a load,
// chain clear, masked, SDC and DUE outcomes.
module tb_shadowfi_fi_top;
  import shadowfi_pkg::*;

  localparam int unsigned N_SBTR   = 5;
  localparam int unsigned N_T1     = 180;
  localparam int unsigned N_T2     = 60;
  localparam int unsigned W        = N_T1 + N_T2 + 2;
  localparam int unsigned L        = N_SBTR * W;
  localparam int unsigned NW       = (L + 31) / 32;
  localparam int unsigned N_NET    = N_SBTR * N_T1;
  localparam int unsigned N_FF     = N_SBTR * N_T2;
  localparam int unsigned OP       = 64;   // operating window, cycles
  localparam int unsigned TIMEOUT  = 32;   // extra cycles before a DUE
  localparam int unsigned N_FAULTS = 120;

  typedef enum int {K_SA0, K_SA1, K_SET, K_SEU, K_MEU} kind_e;
  typedef struct {
    int unsigned sbtr;     // SBTR index in the chain
    int unsigned net;      // saboteur index inside the SBTR
    kind_e       kind;
    int unsigned width;    // flip-flops upset together (MEU)
    int unsigned act;      // activation cycle
    int unsigned dur;      // active cycles, 0 = permanent
  } fault_t;

  logic clk = 0, rst;
  logic clear, load_start, loading, load_done, cfg_valid, cfg_ready;
  logic [23:0] load_len;
  logic [31:0] cfg_data, rb_data;
  logic rb_valid;
  logic [31:0] act_time, duration, cycle;
  logic run_start, run_stop, running, tf_en;
  logic [N_NET-1:0] dut_net_in, dut_net_out;
  logic [N_FF-1:0]  dut_ff_d_in, dut_ff_en_in, dut_ff_d_out, dut_ff_en_out;
  logic cut_rst, done;
  logic [31:0] x, y;

  int checks = 0, failures = 0;
  int n_masked = 0, n_sdc = 0, n_due = 0;
  int n_kind[5] = '{default: 0};
  int n_sbtr[N_SBTR] = '{default: 0};
  int n_perm = 0, n_trans = 0, n_stall = 0, n_clear = 0, n_readback = 0;

  shadowfi_fi_top dut (.*);

  cut_model #(.N_FF(N_FF), .OP_CYCLES(OP)) u_cut (
    .clk, .rst(cut_rst), .run(running), .x,
    .net_pre(dut_net_in), .net_post(dut_net_out),
    .ff_d(dut_ff_d_in), .ff_en(dut_ff_en_in),
    .ff_d_post(dut_ff_d_out), .ff_en_post(dut_ff_en_out),
    .y, .done
  );

  // stimulus: a fixed pseudo-random word per cycle of the window
  always_comb x = (cycle * 32'h9E37_79B9) ^ ((cycle + 32'd17) * 32'h85EB_CA6B >> 7);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ bit strings
  logic [L-1:0] cur_string = '0;   // what the chain should hold

  function automatic int unsigned sbtr_base(int unsigned k);
    return (N_SBTR - 1 - k) * W;
  endfunction

  function automatic logic [L-1:0] fault_string(fault_t f);
    logic [L-1:0] s;
    int unsigned  b;
    s = '0;
    b = sbtr_base(f.sbtr);
    case (f.kind)
      K_SA0: begin s[b + f.net] = 1'b1; s[b + W - 1] = 1'b0; s[b + W - 2] = 1'b0; end
      K_SA1: begin s[b + f.net] = 1'b1; s[b + W - 1] = 1'b0; s[b + W - 2] = 1'b1; end
      K_SET: begin s[b + f.net] = 1'b1; s[b + W - 1] = 1'b1; s[b + W - 2] = 1'($urandom); end
      default:
        for (int unsigned i = 0; i < f.width; i++) s[b + N_T1 + f.net + i] = 1'b1;
    endcase
    return s;
  endfunction

  logic [31:0] rb_q[$];
  always_ff @(posedge clk) if (rb_valid) rb_q.push_back(rb_data);

  task automatic load_string(logic [L-1:0] s);
    int w, guard;
    bit stalled;
    rb_q.delete();
    @(negedge clk);
    load_len   = 24'(L);
    load_start = 1'b1;
    @(negedge clk);
    load_start = 1'b0;
    w = 0; guard = 0; stalled = 0;
    while (!load_done && guard < 4 * L) begin
      if (w < NW && !(cfg_ready && $urandom_range(0, 7) == 0)) begin
        cfg_valid = 1'b1;
        cfg_data  = 32'(s >> (32 * w));
      end else begin
        if (w < NW) stalled = 1;
        cfg_valid = 1'b0;
      end
      #1;
      if (cfg_valid && cfg_ready) w++;
      @(negedge clk);
      guard++;
    end
    cfg_valid = 1'b0;
    @(negedge clk);
    if (stalled) n_stall++;
    check("load finished", 64'(load_done || guard < 4 * L), 64'(1));
    check("readback count", 64'(rb_q.size()), 64'(NW));
    for (int i = 0; i < NW && i < rb_q.size(); i++) begin
      logic [31:0] e;
      e = 32'(cur_string >> (32 * i));
      if (i == NW - 1 && (L % 32) != 0) e &= (32'h1 << (L % 32)) - 1;
      check("readback word", 64'(rb_q[i]), 64'(e));
    end
    n_readback++;
    cur_string = s;
  endtask

  task automatic clear_chain();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    cur_string = '0;
    n_clear++;
  endtask

  // ------------------------------------------------------------ one run
  logic [31:0] golden_y[OP];

  // Runs the window; f_valid = 0 for a fault-free run. Returns the outcome:
  // 0 masked, 1 SDC, 2 DUE.
  task automatic run_window(bit f_valid, fault_t f, bit record, output int outcome);
    bit mismatch, finished;
    int unsigned k;
    @(negedge clk);
    cut_rst   = 1'b1;
    @(negedge clk);
    cut_rst   = 1'b0;
    act_time  = f_valid ? f.act : '1;   // fault-free: never activate
    duration  = f_valid ? f.dur : 32'd0;
    run_start = 1'b1;
    @(negedge clk);
    run_start = 1'b0;
    mismatch = 0; finished = 0;
    for (k = 0; k < OP + TIMEOUT; k++) begin
      bit active;
      logic [N_NET-1:0] e_net;
      logic [N_FF-1:0]  e_d, e_en;
      int unsigned gn;
      check("cycle counter", 64'(cycle), 64'(k));
      active = f_valid && (k >= f.act) && (f.dur == 0 || k - f.act < f.dur);
      check("tf_en", 64'(tf_en), 64'(active));
      e_net = dut_net_in;
      e_d   = dut_ff_d_in;
      e_en  = dut_ff_en_in;
      if (active) begin
        case (f.kind)
          K_SA0: e_net[f.sbtr * N_T1 + f.net] = 1'b0;
          K_SA1: e_net[f.sbtr * N_T1 + f.net] = 1'b1;
          K_SET: begin
            gn = f.sbtr * N_T1 + f.net;
            e_net[gn] = !dut_net_in[gn];
          end
          default:
            for (int unsigned i = 0; i < f.width; i++) begin
              gn = f.sbtr * N_T2 + f.net + i;
              e_d[gn]  = !dut_ff_d_in[gn];
              e_en[gn] = 1'b1;
            end
        endcase
      end
      checks++;
      if (dut_net_out !== e_net || dut_ff_d_out !== e_d || dut_ff_en_out !== e_en) begin
        failures++;
        if (failures < 20) $display("FAIL saboteur outputs at cycle %0d", k);
      end
      if (k < OP) begin
        if (record) golden_y[k] = y;
        else if (y !== golden_y[k]) mismatch = 1;
      end
      if (k >= OP && done) begin
        finished = 1;
        break;
      end
      @(negedge clk);
    end
    run_stop = 1'b1;
    @(negedge clk);
    run_stop = 1'b0;
    outcome = !finished ? 2 : mismatch ? 1 : 0;
  endtask

  // ------------------------------------------------------------ campaign
  initial begin
    int outcome;
    fault_t f, none;
    rst = 1; clear = 0; load_start = 0; load_len = '0; cfg_valid = 0;
    cfg_data = '0; act_time = '0; duration = '0; run_start = 0; run_stop = 0;
    cut_rst = 1;
    none = '{sbtr: 0, net: 0, kind: K_SA0, width: 1, act: 0, dur: 0};
    repeat (3) @(negedge clk);
    rst = 0;

    // golden run on a freshly reset (empty) chain
    run_window(1'b0, none, 1'b1, outcome);
    check("golden run completes", 64'(outcome), 64'(0));
    // a second fault-free run must match it
    run_window(1'b0, none, 1'b0, outcome);
    check("fault-free run is masked", 64'(outcome), 64'(0));

    for (int n = 0; n < N_FAULTS; n++) begin
      f.kind  = kind_e'(n % 5);
      f.sbtr  = (n / 5) % N_SBTR;
      f.width = (f.kind == K_MEU) ? $urandom_range(2, 4) : 1;
      if (f.kind inside {K_SA0, K_SA1, K_SET})
        f.net = $urandom_range(0, N_T1 - 1);
      else
        f.net = $urandom_range(0, N_T2 - f.width);
      // the first stuck-at-0 hits the tie-high net that gates 'done'
      if (n == 0) f.net = 0;
      if (f.kind inside {K_SA0, K_SA1} && n % 3 != 2) begin
        f.act = 0; f.dur = 0;                   // permanent from cycle 0
      end else if (f.kind inside {K_SA0, K_SA1}) begin
        f.act = $urandom_range(0, OP - 1); f.dur = 0;
      end else begin
        f.act = $urandom_range(0, OP - 1); f.dur = 1;  // transient
      end
      load_string(fault_string(f));
      run_window(1'b1, f, 1'b0, outcome);
      n_kind[f.kind]++;
      n_sbtr[f.sbtr]++;
      if (f.dur == 0) n_perm++; else n_trans++;
      case (outcome)
        0: n_masked++;
        1: n_sdc++;
        default: n_due++;
      endcase
      // every few faults: clear the chain and verify the design is clean
      if (n % 25 == 24) begin
        clear_chain();
        run_window(1'b0, none, 1'b0, outcome);
        check("run after clear is masked", 64'(outcome), 64'(0));
      end
    end
    // the last loaded string is read back by one more load of zeros
    load_string('0);

    $display("campaign: %0d faults  masked=%0d SDC=%0d DUE=%0d",
             N_FAULTS, n_masked, n_sdc, n_due);
    $display("models: SA0=%0d SA1=%0d SET=%0d SEU=%0d MEU=%0d  permanent=%0d transient=%0d",
             n_kind[K_SA0], n_kind[K_SA1], n_kind[K_SET], n_kind[K_SEU], n_kind[K_MEU],
             n_perm, n_trans);
    $display("loads=%0d with stalls=%0d clears=%0d", n_readback, n_stall, n_clear);
    for (int i = 0; i < 5; i++) check("fault model exercised", 64'(n_kind[i] > 0), 64'(1));
    for (int i = 0; i < N_SBTR; i++) check("SBTR addressed", 64'(n_sbtr[i] > 0), 64'(1));
    check("permanent faults", 64'(n_perm > 0), 64'(1));
    check("transient faults", 64'(n_trans > 0), 64'(1));
    check("stalled loads", 64'(n_stall > 0), 64'(1));
    check("chain clears", 64'(n_clear > 0), 64'(1));
    check("masked outcome", 64'(n_masked > 0), 64'(1));
    check("SDC outcome", 64'(n_sdc > 0), 64'(1));
    check("DUE outcome", 64'(n_due > 0), 64'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
