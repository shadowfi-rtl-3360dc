// Self-checking testbench for fic (fault injection controller).
// The saboteur chain is replaced by a plain L-bit shift register model
// (chain[L-1] receives fip_si, chain[0] drives fip_so, fip_rst clears it).
// Checked:
//   - a load of L bits leaves the string in the chain with bit b at chain[b];
//   - the readback words carry the previous chain content, same packing;
//   - with the host always ready the load takes exactly L shift cycles and
//     load_done comes L + 2 cycles after load_start; with random gaps in
//     cfg_valid the controller stalls (fip_en low) and still loads correctly;
//   - clear empties the chain;
//   - fip_tf_en is high exactly in cycles act_time .. act_time+duration-1 of
//     the operating window (cycle k = 0 is the first cycle after run_start),
//     permanently for duration = 0 until run_stop, and the cycle counter
//     counts k;
//   - load requests are ignored while running.
module tb_fic;
  import shadowfi_pkg::*;

  localparam int unsigned L      = 75;
  localparam int unsigned LEN_W  = 24;
  localparam int unsigned TIME_W = 32;
  localparam int unsigned NW     = (L + 31) / 32;

  logic clk = 0, rst;
  logic clear, load_start, loading, load_done;
  logic [LEN_W-1:0] load_len;
  logic cfg_valid, cfg_ready;
  logic [31:0] cfg_data;
  logic rb_valid;
  logic [31:0] rb_data;
  logic [TIME_W-1:0] act_time, duration, cycle;
  logic run_start, run_stop, running;
  logic fip_rst, fip_en, fip_si, fip_so, fip_tf_en;
  int checks = 0, failures = 0;
  int stalls = 0;

  fic #(.LEN_W(LEN_W), .TIME_W(TIME_W)) dut (.*);

  // chain model
  logic [L-1:0] chain;
  always_ff @(posedge clk) begin
    if (fip_rst)     chain <= '0;
    else if (fip_en) chain <= {fip_si, chain[L-1:1]};
  end
  assign fip_so = chain[0];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // readback collection
  logic [31:0] rb_words[$];
  always_ff @(posedge clk) if (rb_valid) rb_words.push_back(rb_data);
  always_ff @(posedge clk) if (loading && !fip_en) stalls++;

  // Load one bit string; gaps > 0 inserts random idle cycles on cfg_valid.
  task automatic load(logic [L-1:0] bits, bit gaps, output int cycles_to_done);
    logic [L-1:0] prev_chain;
    int w, cyc, shifts, held;
    prev_chain = chain;
    rb_words.delete();
    @(negedge clk);
    load_len   = LEN_W'(L);
    load_start = 1'b1;
    @(negedge clk);
    load_start = 1'b0;
    cyc = 1; w = 0; shifts = 0; held = 0;
    while (!load_done) begin
      // in gap mode every word is withheld for at least one cycle in which
      // the controller is ready, plus random extra idle cycles
      if (gaps && cfg_ready && (held == 0 || $urandom_range(0, 2) == 0)) begin
        held++;
        cfg_valid = 1'b0;
        cfg_data  = $urandom;
      end else if (w < NW) begin
        cfg_valid = 1'b1;
        cfg_data  = 32'(bits >> (32 * w));
      end else begin
        cfg_valid = 1'b0;
        cfg_data  = $urandom;
      end
      #1;
      if (cfg_valid && cfg_ready) begin
        w++;
        held = 0;
      end
      if (fip_en) shifts++;
      @(negedge clk);
      cyc++;
    end
    cfg_valid = 1'b0;
    cycles_to_done = cyc;
    @(negedge clk);  // let the last readback word be collected
    check("shift count", 64'(shifts), 64'(L));
    check("chain content", 64'(chain), 64'(bits));
    check("chain content hi", 64'(chain >> 64), 64'(bits >> 64));
    check("readback words", 64'(rb_words.size()), 64'(NW));
    for (int i = 0; i < NW && i < rb_words.size(); i++) begin
      logic [31:0] exp;
      exp = 32'(prev_chain >> (32 * i));
      if (i == NW - 1 && (L % 32) != 0) exp &= (32'h1 << (L % 32)) - 1;
      check("readback", 64'(rb_words[i]), 64'(exp));
    end
  endtask

  // Run an operating window of n cycles and check fip_tf_en / cycle.
  task automatic run(int unsigned a, int unsigned d, int n, int stop_at);
    int on_cycles;
    on_cycles = 0;
    @(negedge clk);
    act_time  = a;
    duration  = d;
    run_start = 1'b1;
    @(negedge clk);
    run_start = 1'b0;
    for (int k = 0; k < n; k++) begin
      logic exp;
      if (k == stop_at) begin
        run_stop = 1'b1;
        @(negedge clk);
        run_stop = 1'b0;
        check("stopped", 64'(running), 64'(0));
        check("tf off after stop", 64'(fip_tf_en), 64'(0));
        return;
      end
      exp = (k >= a) && (d == 0 || k - a < d);
      check("tf_en", 64'(fip_tf_en), 64'(exp));
      check("cycle", 64'(cycle), 64'(k));
      if (fip_tf_en) on_cycles++;
      // a load request during the run must be ignored
      if (k == 2) load_start = 1'b1;
      @(negedge clk);
      load_start = 1'b0;
      check("no load while running", 64'(loading), 64'(0));
    end
    if (d != 0 && a + d <= n) check("active cycles", 64'(on_cycles), 64'(d));
    run_stop = 1'b1;
    @(negedge clk);
    run_stop = 1'b0;
  endtask

  initial begin
    int t;
    logic [L-1:0] s1, s2;
    rst = 1; clear = 0; load_start = 0; load_len = '0; cfg_valid = 0;
    cfg_data = '0; act_time = '0; duration = '0; run_start = 0; run_stop = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check("chain after reset", 64'(chain), 64'(0));

    s1 = {11'($urandom), 32'($urandom), 32'($urandom)};
    s2 = {11'($urandom), 32'($urandom), 32'($urandom)};

    // back-to-back load: L shifts, done L+2 cycles after load_start
    load(s1, 1'b0, t);
    check("load latency", 64'(t), 64'(L + 2));
    // stalled load; readback must return s1
    load(s2, 1'b1, t);
    check("stalled load is slower", 64'(t > L + 2), 64'(1));
    // several random loads with gaps
    for (int r = 0; r < 6; r++) begin
      s1 = {11'($urandom), 32'($urandom), 32'($urandom)};
      load(s1, r[0], t);
    end

    // clear
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check("chain after clear", 64'(chain), 64'(0));

    // transient faults (1 cycle), multi-cycle, permanent, stopped early
    run(5, 1, 12, -1);
    run(0, 1, 6, -1);
    run(7, 3, 15, -1);
    run(0, 0, 20, -1);
    run(3, 0, 30, 10);
    for (int r = 0; r < 10; r++)
      run($urandom_range(0, 20), $urandom_range(0, 5), 30, -1);

    check("stalls seen", 64'(stalls > 0), 64'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
