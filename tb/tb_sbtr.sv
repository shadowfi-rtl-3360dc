// Self-checking testbench for sbtr (shift-register-controlled saboteur group).
// A small instance (5 net saboteurs, 3 flip-flop saboteurs, 10-bit register)
// is driven through many rounds of:
//   - shifting a random 10-bit configuration in through si, with random
//     pauses (en low) in between; the bits leaving through so must be the
//     ones shifted in 10 shifts earlier;
//   - applying random net / flip-flop inputs and random tf_en and comparing
//     every output with the saboteur tables, where the configuration is
//     taken from the order of the shifted bits: the i-th bit shifted in
//     selects saboteur i, the last two are C0 and C1.
// Reset must clear every selection. The watchdog ends a stuck run.
module tb_sbtr;
  import shadowfi_pkg::*;

  localparam int unsigned N_T1 = 5;
  localparam int unsigned N_T2 = 3;
  localparam int unsigned W    = N_T1 + N_T2 + 2;

  logic clk = 0, rst, en, si, so, tf_en;
  logic [N_T1-1:0] t1_net_in, t1_net_out;
  logic [N_T2-1:0] t2_net_in, t2_ff_ei, t2_net_out, t2_ff_eo;
  int checks = 0, failures = 0;

  sbtr #(.N_T1(N_T1), .N_T2(N_T2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // history of shifted bits: hist[0] is the most recent
  logic [W-1:0] cfg;      // cfg[i] = configuration bit held by register bit i
  logic [W-1:0] old_cfg;

  task automatic apply_and_check(int n);
    for (int r = 0; r < n; r++) begin
      logic [N_T1-1:0] e1;
      logic [N_T2-1:0] ed, ee;
      logic [1:0]      fm;
      t1_net_in = N_T1'($urandom);
      t2_net_in = N_T2'($urandom);
      t2_ff_ei  = N_T2'($urandom);
      tf_en     = $urandom_range(0, 1);
      #1;
      fm = {cfg[W-1], cfg[W-2]};
      for (int i = 0; i < N_T1; i++) begin
        if (tf_en && cfg[i])
          e1[i] = (fm == 2'b00) ? 1'b0 : (fm == 2'b01) ? 1'b1 : !t1_net_in[i];
        else
          e1[i] = t1_net_in[i];
      end
      for (int m = 0; m < N_T2; m++) begin
        ed[m] = (tf_en && cfg[N_T1+m]) ? !t2_net_in[m] : t2_net_in[m];
        ee[m] = (tf_en && cfg[N_T1+m]) ? 1'b1 : t2_ff_ei[m];
      end
      check("t1_net_out", 32'(t1_net_out), 32'(e1));
      check("t2_net_out", 32'(t2_net_out), 32'(ed));
      check("t2_ff_eo",   32'(t2_ff_eo),   32'(ee));
    end
    tf_en = 1'b0;
  endtask

  initial begin
    rst = 1; en = 0; si = 0; tf_en = 0;
    t1_net_in = '0; t2_net_in = '0; t2_ff_ei = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    cfg = '0;
    apply_and_check(8);   // after reset nothing is selected

    for (int round = 0; round < 200; round++) begin
      logic [W-1:0] nxt;
      nxt     = W'($urandom);
      // make a fair share of rounds select exactly one saboteur
      if (round % 2 == 0) begin
        nxt[W-3:0] = '0;
        nxt[$urandom_range(0, W-3)] = 1'b1;
      end
      @(negedge clk);
      old_cfg = cfg;
      tf_en   = 1'b0;
      for (int s = 0; s < W; s++) begin
        // random pause: configuration must hold while en is low
        if ($urandom_range(0, 3) == 0) begin
          en = 1'b0;
          @(negedge clk);
        end
        en = 1'b1;
        si = nxt[s];
        #1;
        check("so", 32'(so), 32'(old_cfg[s]));
        @(negedge clk);
      end
      en  = 1'b0;
      cfg = nxt;
      apply_and_check(6);
    end

    // synchronous reset clears the register
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    cfg = '0;
    apply_and_check(8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
