// Self-checking testbench for sab_type2 (flip-flop SEU saboteur).
// Part 1 walks all input combinations and compares D / enable with the
// table: pass-through unless s_en and tf_en are high, then D inverted and
// enable forced to 1 whatever c is.
// Part 2 places the saboteur in front of an enable flip-flop that holds its
// value (enable low, D = Q) and checks that a single cycle of tf_en flips
// the stored bit exactly once and that it then stays flipped.
module tb_sab_type2;
  import shadowfi_pkg::*;

  logic         clk = 0;
  logic         net_in, ff_ei, s_en, tf_en, net_out, ff_eo;
  fault_model_e c;
  logic         q, stim_in, part2 = 1'b0;
  int checks = 0, failures = 0;

  sab_type2 dut (.net_in, .ff_ei, .c, .s_en, .tf_en, .net_out, .ff_eo);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic inj;
    for (int v = 0; v < 64; v++) begin
      stim_in = v[0];
      ff_ei  = v[1];
      c      = fault_model_e'(v[3:2]);
      s_en   = v[4];
      tf_en  = v[5];
      #1;
      inj = v[4] & v[5];
      check("d",  net_out, inj ? !v[0] : v[0]);
      check("en", ff_eo,   inj ? 1'b1  : v[1]);
    end

    // Part 2: flip-flop that holds its value; the SEU must flip it once.
    part2 = 1'b1;
    s_en  = 1'b1;
    tf_en = 1'b0;
    c     = FM_SA0;
    ff_ei = 1'b0;
    @(negedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      logic prev_q;
      prev_q = q;
      tf_en  = 1'b1;
      @(negedge clk);
      tf_en  = 1'b0;
      check("seu flips", q, !prev_q);
      repeat (3) @(negedge clk);
      check("seu holds", q, !prev_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instrumented flip-flop: holds Q unless enabled
  initial q = 1'b0;
  always_comb net_in = part2 ? q : stim_in;
  always_ff @(posedge clk) if (ff_eo) q <= net_out;
endmodule
