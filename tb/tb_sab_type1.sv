// Self-checking testbench for sab_type1 (net saboteur).
// Walks all 32 combinations of net_in, c[1:0], s_en and tf_en and compares
// net_out with the saboteur truth table written out here independently:
// no effect unless s_en and tf_en are both high; then 00 -> 0, 01 -> 1,
// 1x -> inverted input.
module tb_sab_type1;
  import shadowfi_pkg::*;

  logic         net_in, s_en, tf_en, net_out;
  fault_model_e c;
  int checks = 0, failures = 0;

  sab_type1 dut (.net_in, .c, .s_en, .tf_en, .net_out);

  function automatic logic expected(logic n, logic [1:0] cc, logic s, logic t);
    if (!(s && t))      return n;
    if (cc == 2'b00)    return 1'b0;
    if (cc == 2'b01)    return 1'b1;
    return !n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      net_in = v[0];
      c      = fault_model_e'(v[2:1]);
      s_en   = v[3];
      tf_en  = v[4];
      #1;
      checks++;
      if (net_out !== expected(v[0], v[2:1], v[3], v[4])) begin
        failures++;
        $display("FAIL in=%b c=%b s_en=%b tf_en=%b out=%b", net_in, c, s_en, tf_en, net_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
