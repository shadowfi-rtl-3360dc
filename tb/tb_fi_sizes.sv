// Runs fi_size_check on the larger infrastructure sizes: 6 k, 12 k, 24 k
// and 48 k faults (2, 4, 8 and 16 times the default saboteurs per SBTR,
// chains of 2,410 to 19,210 bits). Each checker injects one fault of every
// model and verifies the saboteur outputs and the chain readback; the
// testbench sums their results.
module tb_fi_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  logic fin[4];
  int   chk[4], fl[4];

  fi_size_check #(.SCALE(2))  u_6k  (.clk, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  fi_size_check #(.SCALE(4))  u_12k (.clk, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  fi_size_check #(.SCALE(8))  u_24k (.clk, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  fi_size_check #(.SCALE(16)) u_48k (.clk, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < 4; i++)
      $display("size %0d k: checks=%0d failures=%0d", 6 << i, chk[i], fl[i]);
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3], fl[0] + fl[1] + fl[2] + fl[3]);
    $finish;
  end
endmodule
