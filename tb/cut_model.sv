// Small behavioural design under test for the fault-injection testbenches.
//
// It stands in for an instrumented circuit: N_FF state flip-flops q, each
// with a D and an enable pin routed through a flip-flop saboteur, and
// N_NET = 3 * N_FF internal nets routed through net saboteurs. Per cycle:
//   net j   = 1                                   for j = 0 (a tie-high net
//                                                  that also gates 'done')
//           = q[j % N_FF] ^ x[j % 32] ^ q[(7j+3) % N_FF]   otherwise
//   d[m]    = n[3m+1] ^ (n[3m+2] & n[3m+3])        (indices modulo N_NET,
//                                                  n = nets after saboteurs)
//   en[m]   = (m % 4 != 0) | x[m % 32]
//   y       = all q bits XOR-folded into 32 bits (observed every cycle)
//   done    = 'run' has lasted OP_CYCLES cycles and net 0 (after its
//             saboteur) is 1; a stuck-at-0 there makes the run hang.
// q only changes while run is high and is cleared by rst.
module cut_model #(
  parameter int unsigned N_FF      = 300,
  parameter int unsigned OP_CYCLES = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  logic [31:0]         x,
  output logic [3*N_FF-1:0]   net_pre,
  input  logic [3*N_FF-1:0]   net_post,
  output logic [N_FF-1:0]     ff_d,
  output logic [N_FF-1:0]     ff_en,
  input  logic [N_FF-1:0]     ff_d_post,
  input  logic [N_FF-1:0]     ff_en_post,
  output logic [31:0]         y,
  output logic                done
);
  localparam int unsigned N_NET = 3 * N_FF;

  logic [N_FF-1:0] q;
  int unsigned     ctr;

  always_comb begin
    net_pre[0] = 1'b1;
    for (int j = 1; j < N_NET; j++)
      net_pre[j] = q[j % N_FF] ^ x[j % 32] ^ q[(7 * j + 3) % N_FF];
    for (int m = 0; m < N_FF; m++) begin
      ff_d[m]  = net_post[(3 * m + 1) % N_NET]
               ^ (net_post[(3 * m + 2) % N_NET] & net_post[(3 * m + 3) % N_NET]);
      ff_en[m] = (m % 4 != 0) | x[m % 32];
    end
    y = '0;
    for (int m = 0; m < N_FF; m++) y[m % 32] ^= q[m];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q   <= '0;
      ctr <= 0;
    end else if (run) begin
      for (int m = 0; m < N_FF; m++)
        if (ff_en_post[m]) q[m] <= ff_d_post[m];
      ctr <= ctr + 1;
    end
  end

  assign done = (ctr >= OP_CYCLES) && net_post[0];
endmodule
