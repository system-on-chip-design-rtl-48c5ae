// keccak_round: the state register and one iterated Keccak-f[1600] round.
//
// Each cycle with run_i set the register is replaced by
//   iota(chi(pi(rho(theta(in)))))  for round round_i,
// where "in" is chosen by the 2x1 round-input multiplexer: with absorb_i set
// it is the state XOR the padded rate block (block_i into lanes 0..RATE/64-1),
// otherwise it is the register itself, i.e. the iota output of the previous
// cycle fed back to theta. init_i makes the state read as zero in that
// cycle, which starts a new message without a separate clearing cycle.
// One round per clock: a permutation takes 24 cycles.
//
// Following the architecture, the round is built from one module per step
// (keccak_theta .. keccak_iota). Reset clears the state.
module keccak_round
  import keccak_pkg::*;
#(
  parameter int RATE = 576
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run_i,
  input  logic                     absorb_i,
  input  logic                     init_i,
  input  round_idx_t               round_i,
  input  logic [RATE/64-1:0][63:0] block_i,
  output state_t                   state_o
);
  localparam int NW = RATE / 64;

  state_t state_q, base, rin, s_theta, s_rho, s_pi, s_chi, s_iota;

  // 2x1 round-input multiplexer: absorbed block or fed-back state
  always_comb begin
    base = init_i ? '0 : state_q;
    rin  = base;
    if (absorb_i)
      for (int i = 0; i < NW; i++) rin[i] = base[i] ^ block_i[i];
  end

  keccak_theta u_theta (.a_i(rin),     .a_o(s_theta));
  keccak_rho   u_rho   (.a_i(s_theta), .a_o(s_rho));
  keccak_pi    u_pi    (.a_i(s_rho),   .a_o(s_pi));
  keccak_chi   u_chi   (.a_i(s_pi),    .a_o(s_chi));
  keccak_iota  u_iota  (.a_i(s_chi),   .round_i(round_i), .a_o(s_iota));

  always_ff @(posedge clk) begin
    if (!rst_n)     state_q <= '0;
    else if (run_i) state_q <= s_iota;
  end

  assign state_o = state_q;
endmodule
