// keccak_iota: the iota step of Keccak-f[1600], combinational.
//
// XORs the round constant of round round_i into lane (0,0), the first lane,
// and passes the other 24 lanes through. The 24 constants are computed in
// keccak_pkg from the Keccak LFSR and selected by round_i; an index of 24 or
// more selects a zero constant.
module keccak_iota
  import keccak_pkg::*;
(
  input  state_t     a_i,
  input  round_idx_t round_i,
  output state_t     a_o
);
  lane_t rc;

  always_comb begin
    rc = '0;
    if (int'(round_i) < NROUNDS) rc = RC_TABLE[round_i];
    a_o    = a_i;
    a_o[0] = a_i[0] ^ rc;
  end
endmodule
