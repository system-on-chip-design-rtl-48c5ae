// keccak_pkg: types and constants shared by the Keccak-f[1600] hash datapath.
//
// The 1600-bit state is 25 lanes of 64 bits. Lane (x,y) sits at index x+5*y
// of state_t, which also places lane 0 in the least significant 64 bits of
// the flat 1600-bit vector, matching the usual Keccak bit numbering (message
// byte 0 lands in bits 7:0 of lane 0).
//
// Round constants and rho offsets are not typed in as tables; they are
// computed by the constant functions below from the defining rules of
// Keccak: the round constants from the degree-8 LFSR x^8+x^6+x^5+x^4+1, the
// rho offsets from the (x,y) -> (y, 2x+3y) walk with offsets (t+1)(t+2)/2.
package keccak_pkg;

  localparam int LANE_W  = 64;
  localparam int NLANES  = 25;
  localparam int NROUNDS = 24;               // rounds of Keccak-f[1600]
  localparam int RIDX_W  = 5;                // width of a round index

  typedef logic [LANE_W-1:0]             lane_t;
  typedef logic [NLANES-1:0][LANE_W-1:0] state_t;
  typedef logic [RIDX_W-1:0]             round_idx_t;

  // Lane index of coordinate (x,y), both taken modulo 5.
  function automatic int lidx(input int x, input int y);
    return ((x % 5 + 5) % 5) + 5 * ((y % 5 + 5) % 5);
  endfunction

  function automatic lane_t rotl(input lane_t v, input int n);
    int k;
    k = n % LANE_W;
    if (k == 0) return v;
    return (v << k) | (v >> (LANE_W - k));
  endfunction

  // Output bit of the round-constant LFSR after t steps (rc(t) of the spec).
  function automatic logic rc_bit(input int t);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < t % 255; i++) begin
      // shift toward the MSB; feedback taps of x^8+x^6+x^5+x^4+1
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return r[0];
  endfunction

  // Round constant of round ir: bit 2^j-1 is rc(j + 7*ir), j = 0..6.
  function automatic lane_t round_constant(input int ir);
    lane_t c;
    c = '0;
    for (int j = 0; j < 7; j++) c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  // Rotation offset of rho for lane (x,y).
  function automatic int rho_offset(input int x, input int y);
    int cx, cy, nx;
    if (x == 0 && y == 0) return 0;
    cx = 1; cy = 0;
    for (int t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % LANE_W;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  typedef lane_t [NROUNDS-1:0]  rc_table_t;
  typedef logic [NLANES-1:0][5:0] rho_table_t;

  function automatic rc_table_t make_rc_table();
    rc_table_t t;
    for (int i = 0; i < NROUNDS; i++) t[i] = round_constant(i);
    return t;
  endfunction

  function automatic rho_table_t make_rho_table();
    rho_table_t t;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) t[lidx(x,y)] = 6'(rho_offset(x,y));
    return t;
  endfunction

  // Round constants, indexed by round, and rho offsets, indexed by lane.
  localparam rc_table_t  RC_TABLE  = make_rc_table();
  localparam rho_table_t RHO_TABLE = make_rho_table();

  // Controller states.
  typedef enum logic [1:0] {
    ST_WAIT  = 2'd0,  // waiting for a block from the input buffer
    ST_ROUND = 2'd1,  // rounds 1..23 of a permutation
    ST_OUT   = 2'd2   // last block permuted, hand the state to the output buffer
  } ctrl_state_e;

endpackage
