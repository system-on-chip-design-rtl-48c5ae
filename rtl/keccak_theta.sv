// keccak_theta: the theta step of Keccak-f[1600], purely combinational.
//
// For every column x the five lanes are XORed into a parity lane C[x]; each
// lane (x,y) is then XORed with D[x] = C[x-1] ^ rotl(C[x+1], 1). The step is
// the one named in the architecture (an XOR over the five columns); its
// exact equations are those of the Keccak reference.
module keccak_theta
  import keccak_pkg::*;
(
  input  state_t a_i,
  output state_t a_o
);
  lane_t [4:0] c, d;

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = a_i[lidx(x,0)] ^ a_i[lidx(x,1)] ^ a_i[lidx(x,2)] ^ a_i[lidx(x,3)] ^ a_i[lidx(x,4)];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a_o[lidx(x,y)] = a_i[lidx(x,y)] ^ d[x];
  end
endmodule
