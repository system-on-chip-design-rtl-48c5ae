// keccak_chi: the chi step of Keccak-f[1600], purely combinational.
//
// The only nonlinear step: inside each row of five lanes, lane x becomes
// a[x] ^ (~a[x+1] & a[x+2]).
module keccak_chi
  import keccak_pkg::*;
(
  input  state_t a_i,
  output state_t a_o
);
  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a_o[lidx(x,y)] = a_i[lidx(x,y)] ^ (~a_i[lidx(x+1,y)] & a_i[lidx(x+2,y)]);
  end
endmodule
