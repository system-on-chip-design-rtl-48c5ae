// keccak_pi: the pi step of Keccak-f[1600], purely combinational wiring.
//
// Lane (x,y) moves to position (y, 2x+3y mod 5), which changes the place of
// the lanes in the state as the architecture describes.
module keccak_pi
  import keccak_pkg::*;
(
  input  state_t a_i,
  output state_t a_o
);
  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a_o[lidx(y, 2*x + 3*y)] = a_i[lidx(x,y)];
  end
endmodule
