// keccak_rho: the rho step of Keccak-f[1600], purely combinational wiring.
//
// Each lane (x,y) is rotated left by its own fixed offset, which the package
// derives from the Keccak definition at elaboration time. No logic gates
// result: the step is a permutation of wires.
module keccak_rho
  import keccak_pkg::*;
(
  input  state_t a_i,
  output state_t a_o
);
  for (genvar i = 0; i < NLANES; i++) begin : g_lane
    localparam int R = int'(RHO_TABLE[i]);
    if (R == 0) begin : g_id
      assign a_o[i] = a_i[i];
    end else begin : g_rot
      assign a_o[i] = {a_i[i][LANE_W-1-R:0], a_i[i][LANE_W-1:LANE_W-R]};
    end
  end
endmodule
