// keccak_output_buffer: holds the result taken from the first lanes of the state.
//
// On capture_i the first OUT_BITS bits of the state (the first r bits by
// default, the block the hash outputs) are registered, with each lane's
// bytes reversed back so that data_o reads as a byte string: output byte 0
// in the most significant byte. data_valid_o then stays high until the
// consumer pulses data_ack_i. full_o tells the controller that an unread
// result is still held; the controller does not capture over it.
// For Keccak-512 the 512-bit digest is the top 512 bits of data_o.
module keccak_output_buffer
  import keccak_pkg::*;
#(
  parameter int OUT_BITS = 576
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture_i,
  input  state_t              state_i,
  output logic [OUT_BITS-1:0] data_o,
  output logic                data_valid_o,
  input  logic                data_ack_i,
  output logic                full_o
);
  localparam int NB = OUT_BITS / 8;

  logic [OUT_BITS-1:0] bytes;

  // byte k of the output is byte k mod 8 of lane k/8 (little-endian lanes)
  always_comb begin
    for (int k = 0; k < NB; k++)
      bytes[OUT_BITS - 8 - 8*k +: 8] = state_i[k / 8][8 * (k % 8) +: 8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_o       <= '0;
      data_valid_o <= 1'b0;
    end else if (capture_i) begin
      data_o       <= bytes;
      data_valid_o <= 1'b1;
    end else if (data_ack_i) begin
      data_valid_o <= 1'b0;
    end
  end

  assign full_o = data_valid_o && !data_ack_i;
endmodule
