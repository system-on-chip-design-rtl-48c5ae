// keccak_top: Keccak hash core built from an iterated Keccak-f[1600] round.
//
// Message words enter the input buffer, which gathers RATE/64 of them into a
// block. The padder byte-reverses the block into lane order and pads the last
// block of the message. The controller XORs each block into the state and
// runs the 24 rounds, one per clock, through keccak_round; after the last
// block the output buffer takes the first OUT_BITS bits of the state.
// Defaults: r = 576, c = 1024 and the original Keccak padding, i.e.
// Keccak-512; the digest is data_out[575:64].
//
// Input side: data_in/data_in_valid/data_in_ready, with done marking the
// message's last word and byte_num (0..7) its number of message bytes.
// Output side: data_out/data_out_valid, held until data_out_ack.
// Latency: 24 cycles per block, plus one cycle for the word that completes a
// block and one for handing over the result.
module keccak_top #(
  parameter int         RATE     = 576,
  parameter int         OUT_BITS = 576,
  parameter logic [7:0] PAD_BYTE = 8'h01
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [63:0]         data_in,
  input  logic                data_in_valid,
  input  logic                done,
  input  logic [2:0]          byte_num,
  output logic                data_in_ready,
  output logic [OUT_BITS-1:0] data_out,
  output logic                data_out_valid,
  input  logic                data_out_ack,
  output logic                busy
);
  import keccak_pkg::*;
  localparam int NW = RATE / 64;

  logic [NW-1:0][63:0] raw_words, padded;
  logic        blk_valid, blk_last, blk_ack;
  logic [$clog2(NW)-1:0] last_word;
  logic [2:0]  last_bytes;
  logic        run, absorb, init, capture, out_full;
  round_idx_t  rnd;
  state_t      state;

  keccak_input_buffer #(.RATE(RATE)) u_inbuf (
    .clk, .rst_n,
    .data_i(data_in), .data_valid_i(data_in_valid), .done_i(done),
    .byte_num_i(byte_num), .data_ready_o(data_in_ready),
    .words_o(raw_words), .blk_valid_o(blk_valid), .blk_last_o(blk_last),
    .last_word_o(last_word), .last_bytes_o(last_bytes), .blk_ack_i(blk_ack));

  keccak_padder #(.RATE(RATE), .PAD_BYTE(PAD_BYTE)) u_padder (
    .words_i(raw_words), .last_i(blk_last), .last_word_i(last_word),
    .last_bytes_i(last_bytes), .block_o(padded));

  keccak_controller u_ctrl (
    .clk, .rst_n,
    .blk_valid_i(blk_valid), .blk_last_i(blk_last), .blk_ack_o(blk_ack),
    .run_o(run), .absorb_o(absorb), .init_o(init), .round_o(rnd),
    .out_full_i(out_full), .capture_o(capture), .busy_o(busy));

  keccak_round #(.RATE(RATE)) u_round (
    .clk, .rst_n, .run_i(run), .absorb_i(absorb), .init_i(init),
    .round_i(rnd), .block_i(padded), .state_o(state));

  keccak_output_buffer #(.OUT_BITS(OUT_BITS)) u_outbuf (
    .clk, .rst_n, .capture_i(capture), .state_i(state),
    .data_o(data_out), .data_valid_o(data_out_valid),
    .data_ack_i(data_out_ack), .full_o(out_full));

  // RATE and OUT_BITS must be whole lanes that fit the rate part of the state
  if (RATE % 64 != 0 || RATE > 1536 || OUT_BITS % 64 != 0 || OUT_BITS > RATE) begin : g_bad_param
    $error("keccak_top: RATE and OUT_BITS must be multiples of 64, OUT_BITS <= RATE <= 1536");
  end
endmodule
