// keccak_padder: byte inversion and pad10*1 padding of one rate block.
//
// Message words arrive big-endian: the first message byte of a word is in its
// bits 63:56. Keccak numbers bytes little-endian inside a lane, so each word
// is byte-reversed into its lane ("byte-by-byte inversion"). For the last
// block of a message (last_i) the bytes after the message end are cleared,
// PAD_BYTE is XORed into the first free byte and 8'h80 into the last byte of
// the block, which together form the pad10*1 rule (one byte 8'h81 when both
// fall on the same byte). Other blocks are passed on unpadded.
//
// Interface: words_i is the raw block from the input buffer, word 0 first;
// last_word_i and last_bytes_i tell where the message ends inside it (the
// end falls after last_bytes_i bytes of word last_word_i). block_o is the
// block in lane order, lane 0 in bits 63:0. Purely combinational.
//
// PAD_BYTE = 8'h01 gives the original Keccak padding used for the r = 576
// Keccak-512 configuration; 8'h06 gives SHA3-512 and 8'h1F SHAKE.
module keccak_padder #(
  parameter int         RATE     = 576,
  parameter logic [7:0] PAD_BYTE = 8'h01,
  localparam int        WIDX_W   = $clog2(RATE / 64)
) (
  input  logic [RATE/64-1:0][63:0] words_i,
  input  logic                     last_i,
  input  logic [WIDX_W-1:0]        last_word_i,
  input  logic [2:0]               last_bytes_i,
  output logic [RATE/64-1:0][63:0] block_o
);
  localparam int NW = RATE / 64;
  localparam int NB = RATE / 8;

  int   end_pos;   // byte position of the first byte after the message
  logic [7:0] b;

  always_comb begin
    end_pos = 8 * int'(last_word_i) + int'(last_bytes_i);
    for (int w = 0; w < NW; w++) begin
      for (int j = 0; j < 8; j++) begin
        b = words_i[w][63 - 8*j -: 8];
        if (last_i) begin
          if (8*w + j >= end_pos) b = 8'h00;
          if (8*w + j == end_pos) b = b ^ PAD_BYTE;
          if (8*w + j == NB - 1)  b = b ^ 8'h80;
        end
        block_o[w][8*j +: 8] = b;
      end
    end
  end
endmodule
