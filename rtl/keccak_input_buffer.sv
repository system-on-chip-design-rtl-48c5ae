// keccak_input_buffer: gathers 64-bit message words into one rate block.
//
// Words are written one per accepted cycle (data_valid_i && data_ready_o)
// into RATE/64 word registers. A block is offered to the controller
// (blk_valid_o) when all word slots are filled, or when a word arrives with
// done_i set: that word ends the message, byte_num_i of its bytes (0..7) are
// message bytes, and blk_last_o marks the block as the final, to-be-padded
// one. A message whose length is a multiple of 8 bytes therefore ends with a
// done word carrying 0 bytes. The block stays put, and data_ready_o stays
// low, until the controller acknowledges it with blk_ack_i; the next block is
// gathered while the controller runs the rounds of this one.
//
// Towards the padder (the Sig_PI connection of the architecture) it gives the
// raw words, blk_last_o and the position of the message end; towards the
// controller (Sig_IC) the blk_valid_o / blk_ack_i handshake. The word width,
// the Done encoding and the handshake are this design's choices.
module keccak_input_buffer #(
  parameter int RATE   = 576,
  localparam int WIDX_W = $clog2(RATE / 64)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [63:0]              data_i,
  input  logic                     data_valid_i,
  input  logic                     done_i,
  input  logic [2:0]               byte_num_i,
  output logic                     data_ready_o,
  output logic [RATE/64-1:0][63:0] words_o,
  output logic                     blk_valid_o,
  output logic                     blk_last_o,
  output logic [WIDX_W-1:0]        last_word_o,
  output logic [2:0]               last_bytes_o,
  input  logic                     blk_ack_i
);
  localparam int NW = RATE / 64;

  logic [WIDX_W-1:0] wcnt;
  logic       accept;

  assign data_ready_o = !blk_valid_o;
  assign accept       = data_valid_i && data_ready_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt         <= '0;
      blk_valid_o  <= 1'b0;
      blk_last_o   <= 1'b0;
      last_word_o  <= '0;
      last_bytes_o <= '0;
      words_o      <= '0;
    end else begin
      if (blk_valid_o && blk_ack_i) begin
        blk_valid_o <= 1'b0;
        blk_last_o  <= 1'b0;
        wcnt        <= '0;
      end
      if (accept) begin
        words_o[wcnt] <= data_i;
        if (done_i) begin
          blk_valid_o  <= 1'b1;
          blk_last_o   <= 1'b1;
          last_word_o  <= wcnt;
          last_bytes_o <= byte_num_i;
        end else if (int'(wcnt) == NW - 1) begin
          blk_valid_o <= 1'b1;
          blk_last_o  <= 1'b0;
        end else begin
          wcnt <= wcnt + WIDX_W'(1);
        end
      end
    end
  end

  // A full block must be acknowledged before the slot counter can wrap.
  a_wcnt_range: assert property (@(posedge clk) disable iff (!rst_n) int'(wcnt) < NW);
  a_ack_needs_valid: assert property (@(posedge clk) disable iff (!rst_n) blk_ack_i |-> blk_valid_o);
endmodule
