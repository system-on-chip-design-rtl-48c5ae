// tb_keccak_padder: self-checking test of the byte inversion and padding.
//
// For random raw blocks it builds the expected lane-ordered block from a
// byte list: message bytes are taken from each word first-byte-at-MSB, and
// for a last block the list is cut at the message end, extended with the pad
// byte and zeros, and the final byte XORed with 8'h80. Every end position
// in the block is covered, including the one where both pad bits share the
// last byte (8'h81) and a block holding only padding.
module tb_keccak_padder;
  localparam int NW = 9;
  localparam int NB = 72;

  logic [NW-1:0][63:0] words, blk;
  logic       last;
  logic [3:0] last_word;
  logic [2:0] last_bytes;
  int checks = 0, failures = 0;

  keccak_padder #(.RATE(576), .PAD_BYTE(8'h01)) dut (
    .words_i(words), .last_i(last), .last_word_i(last_word),
    .last_bytes_i(last_bytes), .block_o(blk));

  task automatic check(input bit is_last, input int endp);
    logic [7:0] mb [NB];
    logic [NW-1:0][63:0] exp_b;
    for (int w = 0; w < NW; w++) begin
      words[w] = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) mb[8*w+j] = words[w][63-8*j -: 8];
    end
    last       = is_last;
    last_word  = 4'(endp / 8);
    last_bytes = 3'(endp % 8);
    if (is_last) begin
      for (int k = endp; k < NB; k++) mb[k] = 8'h00;
      mb[endp]   = mb[endp] | 8'h01;
      mb[NB-1]   = mb[NB-1] | 8'h80;
    end
    for (int k = 0; k < NB; k++) exp_b[k/8][8*(k%8) +: 8] = mb[k];
    #1;
    checks++;
    if (blk !== exp_b) begin
      failures++;
      if (failures < 5) $display("mismatch last=%0b end=%0d\n got=%h\n exp=%h", is_last, endp, blk, exp_b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NB; e++) check(1'b1, e);
    for (int i = 0; i < 100; i++) check(1'b0, $urandom_range(NB-1));
    for (int i = 0; i < 100; i++) check(1'b1, $urandom_range(NB-1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
