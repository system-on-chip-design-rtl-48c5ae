// tb_keccak_input_buffer: self-checking test of block gathering.
//
// Streams messages of random length (as 64-bit words with random valid gaps)
// and acknowledges blocks after random delays. For each offered block it
// checks the words against the words sent, the last flag, the end position
// (word index and byte count of the done word) and that no word is accepted
// while a block waits (backpressure).
module tb_keccak_input_buffer;
  logic clk = 0, rst_n = 0;
  logic [63:0] data;
  logic valid, done, ready;
  logic [2:0] byte_num;
  logic [8:0][63:0] words;
  logic blk_valid, blk_last, blk_ack;
  logic [3:0] last_word;
  logic [2:0] last_bytes;
  int checks = 0, failures = 0, stalls = 0, blocks = 0;

  // words sent, and the expected block description, filled by the driver
  logic [63:0] sent [$];
  bit          exp_last [$];
  int          exp_lw [$], exp_lb [$];

  always #5 clk = ~clk;

  keccak_input_buffer #(.RATE(576)) dut (
    .clk, .rst_n, .data_i(data), .data_valid_i(valid), .done_i(done),
    .byte_num_i(byte_num), .data_ready_o(ready), .words_o(words),
    .blk_valid_o(blk_valid), .blk_last_o(blk_last), .last_word_o(last_word),
    .last_bytes_o(last_bytes), .blk_ack_i(blk_ack));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // driver: one message of nbytes bytes
  task automatic send_msg(input int nbytes);
    int nfull, idx;
    nfull = nbytes / 8;
    idx   = 0;
    for (int w = 0; w <= nfull; w++) begin
      logic [63:0] d;
      bit is_done;
      d       = {$urandom, $urandom};
      is_done = (w == nfull);
      while ($urandom_range(0, 3) == 0) begin valid = 0; @(posedge clk); #1; end
      valid = 1; data = d; done = is_done; byte_num = is_done ? 3'(nbytes % 8) : 3'd0;
      while (!ready) begin stalls++; @(posedge clk); #1; end
      sent.push_back(d);
      if (is_done) begin
        exp_last.push_back(1); exp_lw.push_back(idx); exp_lb.push_back(nbytes % 8);
      end else if (idx == 8) begin
        exp_last.push_back(0); exp_lw.push_back(0); exp_lb.push_back(0);
      end
      idx = (is_done || idx == 8) ? 0 : idx + 1;
      @(posedge clk); #1;
      valid = 0; done = 0;
    end
  endtask

  // checker and acknowledger
  initial begin
    blk_ack = 0;
    forever begin
      @(posedge clk); #2;
      if (blk_valid && !blk_ack) begin
        int n, lw, lb;
        bit l;
        l  = exp_last.pop_front();
        lw = exp_lw.pop_front();
        lb = exp_lb.pop_front();
        n = l ? lw + 1 : 9;
        blocks++;
        chk(blk_last == l, "last flag");
        if (l) chk(int'(last_word) == lw && int'(last_bytes) == lb, "end position");
        for (int w = 0; w < n; w++) chk(words[w] === sent.pop_front(), $sformatf("word %0d", w));
        chk(!ready, "not ready while a block waits");
        repeat ($urandom_range(0, 12)) @(posedge clk);
        #1 blk_ack = 1;
        @(posedge clk); #1 blk_ack = 0;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; done = 0; data = '0; byte_num = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(ready && !blk_valid, "ready after reset");
    send_msg(0); send_msg(71); send_msg(72); send_msg(8); send_msg(144);
    for (int i = 0; i < 20; i++) send_msg($urandom_range(0, 300));
    repeat (40) @(posedge clk);
    chk(sent.size() == 0 && exp_last.size() == 0, "every block delivered");
    chk(stalls > 0, "backpressure exercised");
    $display("blocks=%0d stalls=%0d", blocks, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
