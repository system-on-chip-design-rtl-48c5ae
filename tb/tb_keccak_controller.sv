// tb_keccak_controller: self-checking test of the round sequencing.
//
// Offers messages of one to three blocks with random gaps, checks cycle by
// cycle that each block is acknowledged together with round 0 (absorb set,
// init only on a message's first block), that rounds 1..23 follow on
// consecutive cycles with no acknowledge, that only a message's last block
// leads to a capture, and that a full output buffer stalls the capture and
// blocks new blocks until it is freed.
module tb_keccak_controller;
  logic clk = 0, rst_n = 0;
  logic blk_valid, blk_last, blk_ack;
  logic run, absorb, init, capture, out_full, busy;
  logic [4:0] rnd;
  int checks = 0, failures = 0;
  int stalls = 0;

  always #5 clk = ~clk;

  keccak_controller dut (
    .clk, .rst_n, .blk_valid_i(blk_valid), .blk_last_i(blk_last), .blk_ack_o(blk_ack),
    .run_o(run), .absorb_o(absorb), .init_o(init), .round_o(rnd),
    .out_full_i(out_full), .capture_o(capture), .busy_o(busy));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic one_block(input bit first, input bit last, input int full_cycles);
    blk_valid = 1; blk_last = last;
    #1;
    chk(blk_ack && run && absorb && rnd == 0 && init == first && !capture, "round 0 with ack/absorb");
    @(posedge clk); #1;
    blk_valid = 0; blk_last = 0;
    for (int r = 1; r < 24; r++) begin
      chk(run && !absorb && !blk_ack && !init && rnd == 5'(r) && busy && !capture,
          $sformatf("round %0d", r));
      @(posedge clk); #1;
    end
    if (last) begin
      out_full = (full_cycles > 0);
      blk_valid = 1;                         // a waiting block must not be taken
      for (int s = 0; s < full_cycles; s++) begin
        #1;
        chk(!capture && !run && !blk_ack && busy, "stalled on full output buffer");
        stalls++;
        @(posedge clk); #1;
      end
      out_full = 0; #1;
      chk(capture && !run && !blk_ack, "capture when output buffer free");
      @(posedge clk); #1;
      blk_valid = 0;
    end
    chk(!busy && !capture, "back in wait");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_valid = 0; blk_last = 0; out_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(!busy && !run && !capture && !blk_ack, "idle after reset");
    for (int msg = 0; msg < 30; msg++) begin
      int nblk;
      nblk = $urandom_range(1, 3);
      for (int b = 0; b < nblk; b++) begin
        int gap;
        gap = $urandom_range(0, 3);
        for (int g = 0; g < gap; g++) begin
          #1 chk(!run && !blk_ack && !busy, "idle without a block");
          @(posedge clk); #1;
        end
        one_block(b == 0, b == nblk - 1, (msg % 3 == 1) ? $urandom_range(1, 4) : 0);
      end
    end
    chk(stalls > 0, "output stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
