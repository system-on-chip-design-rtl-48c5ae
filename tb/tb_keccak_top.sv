// tb_keccak_top: end-to-end test of the Keccak-512 core at its default size.
//
// Hashes a list of messages (empty, block-boundary lengths and random
// lengths up to several blocks), sent as big-endian 64-bit words with random
// gaps, while a consumer acknowledges results after random delays. Every
// result is compared with the software sponge of keccak_ref_pkg, and the
// empty message also with the published Keccak-512 digest. It checks the
// latency of a single-block message on an idle core (26 cycles from the
// done word to data_out_valid) and 24 round cycles per absorbed block, and
// counts the mechanisms: input backpressure, output-buffer stall, words
// gathered while rounds run, multi-block messages, a pad byte 8'h81 and a
// padding-only block. A mechanism never seen counts as a failure.
module tb_keccak_top;
  import keccak_ref_pkg::*;
  import keccak_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [63:0]  data_in;
  logic         data_in_valid, done, data_in_ready, data_out_valid, data_out_ack, busy;
  logic [2:0]   byte_num;
  logic [575:0] data_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_backpressure = 0, n_out_stall = 0, n_overlap = 0, n_multiblock = 0;
  int n_pad81 = 0, n_padonly = 0, n_latency = 0;

  logic [575:0] expq [$];
  int           blocks_q [$];
  int           run_cycles = 0;
  int           msgs_done = 0;

  always #5 clk = ~clk;

  keccak_top dut (
    .clk, .rst_n, .data_in, .data_in_valid, .done, .byte_num, .data_in_ready,
    .data_out, .data_out_valid, .data_out_ack, .busy);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (data_in_valid && !data_in_ready) n_backpressure++;
    if (dut.u_ctrl.state_q == ST_OUT && dut.out_full) n_out_stall++;
    if (data_in_valid && data_in_ready && busy) n_overlap++;
    if (dut.run) run_cycles++;
  end

  // send one message; optionally measure latency of the done word
  task automatic send_msg(input byte_q_t m, input bit measure);
    int n, nfull, nblk;
    logic [575:0] e;
    byte_q_t h;
    n = m.size();
    nfull = n / 8;
    nblk = n / 72 + 1;
    h = hash(m, 72, 8'h01, 72);
    for (int k = 0; k < 72; k++) e[575 - 8*k -: 8] = h[k];
    expq.push_back(e);
    blocks_q.push_back(nblk);
    if (nblk > 1) n_multiblock++;
    if (n % 72 == 71) n_pad81++;
    if (n % 72 == 0 && n > 0) n_padonly++;
    for (int w = 0; w <= nfull; w++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) if (8*w + j < n) d[63 - 8*j -: 8] = m[8*w + j];
      if (!measure) while ($urandom_range(0, 4) == 0) begin data_in_valid = 0; @(posedge clk); #1; end
      data_in_valid = 1; data_in = d; done = (w == nfull); byte_num = 3'(n % 8);
      while (!data_in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      data_in_valid = 0; done = 0;
    end
    if (measure) begin
      int lat;
      lat = 0;
      while (!data_out_valid) begin lat++; @(posedge clk); #1; end
      chk(lat + 1 == 26, $sformatf("latency %0d cycles, expected 26", lat + 1));
      n_latency++;
    end
  endtask

  // consumer
  initial begin
    data_out_ack = 0;
    forever begin
      @(posedge clk); #2;
      if (data_out_valid && !data_out_ack) begin
        logic [575:0] e;
        int nb, rc;
        e  = expq.pop_front();
        nb = blocks_q.pop_front();
        chk(data_out === e, $sformatf("digest of message %0d", msgs_done));
        if (msgs_done == 0)
          chk(data_out[575:64] === 512'h0eab42de4c3ceb9235fc91acffe746b29c29a8c366b7c60e4e67c466f36a4304c00fa9caf9d87976ba469bcbe06713b435f091ef2769fb160cdab33d3670680e,
              "Keccak-512 of the empty message");
        msgs_done++;
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(20, 80)) @(posedge clk);
        #1 data_out_ack = 1;
        @(posedge clk); #1 data_out_ack = 0;
      end
    end
  end

  // round cycles: every block costs exactly 24 cycles of run
  int blocks_sent = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_q_t m;
    int lens [$];
    data_in_valid = 0; done = 0; data_in = '0; byte_num = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    m = {};
    send_msg(m, 1);                                       // empty message, idle core
    lens = '{1, 7, 8, 71, 72, 143, 144, 200, 216, 300};
    for (int i = 0; i < 30; i++) lens.push_back($urandom_range(0, 400));
    foreach (lens[i]) begin
      m = {};
      for (int k = 0; k < lens[i]; k++) m.push_back(8'($urandom));
      blocks_sent += lens[i] / 72 + 1;
      send_msg(m, 0);
    end
    wait (expq.size() == 0 && !data_out_valid && !busy);
    repeat (5) @(posedge clk);
    #1;
    // latency again on an idle core, with a one-block message
    m = {};
    for (int k = 0; k < 40; k++) m.push_back(8'($urandom));
    blocks_sent += 2;  // the empty message and this one
    send_msg(m, 1);
    wait (expq.size() == 0 && !data_out_valid);
    repeat (5) @(posedge clk);
    chk(run_cycles == 24 * blocks_sent, $sformatf("round cycles %0d, expected %0d", run_cycles, 24 * blocks_sent));
    chk(msgs_done == lens.size() + 2, "all messages hashed");
    chk(n_backpressure > 0, "input backpressure");
    chk(n_out_stall > 0,    "output buffer stall");
    chk(n_overlap > 0,      "words gathered during rounds");
    chk(n_multiblock > 0,   "multi-block message");
    chk(n_pad81 > 0,        "pad byte 0x81");
    chk(n_padonly > 0,      "padding-only block");
    chk(n_latency == 2,     "latency measured");
    $display("messages=%0d backpressure=%0d out_stall=%0d overlap=%0d multiblock=%0d pad81=%0d padonly=%0d",
             msgs_done, n_backpressure, n_out_stall, n_overlap, n_multiblock, n_pad81, n_padonly);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
