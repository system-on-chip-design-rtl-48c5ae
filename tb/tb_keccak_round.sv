// tb_keccak_round: self-checking test of the iterated round and its input mux.
//
// Runs whole permutations through the state register: round 0 with init and
// absorb (block XORed into a zero state), rounds 1..23 with the feedback
// path, then a second block absorbed into the result without init. Every
// round's state is compared with the reference round function, and the state
// must hold while run is low.
module tb_keccak_round;
  import keccak_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic run, absorb, init;
  logic [4:0] rnd;
  logic [8:0][63:0] blk;
  logic [1599:0] st, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_round #(.RATE(576)) dut (
    .clk, .rst_n, .run_i(run), .absorb_i(absorb), .init_i(init),
    .round_i(rnd), .block_i(blk), .state_o(st));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 5) $display("FAIL: %s", what); end
  endtask

  task automatic permute_block(input bit first);
    logic [1599:0] m;
    for (int w = 0; w < 9; w++) blk[w] = {$urandom, $urandom};
    m = first ? '0 : model;
    m[575:0] = m[575:0] ^ blk;
    for (int r = 0; r < 24; r++) begin
      run = 1; absorb = (r == 0); init = (r == 0) && first; rnd = 5'(r);
      @(posedge clk); #1;
      m = to_flat(round_f(from_flat(m), r));
      chk(st === m, $sformatf("state after round %0d", r));
    end
    run = 0; absorb = 0; init = 0;
    model = m;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; absorb = 0; init = 0; rnd = 0; blk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(st === '0, "zero after reset");
    // zero-state permutation: published first lane F1258F7940E1DDE7
    for (int r = 0; r < 24; r++) begin
      run = 1; rnd = 5'(r);
      @(posedge clk); #1;
    end
    run = 0;
    chk(st[63:0] === 64'hF1258F7940E1DDE7, "Keccak-f of zero state, lane 0");
    model = st;
    for (int i = 0; i < 8; i++) begin
      permute_block(i % 3 == 0);
      repeat (3) @(posedge clk);
      #1;
      chk(st === model, "state holds while run is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
