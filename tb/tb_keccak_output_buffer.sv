// tb_keccak_output_buffer: self-checking test of result capture and hold.
//
// Captures random states and checks that data_o is the first 72 bytes of the
// state in byte-string order (byte 0 in the top byte), that data_valid_o and
// full_o stay up until data_ack_i, and that the held value does not change
// while no capture is requested.
module tb_keccak_output_buffer;
  import keccak_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic capture, ack, valid, full;
  logic [1599:0] st;
  logic [575:0]  dout, exp_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_output_buffer #(.OUT_BITS(576)) dut (
    .clk, .rst_n, .capture_i(capture), .state_i(st), .data_o(dout),
    .data_valid_o(valid), .data_ack_i(ack), .full_o(full));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; ack = 0; st = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(!valid && !full, "idle after reset");
    for (int i = 0; i < 50; i++) begin
      st = rand_flat();
      for (int k = 0; k < 72; k++) exp_d[575 - 8*k -: 8] = st[8*k +: 8];
      capture = 1;
      @(posedge clk); #1;
      capture = 0;
      st = rand_flat();                      // later state changes must not leak
      chk(valid && full, "valid and full after capture");
      chk(dout === exp_d, $sformatf("data after capture %0d", i));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      chk(dout === exp_d && valid, "value held");
      ack = 1; #1;
      chk(!full, "full drops with ack");
      @(posedge clk); #1;
      ack = 0;
      chk(!valid, "valid cleared by ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
