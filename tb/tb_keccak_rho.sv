// tb_keccak_rho: self-checking test of the rho step.
//
// Applies hand-picked and random 1600-bit states and compares the output
// with the step of the software reference model (keccak_ref_pkg), which uses
// the published Keccak tables rather than the RTL's generated ones.
module tb_keccak_rho;
  import keccak_ref_pkg::*;

  logic [1599:0] a_i, a_o, exp_o;
  logic [4:0]    rnd;
  int checks = 0, failures = 0;

  keccak_rho dut (.a_i(a_i), .a_o(a_o));

  task automatic check(input logic [1599:0] v, input int r);
    a_i = v;
    rnd = 5'(r);
    #1;
    exp_o = to_flat(rho(from_flat(v)));
    checks++;
    if (a_o !== exp_o) begin
      failures++;
      if (failures < 5) $display("mismatch: in=%h\n out=%h\n exp=%h", v, a_o, exp_o);
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
    check('0, 0);
    for (int i = 0; i < 1600; i += 37) check(1600'(1) << i, i % 24);
    for (int i = 0; i < 300; i++) check(rand_flat(), i % 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
