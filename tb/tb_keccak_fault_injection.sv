// tb_keccak_fault_injection: single- and multi-bit fault injection into the
// round input, counting the faulty bits at the output of every step.
//
// Two copies of the step chain theta-rho-pi-chi-iota run on the same random
// state, one with bits flipped at its input. For every one of the 1600
// single-bit faults the number of differing output bits after each step is
// counted. Theta spreads one flipped bit to itself and to the two adjacent
// column sums, so its output must differ in exactly 1 + 5 + 5 = 11 bits;
// rho and pi only move bits, so they must keep 11; chi spreads them further
// depending on the data, and iota (a constant XOR) must leave the count of
// chi unchanged. Random multi-bit faults are then injected and the
// distribution of theta's faulty-output sizes is printed.
module tb_keccak_fault_injection;
  import keccak_ref_pkg::*;

  logic [1599:0] good_in, bad_in;
  logic [1599:0] g_th, g_rh, g_pi, g_ch, g_io;
  logic [1599:0] b_th, b_rh, b_pi, b_ch, b_io;
  logic [4:0]    rnd;
  int checks = 0, failures = 0;
  int hist_theta [1601];
  int chi_min = 1600, chi_max = 0;

  keccak_theta g0 (.a_i(good_in), .a_o(g_th));
  keccak_rho   g1 (.a_i(g_th), .a_o(g_rh));
  keccak_pi    g2 (.a_i(g_rh), .a_o(g_pi));
  keccak_chi   g3 (.a_i(g_pi), .a_o(g_ch));
  keccak_iota  g4 (.a_i(g_ch), .round_i(rnd), .a_o(g_io));
  keccak_theta f0 (.a_i(bad_in), .a_o(b_th));
  keccak_rho   f1 (.a_i(b_th), .a_o(b_rh));
  keccak_pi    f2 (.a_i(b_rh), .a_o(b_pi));
  keccak_chi   f3 (.a_i(b_pi), .a_o(b_ch));
  keccak_iota  f4 (.a_i(b_ch), .round_i(rnd), .a_o(b_io));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nth, nrh, npi, nch, nio;
    for (int i = 0; i <= 1600; i++) hist_theta[i] = 0;
    // single-bit faults, every position
    for (int p = 0; p < 1600; p++) begin
      good_in = rand_flat();
      bad_in  = good_in;
      bad_in[p] = ~bad_in[p];
      rnd = 5'(p % 24);
      #1;
      nth = $countones(g_th ^ b_th);
      nrh = $countones(g_rh ^ b_rh);
      npi = $countones(g_pi ^ b_pi);
      nch = $countones(g_ch ^ b_ch);
      nio = $countones(g_io ^ b_io);
      checks++;
      if (nth != 11 || nrh != 11 || npi != 11 || nio != nch || nch < 11) begin
        failures++;
        if (failures < 5) $display("fault at bit %0d: theta %0d rho %0d pi %0d chi %0d iota %0d",
                                   p, nth, nrh, npi, nch, nio);
      end
      // the faulty chain must also match the reference round
      checks++;
      if (b_io !== to_flat(round_f(from_flat(bad_in), p % 24))) failures++;
      if (nch < chi_min) chi_min = nch;
      if (nch > chi_max) chi_max = nch;
    end
    $display("single-bit faults: theta/rho/pi output 11 faulty bits; chi/iota %0d..%0d", chi_min, chi_max);
    // multi-bit faults: 2..8 random flipped bits
    for (int t = 0; t < 2000; t++) begin
      int nf;
      good_in = rand_flat();
      bad_in  = good_in;
      nf = $urandom_range(2, 8);
      for (int k = 0; k < nf; k++) begin
        int p;
        p = $urandom_range(0, 1599);
        bad_in[p] = ~bad_in[p];
      end
      rnd = 5'(t % 24);
      #1;
      hist_theta[$countones(g_th ^ b_th)]++;
      checks++;
      if (b_io !== to_flat(round_f(from_flat(bad_in), t % 24))) failures++;
    end
    $display("multi-bit faults, theta output size: count");
    for (int i = 0; i <= 1600; i++)
      if (hist_theta[i] != 0) $display("  %0d-bit error: %0d", i, hist_theta[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
