// tb_keccak_workloads: the core in the sponge configurations used by Dilithium
// and by SHA-3, next to its default Keccak-512 one.
//
// Three instances of keccak_top run side by side:
//   0: r = 1088, SHAKE padding (8'h1F)  -> SHAKE256 (Dilithium's CRH and H)
//   1: r = 1344, SHAKE padding (8'h1F)  -> SHAKE128 (Dilithium's matrix expansion)
//   2: r = 576,  SHA-3 padding (8'h06)  -> SHA3-512
// Each hashes the empty message, checked against the published first output
// bytes, and messages of random length, checked against the software sponge.
// Only the first output block (r bits) is produced by the core; longer SHAKE
// outputs would need further squeeze permutations, which the core lacks.
module tb_keccak_workloads;
  import keccak_ref_pkg::*;

  localparam int         NCFG = 3;
  localparam int         RATES [NCFG] = '{1088, 1344, 576};
  localparam logic [7:0] PADS  [NCFG] = '{8'h1F, 8'h1F, 8'h06};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit finished [NCFG];

  always #5 clk = ~clk;

  function automatic void chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int R  = RATES[c];
    localparam int RB = R / 8;
    logic [63:0]  data_in;
    logic         data_in_valid, done, data_in_ready, data_out_valid, data_out_ack, busy;
    logic [2:0]   byte_num;
    logic [R-1:0] data_out;

    keccak_top #(.RATE(R), .OUT_BITS(R), .PAD_BYTE(PADS[c])) dut (
      .clk, .rst_n, .data_in, .data_in_valid, .done, .byte_num, .data_in_ready,
      .data_out, .data_out_valid, .data_out_ack, .busy);

    task automatic hash_msg(input byte_q_t m, output logic [R-1:0] res);
      int n;
      n = m.size();
      for (int w = 0; w <= n / 8; w++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        for (int j = 0; j < 8; j++) if (8*w + j < n) d[63 - 8*j -: 8] = m[8*w + j];
        data_in_valid = 1; data_in = d; done = (w == n / 8); byte_num = 3'(n % 8);
        while (!data_in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        data_in_valid = 0; done = 0;
      end
      while (!data_out_valid) begin @(posedge clk); #1; end
      res = data_out;
      data_out_ack = 1;
      @(posedge clk); #1;
      data_out_ack = 0;
    endtask

    initial begin
      byte_q_t m, h;
      logic [R-1:0] res, e;
      data_in_valid = 0; done = 0; data_in = '0; byte_num = '0; data_out_ack = 0;
      wait (rst_n);
      @(posedge clk); #1;
      m = {};
      hash_msg(m, res);
      case (c)
        0: chk(res[R-1 -: 256] === 256'h46b9dd2b0ba88d13233b3feb743eeb243fcd52ea62b81b82b50c27646ed5762f,
               "SHAKE256 of the empty message");
        1: chk(res[R-1 -: 128] === 128'h7f9c2ba4e88f827d616045507605853e, "SHAKE128 of the empty message");
        default: chk(res[R-1 -: 512] === 512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26,
               "SHA3-512 of the empty message");
      endcase
      for (int i = 0; i < 12; i++) begin
        int n;
        n = (i < 3) ? RB * (i + 1) - 1 + i : $urandom_range(0, 3 * RB);
        m = {};
        for (int k = 0; k < n; k++) m.push_back(8'($urandom));
        h = hash(m, RB, PADS[c], RB);
        for (int k = 0; k < RB; k++) e[R - 8 - 8*k +: 8] = h[k];
        hash_msg(m, res);
        chk(res === e, $sformatf("config %0d message of %0d bytes", c, n));
      end
      finished[c] = 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (finished[0] && finished[1] && finished[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
