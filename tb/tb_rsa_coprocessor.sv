// End-to-end testbench for rsa_coprocessor, driven only through the host bus.
//
// A 64-bit co-processor is programmed the way a host driver would: write N, M
// and E word by word, set start, poll the status word, read the result and the
// cycle count. Results are checked against a 128-bit square-and-multiply
// reference, cycle counts against (K+2) + 2K*(t+h-1) + (3K-1). Covered: a
// textbook RSA key pair (encrypt then decrypt), random operations, E = 0,
// M^E = 0 mod N (final correction from N to 0), operand writes and a start issued while
// busy (both must be ignored), read-back of operands and of the width word.
// Probes inside the design count how often each mechanism happened: squaring,
// multiply by M~, leaving the Montgomery domain, a multiplication chained
// back-to-back onto the previous one, the final N -> 0 correction, the E = 0
// shortcut and an ignored busy-time write; each must happen at least once.
module tb_rsa_coprocessor;
  localparam int unsigned NB    = 64;
  localparam int unsigned K     = NB + 2;
  localparam int unsigned WORDS = NB / 32;
  localparam int unsigned IW    = 2;
  localparam int unsigned AW    = IW + 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] avs_address = '0;
  logic          avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]   avs_writedata = '0, avs_readdata;

  int checks = 0, failures = 0;
  int n_sqr = 0, n_mul = 0, n_one = 0, n_chain = 0, n_fix = 0, n_ezero = 0,
      n_busy_wr = 0;

  always #5 clk = ~clk;

  rsa_coprocessor #(.N_BITS(NB)) dut (
    .clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata
  );

  // ---------------- mechanism probes ----------------
  logic mm_ready_q;
  always_ff @(posedge clk) begin
    mm_ready_q <= dut.u_exp.u_mmm.ready;
    if (dut.u_exp.mm_start) begin
      case (dut.u_exp.mm_bsel)
        rsa_pkg::BSEL_P: n_sqr++;
        rsa_pkg::BSEL_M: n_mul++;
        default:         n_one++;
      endcase
      // chained: started in the first ready cycle after another multiplication
      if (!mm_ready_q) n_chain++;
    end
    // state 7 is S_FIX, the final correction
    if (3'(dut.u_exp.state) == 3'd7 && dut.u_exp.p == 66'(dut.u_exp.modulus))
      n_fix++;
    if (dut.u_exp.start && dut.u_exp.e_zero) n_ezero++;
    if (avs_write && dut.u_exp.busy && avs_address[AW-1:IW] != 3'd0) n_busy_wr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [2:0] region, input int idx, input logic [31:0] d);
    @(negedge clk);
    avs_address = {region, IW'(idx)}; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic bus_read(input logic [2:0] region, input int idx, output logic [31:0] d);
    @(negedge clk);
    avs_address = {region, IW'(idx)}; avs_read = 1'b1;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_read = 1'b0;
  endtask

  function automatic logic [NB-1:0] ref_modexp(logic [NB-1:0] m, logic [NB-1:0] e,
                                               logic [NB-1:0] n);
    logic [127:0] r = 128'(1) % 128'(n);
    logic [127:0] b = 128'(m) % 128'(n);
    for (int i = NB - 1; i >= 0; i--) begin
      r = (r * r) % 128'(n);
      if (e[i]) r = (r * b) % 128'(n);
    end
    return NB'(r);
  endfunction

  function automatic int expected_cycles(logic [NB-1:0] e);
    int t = 0, h = 0;
    if (e == '0) return 1;
    for (int i = 0; i < NB; i++) if (e[i]) begin t = i; h++; end
    return (K + 2) + 2 * K * (t + h - 1) + (3 * K - 1);
  endfunction

  task automatic rsa_op(input logic [NB-1:0] n, input logic [NB-1:0] m,
                        input logic [NB-1:0] e, input bit disturb,
                        output logic [NB-1:0] r);
    logic [31:0] d;
    logic [NB-1:0] want = ref_modexp(m, e, n);
    for (int w = 0; w < WORDS; w++) begin
      bus_write(3'd1, w, n[32*w +: 32]);
      bus_write(3'd2, w, m[32*w +: 32]);
      bus_write(3'd3, w, e[32*w +: 32]);
    end
    bus_write(3'd0, 0, 32'h1);
    bus_read(3'd0, 0, d);
    if (e != '0) check(d[0] && !d[1], $sformatf("status after start %0h", d));
    if (disturb) begin
      // both must be ignored while busy
      bus_write(3'd2, 0, 32'hdead_beef);
      bus_write(3'd0, 0, 32'h1);
    end
    do bus_read(3'd0, 0, d); while (!d[1]);
    check(!d[0], "busy together with done");
    for (int w = 0; w < WORDS; w++) begin
      bus_read(3'd4, w, d);
      r[32*w +: 32] = d;
      bus_read(3'd2, w, d);
      check(d == m[32*w +: 32], "message register changed by a busy-time write");
    end
    check(r == want, $sformatf("%0h^%0h mod %0h = %0h, expected %0h", m, e, n, r, want));
    bus_read(3'd0, 1, d);
    check(d == 32'(expected_cycles(e)),
          $sformatf("cycle count %0d, expected %0d", d, expected_cycles(e)));
  endtask

  initial begin
    logic [NB-1:0] n, m, e, r;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bus_read(3'd0, 2, d);
    check(d == NB, "width word");
    rsa_op(64'd3233, 64'd65, 64'd17, 1'b0, r);
    check(r == 64'd2790, "RSA encryption");
    rsa_op(64'd3233, r, 64'd2753, 1'b1, r);
    check(r == 64'd65, "RSA decryption");
    rsa_op(64'hffff_ffff_ffff_ffc5, 64'd0, 64'd65537, 1'b0, r);
    rsa_op(64'hffff_ffff_ffff_ffc5, 64'd77, 64'd0, 1'b0, r);
    // M^E == 0 (mod N) with M != 0: the Montgomery result may come out as N
    for (int x = 2; x < 6; x++) begin
      rsa_op(64'd9, 64'd3, 64'(x), 1'b0, r);
      rsa_op(64'd45, 64'd15, 64'(x), 1'b0, r);
      rsa_op(64'd1125, 64'd15, 64'(x + 1), 1'b0, r);
    end
    for (int t = 0; t < 12; t++) begin
      n = {$urandom(), $urandom()} | 64'h1;
      m = {$urandom(), $urandom()} % n;
      e = {$urandom(), $urandom()} >> ($urandom() % 48);
      rsa_op(n, m, e, t[0], r);
    end
    $display("mechanisms: square %0d, multiply %0d, to-normal %0d, chained %0d, N->0 %0d, E=0 %0d, busy writes %0d",
             n_sqr, n_mul, n_one, n_chain, n_fix, n_ezero, n_busy_wr);
    check(n_sqr > 0, "no squaring");
    check(n_mul > 0, "no multiplication by M~");
    check(n_one > 0, "no conversion out of the Montgomery domain");
    check(n_chain > 0, "no chained multiplication");
    check(n_fix > 0, "no final N -> 0 correction");
    check(n_ezero > 0, "no E = 0 operation");
    check(n_busy_wr > 0, "no write while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 140 * 2 * K + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
