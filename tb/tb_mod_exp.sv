// Self-checking testbench for mod_exp.
//
// 64-bit engine. Checks M^E mod N against a square-and-multiply reference in
// 128-bit arithmetic for random odd moduli, messages and exponents of random
// length, plus corner cases (E = 0, E = 1, M = 0, M = 1, N = 1, all-ones
// exponent) and a textbook RSA key pair (N = 61*53, e = 17, d = 2753) in both
// directions. Every operation's cycle count is checked against
//   (K+2) + 2K*(t+h-1) + (3K-1),  K = N_BITS+2,
// t = index of the top set exponent bit, h = number of set bits.
module tb_mod_exp;
  localparam int unsigned NB = 64;
  localparam int unsigned K  = NB + 2;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [NB-1:0] modulus = '0, message = '0, exponent = '0, result;
  logic          busy, done;
  logic [31:0]   cycles;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_exp #(.N_BITS(NB)) dut (
    .clk, .rst_n, .start, .modulus, .message, .exponent,
    .busy, .done, .result, .cycles
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
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

  task automatic run(input logic [NB-1:0] n, input logic [NB-1:0] m,
                     input logic [NB-1:0] e);
    logic [NB-1:0] exp_r = ref_modexp(m, e, n);
    int c = 0;
    @(negedge clk);
    modulus = n; message = m; exponent = e; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    c = 1;
    while (!done) begin
      @(negedge clk);
      c++;
    end
    check(result == exp_r, $sformatf("%0h^%0h mod %0h = %0h, expected %0h",
                                     m, e, n, result, exp_r));
    check(c == expected_cycles(e) && cycles == 32'(c),
          $sformatf("cycles %0d / counter %0d, expected %0d", c, cycles,
                    expected_cycles(e)));
  endtask

  initial begin
    logic [NB-1:0] n, m, e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // textbook RSA key pair
    run(64'd3233, 64'd65, 64'd17);
    check(result == 64'd2790, "RSA encryption of 65");
    run(64'd3233, 64'd2790, 64'd2753);
    check(result == 64'd65, "RSA decryption back to 65");
    // corner cases
    run(64'hffff_ffff_ffff_ffc5, 64'd12345, 64'd0);
    run(64'd1, 64'd0, 64'd0);
    run(64'hffff_ffff_ffff_ffc5, 64'd12345, 64'd1);
    run(64'hffff_ffff_ffff_ffc5, 64'd0, 64'd65537);
    run(64'hffff_ffff_ffff_ffc5, 64'd1, 64'd65537);
    run(64'hffff_ffff_ffff_ffc5, 64'hffff_ffff_ffff_ffc4, '1);
    run(64'd1, 64'd0, 64'd5);
    // random operands
    for (int t = 0; t < 40; t++) begin
      n = {$urandom(), $urandom()} | 64'h1;
      if (t % 4 == 1) n = n >> ($urandom() % 60);
      n[0] = 1'b1;
      m = {$urandom(), $urandom()} % n;
      e = {$urandom(), $urandom()} >> ($urandom() % 64);
      run(n, m, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 200 * K) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
