// Full-size testbench: the co-processor at its default 1024-bit key length.
//
// Through the host bus, runs the two RSA operations at full size: a public-key
// operation with E = 65537 and a private-key-sized one with a random
// full-length 1024-bit exponent, on a random 1024-bit odd modulus. Results are
// checked against a square-and-multiply reference in 2048-bit arithmetic, and
// cycle counts against (K+2) + 2K*(t+h-1) + (3K-1), K = 1026. The private-key
// operation must also fit in 79 ms at 40 MHz (3,160,000 cycles) and the
// public-key one in 2 ms (80,000 cycles).
module tb_rsa_full;
  localparam int unsigned NB    = 1024;
  localparam int unsigned K     = NB + 2;
  localparam int unsigned WORDS = NB / 32;
  localparam int unsigned IW    = 5;
  localparam int unsigned AW    = IW + 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] avs_address = '0;
  logic          avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]   avs_writedata = '0, avs_readdata;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_coprocessor dut (
    .clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata
  );

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
    logic [2*NB-1:0] r = (2*NB)'(1) % (2*NB)'(n);
    logic [2*NB-1:0] b = (2*NB)'(m) % (2*NB)'(n);
    for (int i = NB - 1; i >= 0; i--) begin
      r = (r * r) % (2*NB)'(n);
      if (e[i]) r = (r * b) % (2*NB)'(n);
    end
    return NB'(r);
  endfunction

  function automatic int expected_cycles(logic [NB-1:0] e);
    int t = 0, h = 0;
    if (e == '0) return 1;
    for (int i = 0; i < NB; i++) if (e[i]) begin t = i; h++; end
    return (K + 2) + 2 * K * (t + h - 1) + (3 * K - 1);
  endfunction

  function automatic logic [NB-1:0] rand_wide();
    logic [NB-1:0] v;
    for (int w = 0; w < WORDS; w++) v[32*w +: 32] = $urandom();
    return v;
  endfunction

  task automatic rsa_op(input logic [NB-1:0] n, input logic [NB-1:0] m,
                        input logic [NB-1:0] e, input int budget);
    logic [31:0] d;
    logic [NB-1:0] r;
    int h;
    logic [NB-1:0] want = ref_modexp(m, e, n);
    for (int w = 0; w < WORDS; w++) begin
      bus_write(3'd1, w, n[32*w +: 32]);
      bus_write(3'd2, w, m[32*w +: 32]);
      bus_write(3'd3, w, e[32*w +: 32]);
    end
    bus_write(3'd0, 0, 32'h1);
    do begin
      repeat (500) @(negedge clk);
      bus_read(3'd0, 0, d);
    end while (!d[1]);
    for (int w = 0; w < WORDS; w++) begin
      bus_read(3'd4, w, d);
      r[32*w +: 32] = d;
    end
    check(r == want, "1024-bit result differs from the reference");
    bus_read(3'd0, 1, d);
    h = 0;
    for (int i = 0; i < NB; i++) h += int'(e[i]);
    $display("exponent with %0d set bits: %0d cycles (%0d us at 40 MHz)", h, d, d / 40);
    check(d == 32'(expected_cycles(e)),
          $sformatf("cycle count %0d, expected %0d", d, expected_cycles(e)));
    check(d <= 32'(budget), $sformatf("%0d cycles over the %0d budget", d, budget));
  endtask

  initial begin
    logic [NB-1:0] n, m, e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = rand_wide();
    n[NB-1] = 1'b1;
    n[0]    = 1'b1;
    m = rand_wide() % n;
    rsa_op(n, m, NB'(65537), 80_000);
    // typical private exponent: full length, half of its bits set
    e = '0;
    e[NB-1] = 1'b1;
    while ($countones(e) < NB / 2) e[$urandom() % NB] = 1'b1;
    rsa_op(n, m, e, 3_160_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
