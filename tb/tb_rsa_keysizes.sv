// Key-size testbench: the co-processor built for 2048-bit and 4096-bit keys.
//
// Runs a public-key operation (E = 65537) on a random full-length odd modulus
// through the host bus of each build, and checks the result against a
// square-and-multiply reference built on shift-and-add modular multiplication and the cycle
// count against (K+2) + 2K*(t+h-1) + (3K-1), K = N_BITS+2. Also prints the
// cycle count an average private-key operation would take at each size.
module tb_rsa_keysizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done_count = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_count == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < 2; s++) begin : g_size
    localparam int unsigned NB    = (s == 0) ? 2048 : 4096;
    localparam int unsigned K     = NB + 2;
    localparam int unsigned WORDS = NB / 32;
    localparam int unsigned IW    = $clog2(WORDS);
    localparam int unsigned AW    = IW + 3;

    logic [AW-1:0] avs_address = '0;
    logic          avs_read = 1'b0, avs_write = 1'b0;
    logic [31:0]   avs_writedata = '0, avs_readdata;

    rsa_coprocessor #(.N_BITS(NB)) dut (
      .clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
      .avs_readdata
    );

    task automatic check(input bit ok, input string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL (%0d bits): %s", NB, what);
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

    // a*b mod n by interleaved shift-and-add, one multiplier bit at a time
    function automatic logic [NB-1:0] ref_mulmod(logic [NB-1:0] a, logic [NB-1:0] b,
                                                 logic [NB-1:0] n);
      logic [NB:0] r = '0;
      for (int i = NB - 1; i >= 0; i--) begin
        r = r << 1;
        if (r >= {1'b0, n}) r = r - {1'b0, n};
        if (a[i]) begin
          r = r + {1'b0, b};
          if (r >= {1'b0, n}) r = r - {1'b0, n};
        end
      end
      return NB'(r);
    endfunction

    function automatic logic [NB-1:0] ref_modexp(logic [NB-1:0] m, logic [NB-1:0] e,
                                                 logic [NB-1:0] n);
      logic [NB-1:0] r = NB'(1);
      for (int i = 31; i >= 0; i--) begin  // the exponent used here has 17 bits
        r = ref_mulmod(r, r, n);
        if (e[i]) r = ref_mulmod(r, m, n);
      end
      return r;
    endfunction

    initial begin
      logic [NB-1:0] n, m, e, r, want;
      logic [31:0] d, cyc;
      longint unsigned avg;
      wait (rst_n);
      for (int w = 0; w < WORDS; w++) begin
        n[32*w +: 32] = $urandom();
        m[32*w +: 32] = $urandom();
      end
      n[NB-1] = 1'b1;
      n[0]    = 1'b1;
      m       = m % n;
      e       = NB'(65537);
      want    = ref_modexp(m, e, n);
      for (int w = 0; w < WORDS; w++) begin
        bus_write(3'd1, w, n[32*w +: 32]);
        bus_write(3'd2, w, m[32*w +: 32]);
        bus_write(3'd3, w, e[32*w +: 32]);
      end
      bus_write(3'd0, 0, 32'h1);
      do begin
        repeat (1000) @(negedge clk);
        bus_read(3'd0, 0, d);
      end while (!d[1]);
      for (int w = 0; w < WORDS; w++) begin
        bus_read(3'd4, w, d);
        r[32*w +: 32] = d;
      end
      check(r == want, "result differs from the reference");
      bus_read(3'd0, 1, d);
      cyc = d;
      check(cyc == 32'((K + 2) + 2 * K * 17 + (3 * K - 1)),
            $sformatf("cycle count %0d", cyc));
      bus_read(3'd0, 2, d);
      check(d == NB, "width word");
      avg = longint'(K + 2) + 2 * longint'(K) * longint'(NB - 1 + NB / 2 - 1) +
            longint'(3 * K - 1);
      $display("%0d bits: E = 65537 took %0d cycles; an average private-key operation takes %0d cycles (%0d ms at 40 MHz)",
               NB, cyc, avg, avg / 40_000);
      done_count++;
    end
  end
endmodule
