// Self-checking testbench for mmm_systolic_array.
//
// Runs random chains of four back-to-back Montgomery multiplications
// (square, multiply by M~, square, multiply by 1) on a 32-bit array and checks
// every result against a reference kept modulo N: result * 2^K == P * B (mod N)
// with K = N_BITS+2, result below 2N, and the final P*1 at most N. It also
// checks the timing: ready comes back exactly 2K cycles after a start and done
// pulses 3K-3 cycles after its start.
module tb_mmm_systolic_array;
  import rsa_pkg::*;

  localparam int unsigned NB = 32;
  localparam int unsigned K  = NB + 2;
  localparam int unsigned TRIALS = 60;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [NB-1:0] modulus;
  logic [K-1:0]  m_mont, p_load_val, p;
  logic          p_load, start, ready, done;
  bsel_e         start_bsel;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  mmm_systolic_array #(.N_BITS(NB)) dut (
    .clk, .rst_n, .modulus, .m_mont, .p_load, .p_load_val,
    .start, .start_bsel, .ready, .done, .p
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [127:0] mulmod(logic [127:0] a, logic [127:0] b,
                                          logic [127:0] n);
    return (a * b) % n;
  endfunction

  // reference values, modulo N, one per queued multiplication
  logic [127:0] n128, rinv, expect_q[$];
  bsel_e        op_q[$];
  longint unsigned start_q[$];

  // checker: runs on every done pulse
  initial begin
    forever begin
      @(posedge clk);
      if (done) begin
        logic [127:0] e;
        longint unsigned t0;
        bsel_e op;
        @(negedge clk);  // P is complete after the done edge
        e  = expect_q.pop_front();
        op = op_q.pop_front();
        t0 = start_q.pop_front();
        check(128'(p) < 2 * n128, $sformatf("result %0h not below 2N", p));
        check(128'(p) % n128 == e, $sformatf("result %0h, expected %0h mod N", p, e));
        if (op == BSEL_ONE) check(128'(p) <= n128, "P*1 above N");
        check(cyc - 1 - t0 == 3 * K - 3,
              $sformatf("done after %0d cycles", cyc - 1 - t0));
      end
    end
  end

  initial begin
    logic [127:0] v, m;
    bsel_e ops [4] = '{BSEL_P, BSEL_M, BSEL_P, BSEL_ONE};
    p_load = 0; start = 0; start_bsel = BSEL_P; p_load_val = '0; m_mont = '0;
    modulus = 32'hffff_fffb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TRIALS; t++) begin
      @(negedge clk);
      modulus = {$urandom()} | 32'h1;
      if (t == 0) modulus = 32'd3;                 // tiny modulus
      if (t == 1) modulus = 32'hffff_ffff;         // largest modulus
      n128 = 128'(modulus);
      rinv = 1;
      for (int i = 0; i < K; i++) rinv = mulmod(rinv, (n128 + 1) / 2, n128);
      m_mont     = K'({$urandom(), $urandom()} % (2 * n128));
      p_load_val = K'({$urandom(), $urandom()} % (2 * n128));
      if (t == 2) p_load_val = K'(2 * n128 - 1);  // largest operands
      if (t == 2) m_mont     = K'(2 * n128 - 1);
      p_load = 1'b1;
      v = 128'(p_load_val) % n128;
      m = 128'(m_mont) % n128;
      @(negedge clk);
      p_load = 1'b0;
      for (int k = 0; k < 4; k++) begin
        // wait for ready, then start immediately (back-to-back chaining)
        while (!ready) @(negedge clk);
        case (ops[k])
          BSEL_P:  v = mulmod(mulmod(v, v, n128), rinv, n128);
          BSEL_M:  v = mulmod(mulmod(v, m, n128), rinv, n128);
          default: v = mulmod(v, rinv, n128);
        endcase
        expect_q.push_back(v);
        op_q.push_back(ops[k]);
        start_q.push_back(cyc);
        start = 1'b1; start_bsel = ops[k];
        @(negedge clk);
        start = 1'b0;
        // ready must stay low for exactly 2K-1 cycles
        for (int c = 1; c < 2 * K; c++) begin
          if (ready) begin
            check(0, $sformatf("ready back after %0d cycles", c));
            break;
          end
          @(negedge clk);
        end
        check(ready, "ready not back after 2K cycles");
      end
      while (expect_q.size() != 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TRIALS * 4 * 3 * K + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
