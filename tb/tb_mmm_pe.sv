// Self-checking testbench for mmm_pe.
//
// Inputs are limited to what the array can present: n_0 = 1 (odd modulus) at
// PE 0, and no operand bits and a carry of at most 1 at the top PE.
// Drives the three kinds of processing element (PE 0, a middle PE and the top
// PE) with every combination of token bits, b_j, n_j, S input, carry input and
// stored carry, and checks one cycle later the S bit sent left, the carry
// sent right, the forwarded token with PE 0's quotient bit, and the result
// write port against the column sum worked out here.
module tb_mmm_pe;
  import rsa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mmm_token_t tin [3], tout [3];
  logic b [3], n [3], s_in [3];
  logic [1:0] c_in [3];
  mmm_token_t tok_out [3];
  logic s_out [3], res_we [3], res_bit [3], res_hi [3];
  logic [1:0] c_out [3];

  mmm_pe #(.IS_LSB(1'b1), .IS_MSB(1'b0)) u_lsb (
    .clk, .rst_n, .tok_in(tin[0]), .b_bit(b[0]), .n_bit(n[0]), .s_in(s_in[0]),
    .c_in(c_in[0]), .tok_out(tok_out[0]), .s_out(s_out[0]), .c_out(c_out[0]),
    .res_we(res_we[0]), .res_bit(res_bit[0]), .res_hi(res_hi[0]));
  mmm_pe #(.IS_LSB(1'b0), .IS_MSB(1'b0)) u_mid (
    .clk, .rst_n, .tok_in(tin[1]), .b_bit(b[1]), .n_bit(n[1]), .s_in(s_in[1]),
    .c_in(c_in[1]), .tok_out(tok_out[1]), .s_out(s_out[1]), .c_out(c_out[1]),
    .res_we(res_we[1]), .res_bit(res_bit[1]), .res_hi(res_hi[1]));
  mmm_pe #(.IS_LSB(1'b0), .IS_MSB(1'b1)) u_msb (
    .clk, .rst_n, .tok_in(tin[2]), .b_bit(b[2]), .n_bit(n[2]), .s_in(s_in[2]),
    .c_in(c_in[2]), .tok_out(tok_out[2]), .s_out(s_out[2]), .c_out(c_out[2]),
    .res_we(res_we[2]), .res_bit(res_bit[2]), .res_hi(res_hi[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) begin
      tin[k] = '0; b[k] = 0; n[k] = 0; s_in[k] = 0; c_in[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      for (int v = 0; v < 512; v++) begin
        logic [1:0] c_prev;
        int s_eff, ab, q, sum, cin;
        // one cycle to set up the stored carry (used by the top PE as S)
        tin[k] = '0; tin[k].valid = 1'b1; tin[k].first = 1'b1;
        tin[k].a = v[8]; b[k] = 1'b1; n[k] = (k == 0); c_in[k] = 2'(v[8] ? 1 : 0);
        @(negedge clk);
        c_prev = c_out[k];
        // an idle cycle: nothing may change
        tin[k] = '0;
        tin[k].bsel = BSEL_M;
        @(negedge clk);
        check(c_out[k] == c_prev, "idle cycle changed the carry");
        // the cycle under test
        tin[k].valid = 1'b1;
        tin[k].a     = v[0];
        tin[k].q     = v[1];
        tin[k].first = v[2];
        tin[k].last  = v[3];
        b[k]         = v[4];
        n[k]         = v[5] | (k == 0);  // N is odd: n_0 = 1
        s_in[k]      = v[6];
        c_in[k]      = {v[7], v[7] & v[8]};
        if (k == 2) begin
          // top column: above the modulus and the operands, carry in at most 1
          b[k] = 1'b0; n[k] = 1'b0; c_in[k] = {1'b0, v[7]};
        end
        s_eff = v[2] ? 0 : (k == 2 ? int'(c_prev[0]) : int'(v[6]));
        ab    = v[0] & b[k];
        q     = (k == 0) ? ((s_eff + ab) % 2) : int'(v[1]);
        cin   = (k == 0) ? 0 : int'(c_in[k]);
        sum   = s_eff + ab + (q & int'(n[k])) + cin;
        #1;
        check(res_we[k] == v[3], "res_we");
        check(res_bit[k] == sum[0] && (k != 2 || res_hi[k] == sum[1]), "result bits");
        @(negedge clk);
        check(s_out[k] == sum[0], $sformatf("PE%0d v=%0h s_out", k, v));
        check(c_out[k] == 2'(sum >> 1), $sformatf("PE%0d v=%0h c_out %0d, expected %0d",
                                                  k, v, c_out[k], sum >> 1));
        check(tok_out[k].valid && tok_out[k].a == v[0] && tok_out[k].q == q[0] &&
              tok_out[k].first == v[2] && tok_out[k].last == v[3],
              $sformatf("PE%0d v=%0h token", k, v));
        if (k == 0) check(sum[0] == 0, "PE 0 column sum odd");
        tin[k] = '0;
        @(negedge clk);
        check(!tok_out[k].valid, "token valid without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 512 * 5 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
