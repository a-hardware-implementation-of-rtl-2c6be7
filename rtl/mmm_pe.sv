// mmm_pe: one bit column of the systolic Montgomery multiplier.
//
// Radix-2 Montgomery multiplication runs k iterations of
//     q_i     = (S_i + a_i*B) mod 2
//     S_{i+1} = (S_i + a_i*B + q_i*N) / 2
// PE j owns bit column j of that sum. When a token arrives (tok_in.valid) it
// adds S_i[j], a_i*b_j, q_i*n_j and the carry from column j-1, keeps the low
// bit as S_{i+1}[j-1] (sent left, to PE j-1) and the high part as the carry
// into column j+1 (sent right). With three one-bit terms and a carry the column
// sum is at most 5, so the carry is two bits wide.
//
// PE 0 (IS_LSB) has no carry in and decides q_i itself, which makes its
// column sum even; it writes q_i into the token it passes on. The top PE
// (IS_MSB) has no neighbour on its left-hand side in bit order: its own carry
// out of iteration i is S_{i+1}[top], so it feeds its carry back as its S input.
//
// Timing: every output is a register written only in a cycle in which the PE
// holds a token, and read by the neighbour in the next cycle. The token itself
// moves one PE per cycle. In the array a PE holds a token at most every second
// cycle, so the S bit it sends left is read before it is overwritten.
// On the last iteration (tok_in.last) res_we is raised in the same cycle and
// res_bit/res_hi carry the final result bits of this column.
//
// The systolic array and the Montgomery recurrence follow the document; the
// bit-level cell, its two-bit carry and the token format are this design's own.
module mmm_pe
  import rsa_pkg::*;
#(
  parameter bit IS_LSB = 1'b0,
  parameter bit IS_MSB = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mmm_token_t tok_in,   // token from PE j-1 (or the feeder for PE 0)
  input  logic       b_bit,    // b_j of the B operand chosen by tok_in.bsel
  input  logic       n_bit,    // n_j of the modulus
  input  logic       s_in,     // S_i[j], produced by PE j+1 one cycle earlier
  input  logic [1:0] c_in,     // carry into column j from PE j-1
  output mmm_token_t tok_out,  // token to PE j+1
  output logic       s_out,    // S_{i+1}[j-1], to PE j-1
  output logic [1:0] c_out,    // carry into column j+1
  output logic       res_we,   // final iteration: write the result bits
  output logic       res_bit,  // result bit j-1
  output logic       res_hi    // result bit j (used by the top PE only)
);

  mmm_token_t tok_r;
  logic       s_r;
  logic [1:0] c_r;

  logic       s_cur;   // S_i[j] as seen this iteration
  logic       q_cur;   // q_i
  logic       ab;      // a_i AND b_j
  logic [2:0] sum;     // column sum, at most 5

  always_comb begin
    if (tok_in.first)  s_cur = 1'b0;
    else if (IS_MSB)   s_cur = c_r[0];
    else               s_cur = s_in;
    ab    = tok_in.a & b_bit;
    q_cur = IS_LSB ? (s_cur ^ ab) : tok_in.q;
    sum   = 3'(s_cur) + 3'(ab) + 3'(q_cur & n_bit) + (IS_LSB ? 3'd0 : 3'(c_in));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_r <= '0;
      s_r   <= 1'b0;
      c_r   <= 2'b00;
    end else begin
      tok_r <= tok_in;
      if (IS_LSB) tok_r.q <= q_cur;
      if (tok_in.valid) begin
        s_r <= sum[0];
        c_r <= sum[2:1];
      end
    end
  end

  assign tok_out = tok_r;
  assign s_out   = s_r;
  assign c_out   = c_r;
  assign res_we  = tok_in.valid & tok_in.last;
  assign res_bit = sum[0];
  assign res_hi  = sum[1];

  if (IS_LSB) begin : g_lsb_check
    // PE 0 picks q so that its column sum is even (N is odd, so n_0 = 1).
    a_lsb_even: assert property (@(posedge clk) disable iff (!rst_n)
                                 (tok_in.valid && n_bit) |-> !sum[0]);
  end
  if (IS_MSB) begin : g_msb_check
    // The top column never carries more than one bit (S stays below 2^(n+2)).
    a_msb_carry: assert property (@(posedge clk) disable iff (!rst_n)
                                  tok_in.valid |-> !sum[2]);
  end

endmodule
