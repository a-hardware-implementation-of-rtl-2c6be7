// mmm_systolic_array: Montgomery modular multiplier as a linear systolic array.
//
// Computes P <- A * B * 2^-K mod N with K = N_BITS+2 iterations of radix-2
// Montgomery multiplication, where the multiplier A is always the accumulator P
// and the multiplicand B is chosen per multiplication: P itself (squaring),
// the Montgomery-form message M~ (m_mont), or the constant 1. K = N_BITS+2
// makes R = 2^K larger than 4N, so for operands below 2N the result is again
// below 2N and no final subtraction is needed between multiplications (results
// are congruent modulo N, not fully reduced). N must be odd.
//
// Structure: W = N_BITS+2 bit-column PEs (mmm_pe). A feeder injects one token
// into PE 0 every second cycle carrying a_i = P[i]; the token walks towards the
// top PE one column per cycle, so PE j works on iteration i in cycle
// T0 + 2i + j. Each PE writes its column of the final result straight into
// the P register during the last iteration, least significant bit first.
//
// Timing: start is accepted when ready is high (cycle T0). ready returns at
// T0 + 2K, which is exactly when P[0] of the new result is available; P[j] is
// available at T0 + 2K + j, just in time for a chained multiplication started
// at T0 + 2K to use it. Chained multiplications therefore take 2K cycles each
// (2*(N_BITS+2)). done pulses when a multiplication has written its top
// result bit, at T0 + 3K - 2. p_load must only be used while no
// multiplication is in flight.
//
// The use of Montgomery's algorithm and of a systolic array follows the
// document; the skewed two-cycle schedule, the result-in-place P register and
// the K = N_BITS+2 iteration count are this design's choices.
module mmm_systolic_array
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned W     = N_BITS + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] modulus,     // N, odd
  input  logic [W-1:0]      m_mont,      // M~, B operand for BSEL_M
  input  logic              p_load,      // load P from p_load_val
  input  logic [W-1:0]      p_load_val,
  input  logic              start,       // begin P <- P * B(start_bsel) / 2^K
  input  bsel_e             start_bsel,
  output logic              ready,       // a start is accepted this cycle
  output logic              done,        // a multiplication has completed
  output logic [W-1:0]      p            // accumulator / result
);

  localparam int unsigned CW = $clog2(2 * W);
  localparam int unsigned IW = $clog2(W);

  // ---------------- feeder ----------------
  logic [CW-1:0] cnt;        // cycles since start, 0 = idle
  bsel_e         bsel_r;     // B choice of the multiplication being fed
  logic [IW-1:0] feed_idx;   // iteration injected this cycle
  mmm_token_t    tok [W+1];  // tok[j] enters PE j

  assign ready    = (cnt == '0);
  assign feed_idx = ready ? '0 : IW'(cnt >> 1);

  always_comb begin
    tok[0] = '0;
    if ((ready && start) || (!ready && !cnt[0])) begin
      tok[0].valid = 1'b1;
      tok[0].a     = p[feed_idx];
      tok[0].first = (feed_idx == '0);
      tok[0].last  = (feed_idx == IW'(W - 1));
      tok[0].bsel  = ready ? start_bsel : bsel_r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      bsel_r <= BSEL_P;
    end else if (ready) begin
      if (start) begin
        cnt    <= CW'(1);
        bsel_r <= start_bsel;
      end
    end else if (cnt == CW'(2 * W - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + CW'(1);
    end
  end

  // ---------------- PE chain ----------------
  logic [W-1:0] s_link;          // s_link[j]: S bit sent left by PE j
  logic [1:0]   c_link [W+1];    // c_link[j]: carry into column j
  logic [W-1:0] res_we, res_bit, res_hi;
  logic [W-1:0] b_col, n_col;

  assign c_link[0] = 2'b00;

  for (genvar j = 0; j < W; j++) begin : g_pe
    always_comb begin
      unique case (tok[j].bsel)
        BSEL_P:   b_col[j] = p[j];
        BSEL_M:   b_col[j] = m_mont[j];
        BSEL_ONE: b_col[j] = (j == 0);
        default:  b_col[j] = 1'b0;
      endcase
    end
    if (j < N_BITS) begin : g_n
      assign n_col[j] = modulus[j];
    end else begin : g_nz
      assign n_col[j] = 1'b0;
    end

    mmm_pe #(
      .IS_LSB(j == 0),
      .IS_MSB(j == W - 1)
    ) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .tok_in (tok[j]),
      .b_bit  (b_col[j]),
      .n_bit  (n_col[j]),
      .s_in   ((j == W - 1) ? 1'b0 : s_link[(j + 1) % W]),
      .c_in   (c_link[j]),
      .tok_out(tok[j+1]),
      .s_out  (s_link[j]),
      .c_out  (c_link[j+1]),
      .res_we (res_we[j]),
      .res_bit(res_bit[j]),
      .res_hi (res_hi[j])
    );
  end

  // ---------------- result register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0;
    end else if (p_load) begin
      p <= p_load_val;
    end else begin
      for (int j = 1; j < W; j++) begin
        if (res_we[j]) p[j-1] <= res_bit[j];
      end
      if (res_we[W-1]) p[W-1] <= res_hi[W-1];
    end
  end

  assign done = res_we[W-1];

  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                  start |-> ready);
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                   p_load |-> (ready && !start));
  // Montgomery-domain values stay below 2N < 2^(N_BITS+1).
  a_p_range: assert property (@(posedge clk) disable iff (!rst_n)
                              done |=> !p[W-1]);

endmodule
