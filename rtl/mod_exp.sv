// mod_exp: modular exponentiation engine, result = M^E mod N.
//
// Left-to-right binary square-and-multiply on the systolic Montgomery
// multiplier (mmm_systolic_array), in four phases:
//   1. CONV   M~ = M * 2^K mod N with K = N_BITS+2, by K shift-and-subtract
//             steps (double, subtract N if not below N), one step per cycle.
//   2. EXP    P starts as M~, which accounts for the leading one of E. For each
//             lower exponent bit, from the top down: P <- P*P (squaring) and,
//             if the bit is set, P <- P*M~. Multiplications are issued
//             back-to-back, each as soon as the array is ready, so a chain of
//             them costs 2K cycles per multiplication.
//   3. FINAL  P <- P*1 leaves the Montgomery domain; the value is then at most N.
//   4. FIX    a value equal to N becomes 0 (possible only when M^E = 0 mod N,
//             which needs a modulus with a repeated prime factor).
// E = 0 gives 1 (0 if N = 1) without using the multiplier.
//
// Interface: hold modulus, message and exponent stable from start until done.
// N must be odd and M below N. busy is high from the cycle after start until
// done, which pulses for one cycle together with a valid result. cycles holds
// the length of the last operation in clock cycles.
//
// Timing, for an exponent whose top set bit is bit t and with h set bits,
// counted from the cycle start is sampled to the cycle done is high:
//   cycles = (K + 2) + 2K * (t + h - 1) + (3K - 1)   when E != 0, 1 when E = 0.
// For N_BITS = 1024 and a full-length exponent with about 512 set bits that is
// about 3.15 million cycles, 79 ms at 40 MHz.
//
// That the engine is Montgomery-based modular exponentiation follows the
// document; the binary method, the conversion by shift-and-subtract and the
// handling of E = 0 and of a result equal to N are this design's choices.
module mod_exp
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned W     = N_BITS + 2,
  localparam int unsigned EW    = $clog2(N_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] modulus,
  input  logic [N_BITS-1:0] message,
  input  logic [N_BITS-1:0] exponent,
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] result,
  output logic [31:0]       cycles
);

  typedef enum logic [2:0] {
    S_IDLE, S_CONV, S_LOAD, S_SQR, S_MUL, S_FINAL, S_WAIT, S_FIX
  } state_e;

  state_e state;

  // array interface
  logic          mm_start, mm_ready, mm_done, mm_load;
  bsel_e         mm_bsel;
  logic [W-1:0]  p, m_mont;

  // conversion register and step counter
  logic [N_BITS:0]   x;
  logic [N_BITS:0]   x_dbl;
  logic [EW+1:0]     conv_cnt;
  logic [EW-1:0]     bit_idx;    // exponent bit handled next
  logic [EW-1:0]     msb;        // index of the top set exponent bit
  logic              e_zero;
  logic [1:0]        in_flight;  // multiplications issued, not yet done

  always_comb begin
    msb    = '0;
    e_zero = 1'b1;
    for (int i = 0; i < N_BITS; i++) begin
      if (exponent[i]) begin
        msb    = EW'(i);
        e_zero = 1'b0;
      end
    end
  end

  // x < N, so 2x < 2N: one conditional subtraction reduces it.
  always_comb begin
    x_dbl = {x[N_BITS-1:0], 1'b0};
    if (x_dbl >= {1'b0, modulus}) x_dbl = x_dbl - {1'b0, modulus};
  end

  mmm_systolic_array #(.N_BITS(N_BITS)) u_mmm (
    .clk       (clk),
    .rst_n     (rst_n),
    .modulus   (modulus),
    .m_mont    (m_mont),
    .p_load    (mm_load),
    .p_load_val(W'(x)),
    .start     (mm_start),
    .start_bsel(mm_bsel),
    .ready     (mm_ready),
    .done      (mm_done),
    .p         (p)
  );

  always_comb begin
    mm_start = 1'b0;
    mm_bsel  = BSEL_P;
    mm_load  = (state == S_LOAD);
    unique case (state)
      S_SQR:   begin mm_start = mm_ready; mm_bsel = BSEL_P;   end
      S_MUL:   begin mm_start = mm_ready; mm_bsel = BSEL_M;   end
      S_FINAL: begin mm_start = mm_ready; mm_bsel = BSEL_ONE; end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      x         <= '0;
      m_mont    <= '0;
      conv_cnt  <= '0;
      bit_idx   <= '0;
      in_flight <= '0;
      done      <= 1'b0;
      result    <= '0;
      cycles    <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 32'd1;
      in_flight <= in_flight + 2'(mm_start) - 2'(mm_done);

      unique case (state)
        S_IDLE: begin
          if (start) begin
            cycles <= 32'd1;
            if (e_zero) begin
              result <= N_BITS'(modulus != N_BITS'(1));
              done   <= 1'b1;
            end else begin
              x        <= {1'b0, message};
              conv_cnt <= '0;
              bit_idx  <= msb;
              state    <= S_CONV;
            end
          end
        end
        S_CONV: begin
          x        <= x_dbl;
          conv_cnt <= conv_cnt + 1'b1;
          if (conv_cnt == (EW + 2)'(W - 1)) state <= S_LOAD;
        end
        S_LOAD: begin
          m_mont <= W'(x);
          if (bit_idx == '0) begin
            state <= S_FINAL;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= S_SQR;
          end
        end
        S_SQR: begin
          if (mm_ready) begin
            if (exponent[bit_idx]) begin
              state <= S_MUL;
            end else if (bit_idx == '0) begin
              state <= S_FINAL;
            end else begin
              bit_idx <= bit_idx - 1'b1;
            end
          end
        end
        S_MUL: begin
          if (mm_ready) begin
            if (bit_idx == '0) begin
              state <= S_FINAL;
            end else begin
              bit_idx <= bit_idx - 1'b1;
              state   <= S_SQR;
            end
          end
        end
        S_FINAL: begin
          if (mm_ready) state <= S_WAIT;
        end
        S_WAIT: begin
          if (mm_done && in_flight == 2'd1) state <= S_FIX;
        end
        S_FIX: begin
          // P*1 is at most N; it equals N only when M^E = 0 (mod N).
          if (p == W'(modulus)) result <= '0;
          else                  result <= p[N_BITS-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: ;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy);
  a_odd_modulus: assert property (@(posedge clk) disable iff (!rst_n)
                                  (start && !e_zero) |-> modulus[0]);

endmodule

