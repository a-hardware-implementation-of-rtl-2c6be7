// rsa_bus_if: host bus interface of the RSA co-processor.
//
// A 32-bit memory-mapped slave with the timing of an Avalon-MM slave without
// wait states: a write is taken in the cycle avs_write is high, and readdata
// is valid in the same cycle as avs_read (read latency 0). It holds the
// operands of the exponentiation engine and lets the host processor load them
// one 32-bit word at a time, least significant word at index 0.
//
// Word address = {region, index}, index being the word of a wide operand:
//   region 0 (control)  index 0  write: bit 0 = start
//                                read:  bit 0 = busy, bit 1 = done
//                       index 1  read:  clock cycles of the last operation
//                       index 2  read:  operand width N_BITS
//   region 1  modulus N     read/write
//   region 2  message M     read/write
//   region 3  exponent E    read/write
//   region 4  result M^E mod N, read only
// Operand writes and start are ignored while the engine is busy, so the
// engine always sees stable operands. done is set when an operation ends and
// cleared by the next start. Words that do not exist read as zero.
//
// The interface module itself, connecting the core to a Nios II host, is
// named by the document; the register map and the bus timing are this
// design's own.
module rsa_bus_if
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned WORDS = N_BITS / 32,
  localparam int unsigned IW    = (WORDS > 4) ? $clog2(WORDS) : 2,
  localparam int unsigned AW    = IW + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic [AW-1:0]     avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  // exponentiation engine
  output logic              core_start,
  output logic [N_BITS-1:0] core_modulus,
  output logic [N_BITS-1:0] core_message,
  output logic [N_BITS-1:0] core_exponent,
  input  logic              core_busy,
  input  logic              core_done,
  input  logic [N_BITS-1:0] core_result,
  input  logic [31:0]       core_cycles
);

  reg_region_e   region;
  logic [IW-1:0] index;
  logic          done_flag;

  assign region = reg_region_e'(avs_address[AW-1:IW]);
  assign index  = avs_address[IW-1:0];

  // word `index` of a wide operand, zero beyond its end
  function automatic logic [31:0] word_of(logic [N_BITS-1:0] v, logic [IW-1:0] i);
    if (32'(i) >= WORDS) return '0;
    return v[32*i +: 32];
  endfunction

  assign core_start = avs_write && region == REG_CTRL && index == '0 &&
                      avs_writedata[0] && !core_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_modulus  <= '0;
      core_message  <= '0;
      core_exponent <= '0;
      done_flag     <= 1'b0;
    end else begin
      if (core_start)     done_flag <= 1'b0;
      else if (core_done) done_flag <= 1'b1;
      if (avs_write && !core_busy && 32'(index) < WORDS) begin
        unique case (region)
          REG_MOD: core_modulus [32*index +: 32] <= avs_writedata;
          REG_MSG: core_message [32*index +: 32] <= avs_writedata;
          REG_EXP: core_exponent[32*index +: 32] <= avs_writedata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    avs_readdata = '0;
    if (avs_read) begin
      unique case (region)
        REG_CTRL: begin
          if (index == IW'(0))      avs_readdata = {30'd0, done_flag, core_busy};
          else if (index == IW'(1)) avs_readdata = core_cycles;
          else if (index == IW'(2)) avs_readdata = 32'(N_BITS);
        end
        REG_MOD:    avs_readdata = word_of(core_modulus, index);
        REG_MSG:    avs_readdata = word_of(core_message, index);
        REG_EXP:    avs_readdata = word_of(core_exponent, index);
        REG_RESULT: avs_readdata = word_of(core_result, index);
        default:    avs_readdata = '0;
      endcase
    end
  end

  initial begin
    if (N_BITS % 32 != 0 || N_BITS < 32)
      $fatal(1, "N_BITS must be a positive multiple of 32");
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n)
                            !(avs_read && avs_write));

endmodule
