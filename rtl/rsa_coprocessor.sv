// rsa_coprocessor: RSA co-processor for an embedded host processor.
//
// RSA encryption, decryption and signing all reduce to one operation,
// M^E mod N on wide integers. This core performs that operation in hardware:
// the host writes the modulus N, the message M and the exponent E over a
// 32-bit memory-mapped bus (rsa_bus_if), sets the start bit and polls until
// done, then reads the result. The exponentiation engine (mod_exp) runs
// left-to-right square-and-multiply on a Montgomery multiplier built as a
// linear systolic array of N_BITS+2 one-bit processing elements
// (mmm_systolic_array, mmm_pe), which performs one N_BITS-bit modular
// multiplication every 2*(N_BITS+2) clock cycles.
//
// N_BITS is the key length, 1024 by default; any multiple of 32 works.
// For N_BITS = 1024 a private-key operation with a full-length exponent takes
// about 3.15 million cycles (79 ms at 40 MHz); a public-key operation with
// E = 65537 takes 40 thousand cycles (1 ms).
//
// Bus timing and the register map are described in rsa_bus_if. The key length,
// the Montgomery/systolic structure and the host-bus attachment follow the
// document; the register map and bus timing are this design's own.
module rsa_coprocessor #(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned IW    = (N_BITS / 32 > 4) ? $clog2(N_BITS / 32) : 2,
  localparam int unsigned AW    = IW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata
);

  logic              core_start, core_busy, core_done;
  logic [N_BITS-1:0] core_modulus, core_message, core_exponent, core_result;
  logic [31:0]       core_cycles;

  rsa_bus_if #(.N_BITS(N_BITS)) u_bus (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .core_start, .core_modulus, .core_message, .core_exponent,
    .core_busy, .core_done, .core_result, .core_cycles
  );

  mod_exp #(.N_BITS(N_BITS)) u_exp (
    .clk, .rst_n,
    .start   (core_start),
    .modulus (core_modulus),
    .message (core_message),
    .exponent(core_exponent),
    .busy    (core_busy),
    .done    (core_done),
    .result  (core_result),
    .cycles  (core_cycles)
  );

endmodule
