// Self-checking testbench for rsa_bus_if.
//
// A 96-bit interface (three words per operand, so word index 3 does not
// exist) with the engine side driven by the testbench. Checks: random word
// writes reach the modulus, message and exponent outputs and read back; the
// result and cycle count read back word by word; the width word; the start
// pulse (one cycle, only from a write of bit 0 to control word 0, never while
// busy); operand writes ignored while busy; the done flag set by the engine's
// done pulse and cleared by the next start; missing words read as zero.
module tb_rsa_bus_if;
  localparam int unsigned NB    = 96;
  localparam int unsigned WORDS = NB / 32;
  localparam int unsigned IW    = 2;
  localparam int unsigned AW    = IW + 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] avs_address = '0;
  logic          avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0]   avs_writedata = '0, avs_readdata;
  logic          core_start, core_busy = 1'b0, core_done = 1'b0;
  logic [NB-1:0] core_modulus, core_message, core_exponent, core_result = '0;
  logic [31:0]   core_cycles = '0;

  int checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (core_start) starts++;

  rsa_bus_if #(.N_BITS(NB)) dut (
    .clk, .rst_n, .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .core_start, .core_modulus, .core_message, .core_exponent,
    .core_busy, .core_done, .core_result, .core_cycles
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

  initial begin
    logic [NB-1:0] n, m, e, r;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      n = {$urandom(), $urandom(), $urandom()};
      m = {$urandom(), $urandom(), $urandom()};
      e = {$urandom(), $urandom(), $urandom()};
      for (int w = WORDS - 1; w >= 0; w--) begin
        bus_write(3'd1, w, n[32*w +: 32]);
        bus_write(3'd2, w, m[32*w +: 32]);
        bus_write(3'd3, w, e[32*w +: 32]);
      end
      check(core_modulus == n && core_message == m && core_exponent == e,
            "operand registers");
      for (int w = 0; w < WORDS; w++) begin
        bus_read(3'd1, w, d); check(d == n[32*w +: 32], "modulus read-back");
        bus_read(3'd2, w, d); check(d == m[32*w +: 32], "message read-back");
        bus_read(3'd3, w, d); check(d == e[32*w +: 32], "exponent read-back");
      end
      bus_read(3'd3, 3, d); check(d == 0, "missing word not zero");
      // start: exactly one pulse
      starts = 0;
      bus_write(3'd0, 0, 32'h0);
      bus_write(3'd0, 1, 32'h1);
      check(starts == 0, "start from a write without the start bit");
      bus_write(3'd0, 0, 32'h1);
      check(starts == 1, $sformatf("%0d start pulses", starts));
      bus_read(3'd0, 0, d); check(d[1] == 1'b0, "done not cleared by start");
      core_busy = 1'b1;
      bus_read(3'd0, 0, d); check(d[1:0] == 2'b01, "status busy");
      bus_write(3'd0, 0, 32'h1);
      check(starts == 1, "start accepted while busy");
      bus_write(3'd2, 1, ~m[63:32]);
      check(core_message == m, "message written while busy");
      // engine completes
      r = {$urandom(), $urandom(), $urandom()};
      @(negedge clk);
      core_result = r; core_cycles = $urandom(); core_busy = 1'b0; core_done = 1'b1;
      @(negedge clk);
      core_done = 1'b0;
      bus_read(3'd0, 0, d); check(d[1:0] == 2'b10, "status done");
      bus_read(3'd0, 1, d); check(d == core_cycles, "cycle count");
      for (int w = 0; w < WORDS; w++) begin
        bus_read(3'd4, w, d); check(d == r[32*w +: 32], "result read-back");
      end
      bus_write(3'd4, 0, 32'h1234);
      bus_read(3'd4, 0, d); check(d == r[31:0], "result is writable");
    end
    bus_read(3'd0, 2, d); check(d == NB, "width word");
    bus_read(3'd0, 3, d); check(d == 0, "unused control word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
