// End-to-end self-checking testbench of sols_encoder, at its defaults.
//
// The bench drives one data bit per clk period (changed 1 ns after the rising
// edge), samples code_out at a quarter and at three quarters of the period
// (first and second half-bit) and compares both levels with a reference
// model written from the code definitions, not from the encoder's netlist:
//   FM0        first half = inverse of the previous second half (a level
//              change at every bit boundary); second half = first half
//              for a 1, its inverse for a 0.
//   Manchester first half = ~x, second half = x.
// Because each bit's levels are checked in the same period in which the bit
// is presented, the zero-cycle latency is checked too.
//
// Sequence: clear, the five-bit FM0 example 0 1 1 0 1, random FM0 data,
// a switch to Manchester (clr held high), random Manchester data, a switch
// back to FM0 (clr released, state initialised), more FM0 data, then a
// mid-stream clear. Each mechanism (FM0 mid-bit change for a 0, no change
// for a 1, boundary change, Manchester bit, mode switch in each direction,
// clear) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_sols_encoder;
  import sols_pkg::*;

  localparam realtime HALF = 10ns;
  localparam int      WATCHDOG_CYCLES = 5000;

  logic       clk;
  logic       clr = 1'b1;
  code_mode_e mode = MODE_FM0;
  logic       x = 1'b0;
  logic       code_out;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  // Mechanism counters.
  int n_rule1 = 0, n_rule2 = 0, n_rule3 = 0, n_manch = 0;
  int n_to_manch = 0, n_to_fm0 = 0, n_clear = 0;

  sols_encoder dut (
    .clk      (clk),
    .clr      (clr),
    .mode     (mode),
    .x        (x),
    .code_out (code_out)
  );

  initial begin : clock_gen
    clk = 1'b1;
    forever #(HALF) clk = ~clk;
  end
  always @(posedge clk) cycles <= cycles + 1;

  // Reference state: level of the last FM0 half-bit sent.
  logic ref_last;
  logic have_last;   // a previous FM0 bit exists for the boundary check
  logic seen_last;   // last second-half level actually observed

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (cycle %0d, mode %s, x %0b)",
               what, got, exp, cycles, mode.name(), x);
    end
  endtask

  // Present one bit for one full period, starting right after a rising edge.
  task automatic send_bit(input logic b);
    logic exp_a, exp_b, got_a, got_b;
    x = b;
    if (mode == MODE_FM0) begin
      exp_a = ~ref_last;
      exp_b = b ? exp_a : ~exp_a;
    end else begin
      exp_a = ~b;
      exp_b = b;
    end
    #(HALF / 2 - 1ns);
    got_a = code_out;
    check("first half", got_a, exp_a);
    #(HALF);
    got_b = code_out;
    check("second half", got_b, exp_b);
    if (mode == MODE_FM0) begin
      if (have_last && got_a != seen_last) n_rule3++;
      if (have_last) check("boundary change", got_a, ~seen_last);
      if (b == 1'b0 && got_a != got_b) n_rule1++;
      if (b == 1'b1 && got_a == got_b) n_rule2++;
      have_last = 1'b1;
      ref_last  = exp_b;
    end else begin
      if (got_a != got_b) n_manch++;
    end
    seen_last = got_b;
    @(posedge clk);
    #1ns;
  endtask

  task automatic go_manchester();
    clr  = 1'b1;
    mode = MODE_MANCHESTER;
    have_last = 1'b0;
    n_to_manch++;
  endtask

  task automatic go_fm0();
    // Change mode while clr is still high, then release clr.
    mode = MODE_FM0;
    #1ns;
    clr = 1'b0;
    ref_last  = 1'b0;   // cleared state: first half of the first bit is 1
    have_last = 1'b0;
    n_to_fm0++;
    n_clear++;
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int start_cycle;
    logic [4:0] fig_bits;
    ref_last  = 1'b0;
    have_last = 1'b0;
    seen_last = 1'b0;
    repeat (2) @(posedge clk);
    #1ns;

    // FM0 from a clear, with the example pattern 0 1 1 0 1.
    go_fm0();
    fig_bits = 5'b10110;   // bit 0 first
    start_cycle = cycles;
    for (int i = 0; i < 5; i++) send_bit(fig_bits[i]);
    checks++;
    if (cycles - start_cycle != 5) begin
      failures++;
      $display("FAIL rate: 5 bits took %0d cycles", cycles - start_cycle);
    end

    // Random FM0 data.
    for (int i = 0; i < 200; i++) send_bit(1'($urandom));

    // Manchester.
    go_manchester();
    start_cycle = cycles;
    for (int i = 0; i < 200; i++) send_bit(1'($urandom));
    checks++;
    if (cycles - start_cycle != 200) begin
      failures++;
      $display("FAIL rate: 200 Manchester bits took %0d cycles", cycles - start_cycle);
    end

    // Back to FM0: clr release initialises the state.
    go_fm0();
    for (int i = 0; i < 200; i++) send_bit(1'($urandom));

    // Clear in the middle of an FM0 stream.
    clr = 1'b1;
    @(posedge clk);
    #1ns;
    clr = 1'b0;
    ref_last  = 1'b0;
    have_last = 1'b0;
    n_clear++;
    for (int i = 0; i < 50; i++) send_bit(1'($urandom));

    $display("mechanisms: rule1=%0d rule2=%0d rule3=%0d manchester=%0d to_manchester=%0d to_fm0=%0d clear=%0d",
             n_rule1, n_rule2, n_rule3, n_manch, n_to_manch, n_to_fm0, n_clear);
    checks++; if (n_rule1 == 0)    begin failures++; $display("FAIL FM0 rule 1 never seen"); end
    checks++; if (n_rule2 == 0)    begin failures++; $display("FAIL FM0 rule 2 never seen"); end
    checks++; if (n_rule3 == 0)    begin failures++; $display("FAIL FM0 rule 3 never seen"); end
    checks++; if (n_manch == 0)    begin failures++; $display("FAIL Manchester never seen"); end
    checks++; if (n_to_manch == 0) begin failures++; $display("FAIL no switch to Manchester"); end
    checks++; if (n_to_fm0 < 2)    begin failures++; $display("FAIL no switch back to FM0"); end
    checks++; if (n_clear < 3)     begin failures++; $display("FAIL clear not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
