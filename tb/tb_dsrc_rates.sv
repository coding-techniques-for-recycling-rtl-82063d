// DSRC data-rate workloads for sols_encoder.
//
// The three DSRC bit rates, 500 kb/s, 4 Mb/s and 27 Mb/s, are run one
// after the other, each in FM0 and in Manchester mode, with a random frame
// of FRAME_BITS bits. The bit clock period is set to 1 / rate (2000 ns,
// 250 ns, 37.037 ns); the encoder sends one bit per clock period.
//
// The line signal is checked by a receiver-side view written from the code
// definitions: each bit's two half-bit levels are sampled at a quarter and
// three quarters of the period and decoded (FM0: equal halves = 1, a level
// change = 0; Manchester: the second half is the bit). The bench checks
//   - the decoded bits equal the sent frame,
//   - FM0 changes level at every bit boundary,
//   - the line stays balanced: the running sum of half-bit levels (+1 / -1)
//     stays within +/-2 half-bits for FM0 and returns to 0 after every
//     Manchester bit,
//   - the frame takes exactly FRAME_BITS periods, i.e. the rate is met.
`timescale 1ns/1ps
module tb_dsrc_rates;
  import sols_pkg::*;

  localparam int FRAME_BITS      = 256;
  localparam int WATCHDOG_CYCLES = 10 * FRAME_BITS;
  localparam int NRATES          = 3;
  localparam realtime PERIOD [NRATES] = '{2000.0ns, 250.0ns, 37.037ns};
  localparam int      RATE_KBPS [NRATES] = '{500, 4000, 27000};

  logic       clk;
  logic       clr;
  code_mode_e mode;
  logic       x;
  logic       code_out;

  realtime half;
  int checks = 0;
  int failures = 0;

  sols_encoder dut (
    .clk      (clk),
    .clr      (clr),
    .mode     (mode),
    .x        (x),
    .code_out (code_out)
  );

  initial begin : clock_gen
    clk = 1'b1;
    half = PERIOD[0] / 2;
    forever #(half) clk = ~clk;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (t=%0.3f ns)", msg, $realtime / 1ns);
  endtask

  // Send one frame at the current rate and mode; decode and check it.
  task automatic run_frame(input int r, input code_mode_e m);
    logic [FRAME_BITS-1:0] frame;
    logic a, b, prev_b, have_prev, dec;
    int disparity, worst, bit_errors, boundary_errors;
    realtime t0, t1;
    for (int i = 0; i < FRAME_BITS; i++) frame[i] = 1'($urandom);
    // Switch: clr high while the mode changes; FM0 then releases clr.
    @(posedge clk);
    #(1ns);
    clr  = 1'b1;
    mode = m;
    #(1ns);
    if (m == MODE_FM0) clr = 1'b0;
    disparity = 0; worst = 0; bit_errors = 0; boundary_errors = 0;
    have_prev = 1'b0; prev_b = 1'b0;
    @(posedge clk);
    t0 = $realtime;
    for (int i = 0; i < FRAME_BITS; i++) begin
      #(1ns);
      x = frame[i];
      #(half / 2 - 1ns);
      a = code_out;
      #(half);
      b = code_out;
      dec = (m == MODE_FM0) ? (a == b) : b;
      if (dec != frame[i]) bit_errors++;
      if (m == MODE_FM0 && have_prev && a == prev_b) boundary_errors++;
      disparity += (a ? 1 : -1) + (b ? 1 : -1);
      if (disparity > worst)  worst = disparity;
      if (-disparity > worst) worst = -disparity;
      if (m == MODE_MANCHESTER && disparity != 0) worst = 99;
      prev_b = b; have_prev = 1'b1;
      @(posedge clk);
    end
    t1 = $realtime;
    checks++;
    if (bit_errors != 0)
      fail($sformatf("%0d kb/s %s: %0d decoded bits wrong", RATE_KBPS[r], m.name(), bit_errors));
    checks++;
    if (boundary_errors != 0)
      fail($sformatf("%0d kb/s %s: %0d missing boundary changes", RATE_KBPS[r], m.name(), boundary_errors));
    checks++;
    if (worst > 2)
      fail($sformatf("%0d kb/s %s: line imbalance %0d half-bits", RATE_KBPS[r], m.name(), worst));
    checks++;
    // The half period is rounded to the 1 ps time step: allow 2 ps per bit.
    if ((t1 - t0) > FRAME_BITS * (PERIOD[r] + 2ps) || (t1 - t0) < FRAME_BITS * (PERIOD[r] - 2ps))
      fail($sformatf("%0d kb/s %s: frame took %0.3f ns, expected %0.3f ns", RATE_KBPS[r], m.name(),
                     (t1 - t0) / 1ns, FRAME_BITS * PERIOD[r] / 1ns));
    $display("%0d kb/s %s: %0d bits in %0.3f ns, worst imbalance %0d half-bits",
             RATE_KBPS[r], m.name(), FRAME_BITS, (t1 - t0) / 1ns, worst);
  endtask

  initial begin : watchdog
    repeat (2 * NRATES * WATCHDOG_CYCLES) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    clr = 1'b1;
    mode = MODE_FM0;
    x = 1'b0;
    for (int r = 0; r < NRATES; r++) begin
      @(posedge clk);
      half = PERIOD[r] / 2;   // takes effect from the next clock edge
      repeat (2) @(posedge clk);
      run_frame(r, MODE_FM0);
      run_frame(r, MODE_MANCHESTER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
