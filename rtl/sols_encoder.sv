// Fully reused FM0 / Manchester encoder (similarity-oriented logic
// simplification).
//
// One data bit x is encoded per clk period into two half-bit levels on
// code_out: the first half-bit while clk is high, the second while clk is low.
// The same five components produce both codes:
//   DFF   b_q      level of the second half-bit of the previous FM0 bit
//   XOR   b_next   = b_q ^ x
//   NOT   a_inv    inverts the first-half source
//   MUX   mode     first-half source: b_q (FM0) or b_next (Manchester)
//   MUX   clk      code_out = clk ? first half : second half
//
// FM0 (mode = MODE_FM0, clr low):
//   first half  A = ~b_q             level always changes at a bit boundary
//   second half B = b_q ^ x          x = 0: B = ~A (change mid-bit)
//                                    x = 1: B =  A (no change mid-bit)
//   b_q <= B at the rising clk edge that ends the bit.
// Manchester (mode = MODE_MANCHESTER, clr held high so b_q = 0):
//   b_next = x, code_out = clk ? ~x : x, i.e. code_out = x ^ clk.
//
// The FM0 rules and the idea of one datapath in which every component works
// in both modes, with five components in all, follow the published
// architecture this encoder is built from. The gate
// netlist, the Manchester polarity (x ^ clk: a 1 is sent low then high), the
// Mode encoding and CLR being active-high and asynchronous are this design's
// own choices.
//
// Interface and timing:
//   clk       bit clock; one bit per period, high phase first. It also
//             drives the output multiplexer, so code_out is combinational
//             in clk, x, mode and b_q (zero latency: bit x is sent in the
//             period in which it is presented).
//   clr       active-high asynchronous clear of b_q. Hold it high for the
//             whole time mode is MODE_MANCHESTER; releasing it starts FM0
//             from b_q = 0, so the first FM0 bit begins with a high half.
//   mode      MODE_FM0 or MODE_MANCHESTER; change it only while clr is high.
//   x         data bit, stable from just after one rising clk edge to the
//             next.
//   code_out  encoded line level.
// Because clk is used as data, code_out can glitch at clk edges; a
// downstream stage should sample it away from the edges, as a real line
// driver would see it.
`timescale 1ns/1ps

module sols_encoder
  import sols_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  code_mode_e mode,
  input  logic       x,
  output logic       code_out
);

  logic b_q;      // second half-bit level of the previous FM0 bit
  logic b_next;   // output of the shared XOR
  logic a_src;    // first-half source, before inversion
  logic a_inv;    // first half-bit level

  // Shared XOR: FM0 second half / next state, and Manchester data path
  // (b_q is held at 0 by clr in Manchester mode).
  assign b_next = b_q ^ x;

  // Mode multiplexer and the inverter.
  assign a_src = (mode == MODE_MANCHESTER) ? b_next : b_q;
  assign a_inv = ~a_src;

  // Half-bit multiplexer controlled by the clock level.
  assign code_out = clk ? a_inv : b_next;

  // State flip-flop with asynchronous clear.
  always_ff @(posedge clk or posedge clr) begin
    if (clr) b_q <= 1'b0;
    else     b_q <= b_next;
  end

  // Manchester mode relies on clr holding b_q at 0 (deferred check, so a
  // simultaneous change of mode and clr does not trip it).
  always_comb begin
    a_manchester_needs_clr: assert final (mode != MODE_MANCHESTER || clr)
      else $error("sols_encoder: Manchester mode with clr low");
  end

endmodule
