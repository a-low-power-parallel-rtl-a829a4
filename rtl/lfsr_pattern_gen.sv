// lfsr_pattern_gen: pseudo-random test-pattern generator built from a
// Fibonacci LFSR, with the generated bit stream shifted into a wide output.
//
// How it works: a single OUT_W-bit register shifts left by one every clock
// and takes the new bit at bit 0. The new bit is the XOR (or, with
// USE_XNOR = 1, the XNOR) of the register bits selected by TAPS, all of
// which lie in the low LFSR_W bits; those low bits therefore form the LFSR
// proper and the bits above them hold the last OUT_W - LFSR_W bits it produced.
// The defaults give a 4-bit maximal-length LFSR: new = q[2] ^ q[3], i.e.
// s[n] = s[n-3] ^ s[n-4], characteristic polynomial x^4 + x + 1, period
// 2^4 - 1 = 15. A lock-up state (all zeros for XOR feedback, all ones for
// XNOR) never changes, so SEED must avoid it in its low LFSR_W bits.
//
// Interface: clk, rst (synchronous, active high, loads SEED), lfsr_out
// (register contents; a new pattern every clock).
//
// The LFSR width, the 32-bit output, the recurrence and the XNOR option
// follow the patterns this generator is meant to reproduce; the seed and the
// synchronous reset are this design's choices.
module lfsr_pattern_gen #(
  parameter int               LFSR_W   = 4,
  parameter int               OUT_W    = 32,
  parameter logic [LFSR_W-1:0] TAPS    = 4'b1100,
  parameter bit               USE_XNOR = 1'b0,
  parameter logic [OUT_W-1:0] SEED     = 32'h1
) (
  input  logic             clk,
  input  logic             rst,
  output logic [OUT_W-1:0] lfsr_out
);

  logic fb;

  assign fb = USE_XNOR ? ~^(lfsr_out[LFSR_W-1:0] & TAPS) : ^(lfsr_out[LFSR_W-1:0] & TAPS);

  always_ff @(posedge clk) begin
    if (rst) lfsr_out <= SEED;
    else     lfsr_out <= {lfsr_out[OUT_W-2:0], fb};
  end

endmodule
