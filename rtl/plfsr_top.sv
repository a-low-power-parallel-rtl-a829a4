// plfsr_top: LFSR demonstration chip. Two independent parts share the clock
// and reset:
//
//  * a pseudo-random pattern generator (lfsr_pattern_gen): a 4-bit
//    maximal-length LFSR whose bit stream shifts into the 32-bit lfsr_out;
//  * a low-power CRC unit: the 32-bit input word ip is treated as one
//    message and divided, P = 8 bits per clock, by a transformed p-parallel
//    LFSR (plfsr_transformed) with g(x) = x^8 + x^2 + x + 1. The 8-bit
//    remainder appears on crcop.
//
// How the CRC side is sequenced: a beat counter runs freely from reset. On
// beat 0 the engine restarts, and beat k carries ip[MSG_W-1-k*P -: P], so the
// word is consumed most significant bit first over BEATS = MSG_W/P clocks.
// Messages follow each other with no gap: a new word is taken every BEATS
// clocks, and ip must be held steady for those clocks (it is not latched).
// One clock after a word's last beat, crcop is updated and crc_valid pulses
// for one clock; crcop keeps its value until the next update.
//
// Timing with the defaults: after rst falls, the first beat is taken at the
// first rising edge, a word is taken every 4 clocks, and its CRC appears on
// crcop 4 clocks after the edge that took its first beat (one clock after
// the edge that took its last beat).
//
// The ports clk, rst, ip[31:0], lfsr_out[31:0] and crcop[7:0] follow the
// reference design's pin-out; crc_valid, the CRC polynomial, P = 8 and the
// free-running sequencing are this design's choices.
module plfsr_top #(
  parameter int            MSG_W     = 32,       // bits of ip, one message
  parameter int            N         = 8,        // CRC length, degree of g(x)
  parameter int            P         = 8,        // bits per clock
  parameter logic [N-1:0]  G         = 8'h07,    // g(x) = x^8 + x^2 + x + 1
  parameter bit            SHARE     = 1'b1,
  parameter bit            ISOLATE_T = 1'b1,
  parameter int            TINV_FMT  = plfsr_pkg::TINV_LOWER_ANTI,
  parameter int            LFSR_W    = 4,
  parameter int            OUT_W     = 32,
  parameter logic [LFSR_W-1:0] TAPS  = 4'b1100,  // x^4 + x + 1
  parameter bit            USE_XNOR  = 1'b0,
  parameter logic [OUT_W-1:0] SEED   = 32'h1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [MSG_W-1:0] ip,
  output logic [OUT_W-1:0] lfsr_out,
  output logic [N-1:0]     crcop,
  output logic             crc_valid
);

  localparam int BEATS = MSG_W / P;
  localparam int BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  if (MSG_W % P != 0) begin : g_bad_width
    $error("MSG_W must be a multiple of P");
  end

  // ---------------- pattern generator ----------------
  lfsr_pattern_gen #(
    .LFSR_W(LFSR_W), .OUT_W(OUT_W), .TAPS(TAPS), .USE_XNOR(USE_XNOR), .SEED(SEED)
  ) u_gen (
    .clk, .rst, .lfsr_out
  );

  // ---------------- CRC sequencer ----------------
  logic [BW-1:0] beat;
  logic          first, last;
  logic [P-1:0]  chunk;

  assign first = (beat == '0);
  assign last  = (beat == BW'(BEATS - 1));
  assign chunk = ip[MSG_W - 1 - int'(beat) * P -: P];

  always_ff @(posedge clk) begin
    if (rst || last) beat <= '0;
    else             beat <= beat + 1'b1;
  end

  plfsr_transformed #(
    .N(N), .P(P), .G(G), .SHARE(SHARE), .ISOLATE_T(ISOLATE_T), .TINV_FMT(TINV_FMT)
  ) u_crc (
    .clk, .rst,
    .in_valid (1'b1),
    .in_first (first),
    .in_last  (last),
    .in_data  (chunk),
    .out_valid(crc_valid),
    .out_rem  (crcop)
  );

endmodule
