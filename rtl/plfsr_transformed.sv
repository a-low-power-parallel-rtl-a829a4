// plfsr_transformed: low-power transformed p-parallel LFSR that computes the
// remainder of u(x)*x^N divided by g(x) (a CRC or a BCH parity), P message
// bits per clock.
//
// How it works: the state is kept in a transformed basis rT = T^-1 r. Each
// accepted beat applies rT <= ApT rT ^ BpT up, where up is the beat of P bits,
// BpT = T^-1 Bp is the pre-processing matrix and ApT = T^-1 A^P T the feedback
// matrix. T^-1 is chosen to make BpT as sparse as possible, so the two
// networks that switch every cycle are small; the cost moves into the output
// matrix T, which is used once per message. All three matrices are computed
// at elaboration time (plfsr_pkg) and built as shared-XOR networks
// (gf2_ss_matmul). The input of the T network is held at zero except in the
// cycle after a message's last beat (operand isolation, ISOLATE_T = 1), so T
// does not toggle while a message streams in.
//
// Interface:
//   in_valid  a beat is present this cycle
//   in_first  this beat starts a message (the state restarts from INIT)
//   in_last   this beat ends the message
//   in_data   P bits; in_data[P-1] is the earliest (most significant) bit
//   out_valid one-cycle pulse, one clock after the edge that took the last beat
//   out_rem   remainder r; out_rem[i] is the coefficient of x^i; it holds its
//             value until the next message ends
// Reset is synchronous and active high. Messages may follow each other with
// no idle cycle; a message is a whole number of beats (pad at the front with
// zeros when INIT is zero).
//
// The recursions, the transformation and the T^-1 formats (lower
// anti-triangular by default; lower triangular, upper triangular and upper
// anti-triangular through TINV_FMT) follow the low-power architecture. The
// handshake, the operand isolation of T, the registered output and the INIT
// option are this design's own choices.
module plfsr_transformed
  import plfsr_pkg::*;
#(
  parameter int          N         = 8,          // degree of g(x)
  parameter int          P         = 8,          // bits per clock
  parameter logic [N-1:0] G        = 8'h07,      // g(x) without the x^N term: x^8+x^2+x+1
  parameter logic [N-1:0] INIT     = '0,         // register contents at the start of a message
  parameter bit          SHARE     = 1'b1,       // build the matrices with shared XOR terms
  parameter bit          ISOLATE_T = 1'b1,       // hold T's input at zero between messages
  parameter int          TINV_FMT  = TINV_LOWER_ANTI  // format of T^-1 (plfsr_pkg)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  output logic [N-1:0] out_rem
);

  localparam row_t GR   = row_t'(G);
  localparam mat_t APT  = apt_matrix(GR, N, P, TINV_FMT);
  localparam mat_t BPT  = bpt_matrix(GR, N, P, TINV_FMT);
  localparam mat_t TM   = t_matrix(GR, N, P, TINV_FMT);
  localparam mat_t TINV = tinv_matrix(GR, N, P, TINV_FMT);
  // Feedback term of the first beat: ApT * (T^-1 * INIT).
  localparam logic [N-1:0] FIRST_FB =
      N'(mat_vec(APT, mat_vec(TINV, row_t'(INIT), N, N), N, N));

  logic [N-1:0] rt_q;         // transformed state
  logic         fin_q;        // rt_q holds a finished message
  logic [N-1:0] fb, pre, rt_d, t_in, r_out;

  gf2_ss_matmul #(.NIN(N), .NOUT(N), .M(APT), .SHARE(SHARE)) u_apt (.x(rt_q), .y(fb));
  gf2_ss_matmul #(.NIN(P), .NOUT(N), .M(BPT), .SHARE(SHARE)) u_bpt (.x(in_data), .y(pre));
  gf2_ss_matmul #(.NIN(N), .NOUT(N), .M(TM),  .SHARE(SHARE)) u_t   (.x(t_in), .y(r_out));

  assign rt_d = (in_first ? FIRST_FB : fb) ^ pre;
  assign t_in = (ISOLATE_T && !fin_q) ? '0 : rt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rt_q      <= '0;
      fin_q     <= 1'b0;
      out_valid <= 1'b0;
      out_rem   <= '0;
    end else begin
      if (in_valid) rt_q <= rt_d;
      fin_q     <= in_valid && in_last;
      out_valid <= fin_q;
      if (fin_q) out_rem <= r_out;
    end
  end

endmodule
