// gf2_ss_matmul_tb: self-checking test of the shared-XOR constant matrix
// multiplier.
//
// The three-output example (y0 = x0^x1^x2^x3^x5, y1 = x0^x1^x2^x3^x4,
// y2 = x2^x3^x4^x5) is run over all 64 inputs with sharing on, off and
// depth-limited, against the three formulas. A 16 x 8
// pre-processing matrix of a CRC-16 and a random 8 x 32 matrix are checked
// with random inputs against a direct row-by-row product. The sizes of the
// planned networks are checked by gf2_ss_size_tb.
module gf2_ss_matmul_tb;
  import plfsr_pkg::*;

  int checks = 0;
  int failures = 0;

  // Direct product, one output at a time.
  function automatic logic [63:0] direct(input mat_t m, input logic [63:0] x,
                                         input int rows, input int cols);
    logic [63:0] y;
    y = '0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        if (m[r][c]) y[r] = y[r] ^ x[c];
    return y;
  endfunction

  localparam mat_t M_CRC = bpt_matrix(64'h1021, 16, 8, TINV_LOWER_ANTI);
  localparam mat_t M_RND = mat_t'({64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0,
                                   64'hF0F0_1234, 64'h0F0F_5678, 64'hAAAA_9ABC, 64'h5555_DEF0,
                                   64'hFF00_1357, 64'h00FF_2468, 64'hC3C3_ACE0, 64'h3C3C_BDF1});

  logic [5:0]  xe;
  logic [2:0]  y_ss, y_plain, y_d1;
  logic [7:0]  xc;
  logic [15:0] y_crc;
  logic [31:0] xr;
  logic [7:0]  y_rnd;

  gf2_ss_matmul dut_ss (.x(xe), .y(y_ss));
  gf2_ss_matmul #(.SHARE(1'b0)) dut_plain (.x(xe), .y(y_plain));
  gf2_ss_matmul #(.MAX_DEPTH(1)) dut_d1 (.x(xe), .y(y_d1));
  gf2_ss_matmul #(.NIN(8), .NOUT(16), .M(M_CRC)) dut_crc (.x(xc), .y(y_crc));
  gf2_ss_matmul #(.NIN(32), .NOUT(8), .M(M_RND)) dut_rnd (.x(xr), .y(y_rnd));

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [2:0] e;
    for (int v = 0; v < 64; v++) begin
      xe = 6'(v);
      #1;
      e[0] = xe[0] ^ xe[1] ^ xe[2] ^ xe[3] ^ xe[5];
      e[1] = xe[0] ^ xe[1] ^ xe[2] ^ xe[3] ^ xe[4];
      e[2] = xe[2] ^ xe[3] ^ xe[4] ^ xe[5];
      expect_eq("example, shared", 64'(y_ss), 64'(e));
      expect_eq("example, plain", 64'(y_plain), 64'(e));
      expect_eq("example, depth 1", 64'(y_d1), 64'(e));
    end

    for (int t = 0; t < 500; t++) begin
      xc = 8'($urandom);
      xr = $urandom;
      #1;
      expect_eq("CRC-16 BpT", 64'(y_crc), direct(M_CRC, 64'(xc), 16, 8));
      expect_eq("random 8x32", 64'(y_rnd), direct(M_RND, 64'(xr), 8, 32));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
