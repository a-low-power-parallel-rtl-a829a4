// gf2_ss_size_tb: checks the size and depth that gf2_ss_matmul reports for
// its planned XOR networks.
//
// For the three-output example y0 = x0^x1^x2^x3^x5, y1 = x0^x1^x2^x3^x4,
// y2 = x2^x3^x4^x5, worked out by hand: with sharing, three shared nodes and
// seven XOR2 gates; without sharing, eleven; with MAX_DEPTH = 1 (no output
// may grow deeper than without sharing) still three nodes and seven gates,
// because the constraint steers the third node from x4^x6 to x6^x7; a
// critical path of three XOR levels in every case. The chain
// y0 = x0^x1^x2^x3, y1 = x0^x1^x2, y2 = x0^x1 shares x0^x1 and then
// (x0^x1)^x2, which makes y0 three levels deep: two nodes, three gates. With
// MAX_DEPTH = 2 the second node is refused: one node, four gates, two levels. A random 8 x 32 matrix must find at least
// one shared term. The outputs are also spot-checked for one input.
module gf2_ss_size_tb;
  import plfsr_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam mat_t M_RND = mat_t'({64'hF0F0_1234, 64'h0F0F_5678, 64'hAAAA_9ABC, 64'h5555_DEF0,
                                   64'hFF00_1357, 64'h00FF_2468, 64'hC3C3_ACE0, 64'h3C3C_BDF1});

  logic [5:0]  xe;
  logic [2:0]  y_ss, y_plain, y_d1;
  logic [31:0] xr;
  logic [7:0]  y_rnd;

  gf2_ss_matmul dut_ss (.x(xe), .y(y_ss));
  gf2_ss_matmul #(.SHARE(1'b0)) dut_plain (.x(xe), .y(y_plain));
  gf2_ss_matmul #(.MAX_DEPTH(1)) dut_d1 (.x(xe), .y(y_d1));
  gf2_ss_matmul #(.NIN(32), .NOUT(8), .M(M_RND)) dut_rnd (.x(xr), .y(y_rnd));

  // Chain example: y0 = x0^x1^x2^x3, y1 = x0^x1^x2, y2 = x0^x1.
  localparam mat_t M_CHAIN = mat_t'({64'h3, 64'h7, 64'hF});
  logic [3:0] xc;
  logic [2:0] y_ch, y_ch2;
  gf2_ss_matmul #(.NIN(4), .NOUT(3), .M(M_CHAIN)) dut_ch (.x(xc), .y(y_ch));
  gf2_ss_matmul #(.NIN(4), .NOUT(3), .M(M_CHAIN), .MAX_DEPTH(2)) dut_ch2 (.x(xc), .y(y_ch2));

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // Network sizes.
    expect_eq("shared nodes", 64'(dut_ss.NODES), 64'd3);
    expect_eq("XOR2 gates with sharing", 64'(dut_ss.XOR2_GATES), 64'd7);
    expect_eq("XOR2 gates without sharing", 64'(dut_plain.XOR2_GATES), 64'd11);
    expect_eq("plain count reported", 64'(dut_ss.PLAIN_XOR2), 64'd11);
    expect_eq("depth-limited nodes", 64'(dut_d1.NODES), 64'd3);
    expect_eq("depth-limited XOR2 gates", 64'(dut_d1.XOR2_GATES), 64'd7);
    expect_eq("chain, unconstrained nodes", 64'(dut_ch.NODES), 64'd2);
    expect_eq("chain, unconstrained XOR2 gates", 64'(dut_ch.XOR2_GATES), 64'd3);
    expect_eq("chain, unconstrained depth", 64'(dut_ch.XOR_DEPTH), 64'd3);
    expect_eq("chain, constrained nodes", 64'(dut_ch2.NODES), 64'd1);
    expect_eq("chain, constrained XOR2 gates", 64'(dut_ch2.XOR2_GATES), 64'd4);
    expect_eq("chain, constrained depth", 64'(dut_ch2.XOR_DEPTH), 64'd2);
    expect_eq("XOR depth with sharing", 64'(dut_ss.XOR_DEPTH), 64'd3);
    expect_eq("XOR depth without sharing", 64'(dut_plain.XOR_DEPTH), 64'd3);
    expect_eq("XOR depth, depth-limited", 64'(dut_d1.XOR_DEPTH), 64'd3);
    checks++;
    if (dut_rnd.NODES == 0) begin
      failures++;
      $display("FAIL random matrix: no shared node found");
    end


    xe = 6'b101101;   // x0, x2, x3, x5
    xr = '0;
    for (int v = 0; v < 16; v++) begin
      logic [2:0] e;
      xc = 4'(v);
      #1;
      e = {xc[0] ^ xc[1], xc[0] ^ xc[1] ^ xc[2], ^xc};
      expect_eq("chain outputs", 64'(y_ch), 64'(e));
      expect_eq("chain outputs, constrained", 64'(y_ch2), 64'(e));
    end
    expect_eq("example outputs", 64'(y_ss), 64'(3'b110));
    expect_eq("example outputs, plain", 64'(y_plain), 64'(3'b110));
    expect_eq("example outputs, depth 1", 64'(y_d1), 64'(3'b110));
    expect_eq("random matrix, zero input", 64'(y_rnd), 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
