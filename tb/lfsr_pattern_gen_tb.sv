// lfsr_pattern_gen_tb: self-checking test of the LFSR pattern generator.
//
// The default generator (XOR feedback, 4-bit LFSR, 32-bit output) is compared
// every clock with a bit stream produced by the recurrence
// s[n] = s[n-3] ^ s[n-4]; the last 32 bits of the stream must equal lfsr_out.
// Its low four bits must step through all 15 non-zero states and repeat with
// period 15, and the stream must contain the 25-bit run
// 1110001001101011110001001, a stretch of the m-sequence of x^4 + x + 1.
// An XNOR instance seeded with zero must also have period 15 and must never
// reach its lock-up state 1111.
module lfsr_pattern_gen_tb;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [31:0] q_xor, q_xnor;

  lfsr_pattern_gen dut_xor (.clk, .rst, .lfsr_out(q_xor));
  lfsr_pattern_gen #(.USE_XNOR(1'b1), .SEED(32'h0)) dut_xnor (.clk, .rst, .lfsr_out(q_xnor));

  localparam logic [24:0] RUN = 25'b1110001001101011110001001;

  initial begin
    logic [31:0] s;          // s[0] is the newest bit of the reference stream
    logic [24:0] last25;
    bit   seen[16];
    bit   seen_x[16];
    logic [3:0] first_x, first_xn;
    int   run_found;
    int   period_x, period_xn;

    s = 32'h1;
    last25 = '0;
    run_found = 0;
    period_x = 0;
    period_xn = 0;
    foreach (seen[i]) begin seen[i] = 0; seen_x[i] = 0; end

    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (q_xor !== 32'h1 || q_xnor !== 32'h0) begin
      failures++;
      $display("FAIL reset value %h %h", q_xor, q_xnor);
    end
    first_x = q_xor[3:0];
    first_xn = q_xnor[3:0];

    for (int n = 1; n <= 200; n++) begin
      @(negedge clk);
      s = {s[30:0], s[2] ^ s[3]};
      last25 = {last25[23:0], s[0]};
      if (n >= 25 && last25 == RUN) run_found++;
      checks++;
      if (q_xor !== s) begin
        failures++;
        $display("FAIL step %0d: lfsr_out %b expected %b", n, q_xor, s);
      end
      seen[q_xor[3:0]] = 1;
      seen_x[q_xnor[3:0]] = 1;
      if (period_x == 0 && q_xor[3:0] == first_x) period_x = n;
      if (period_xn == 0 && q_xnor[3:0] == first_xn) period_xn = n;
      checks++;
      if (q_xnor[3:0] == 4'hF) begin
        failures++;
        $display("FAIL XNOR generator reached its lock-up state");
      end
    end

    checks += 5;
    if (period_x != 15) begin failures++; $display("FAIL XOR period %0d", period_x); end
    if (period_xn != 15) begin failures++; $display("FAIL XNOR period %0d", period_xn); end
    if (seen[0]) begin failures++; $display("FAIL XOR generator reached 0000"); end
    for (int v = 1; v < 16; v++)
      if (!seen[v]) begin failures++; $display("FAIL XOR state %0d never reached", v); break; end
    if (run_found == 0) begin failures++; $display("FAIL expected 25-bit run not found"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
