// plfsr_top_tb: end-to-end test of plfsr_top at its default parameters.
//
// The testbench feeds 32-bit words on ip, each held for the four clocks the
// CRC unit needs, starting with the two words 0x00001FFF and 0x00000A89 and
// continuing with random words. It checks:
//  * every crcop against a bit-serial CRC-8 (g = x^8 + x^2 + x + 1, zero
//    start value, most significant bit first) of the word, and that it
//    arrives exactly 4 clocks after the edge that took the word's first beat,
//    with crc_valid pulsing once per word;
//  * that results of back-to-back words come 4 clocks apart;
//  * lfsr_out every clock against the recurrence s[n] = s[n-3] ^ s[n-4],
//    and that its low four bits repeat with period 15;
//  * that a reset in mid-run restarts both parts.
// Each mechanism (word completed, back-to-back words, LFSR wrap, reset, the two fixed
// words) is counted and must have happened at least once.
module plfsr_top_tb;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] ip = '0;
  logic [31:0] lfsr_out;
  logic [7:0]  crcop;
  logic        crc_valid;
  int          checks = 0;
  int          failures = 0;
  int          cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  plfsr_top dut (.clk, .rst, .ip, .lfsr_out, .crcop, .crc_valid);

  function automatic logic [7:0] crc8(input logic [31:0] w);
    logic [7:0] r;
    logic f;
    r = '0;
    for (int b = 31; b >= 0; b--) begin
      f = r[7] ^ w[b];
      r = (r << 1) ^ (f ? 8'h07 : 8'h00);
    end
    return r;
  endfunction

  typedef struct { logic [7:0] crc; int at; } exp_t;
  exp_t q[$];

  int last_at = -100;
  int n_words = 0, n_b2b = 0, n_wrap = 0, n_reset = 0, n_fixed = 0;

  // CRC scoreboard and operand-isolation check.
  always @(negedge clk) begin
    if (!rst) begin
      if (crc_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected crc_valid at cycle %0d", cyc);
        end else begin
          exp_t e;
          e = q.pop_front();
          n_words++;
          if (e.at == last_at + 4) n_b2b++;
          last_at = e.at;
          if (crcop !== e.crc || cyc != e.at) begin
            failures++;
            $display("FAIL crcop %h at cycle %0d, expected %h at cycle %0d",
                     crcop, cyc, e.crc, e.at);
          end
        end
      end
    end
  end

  // Pattern generator check: a model steps s[n] = s[n-3] ^ s[n-4] on every
  // rising edge that does not reset it; lfsr_out must match it.
  logic [31:0] s;
  int          since_seed;
  always @(posedge clk) begin
    if (rst) s <= 32'h1;
    else     s <= {s[30:0], s[2] ^ s[3]};
  end
  always @(negedge clk) begin
    checks++;
    if (lfsr_out !== s) begin
      failures++;
      $display("FAIL lfsr_out %h expected %h at cycle %0d", lfsr_out, s, cyc);
    end
    if (rst) begin
      since_seed <= 0;
    end else if (lfsr_out[3:0] == 4'h1) begin
      if (since_seed != 0) begin
        checks++;
        n_wrap++;
        if (since_seed != 14) begin
          failures++;
          $display("FAIL LFSR period %0d", since_seed + 1);
        end
      end
      since_seed <= 0;
    end else begin
      since_seed <= since_seed + 1;
    end
  end

  // Run words back to back; reset must be high on entry and is released here.
  task automatic run_words(input logic [31:0] words[$]);
    int c0;
    ip = words[0];
    @(negedge clk);
    rst = 1'b0;
    c0 = cyc;
    foreach (words[j]) begin
      ip = words[j];
      if (words[j] == 32'h00001FFF || words[j] == 32'h00000A89) n_fixed++;
      q.push_back('{crc8(words[j]), c0 + 5 + 4 * j});
      repeat (4) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d CRC results never appeared", q.size());
      q = {};
    end
  endtask

  logic [31:0] words[$];

  initial begin
    $display("CRC-8 of 0x00001FFF = %h, of 0x00000A89 = %h",
             crc8(32'h00001FFF), crc8(32'h00000A89));
    repeat (2) @(negedge clk);

    words = '{32'h00001FFF, 32'h00000A89};
    for (int i = 0; i < 300; i++) words.push_back($urandom);
    run_words(words);

    // Reset in the middle of a word, then run again.
    ip = $urandom;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b1;
    n_reset++;
    @(negedge clk);
    checks++;
    if (crc_valid !== 1'b0 || lfsr_out !== 32'h1) begin
      failures++;
      $display("FAIL reset did not restart the design");
    end
    words = '{32'h00000A89};
    for (int i = 0; i < 50; i++) words.push_back($urandom);
    run_words(words);

    checks += 5;
    if (n_words == 0) begin failures++; $display("FAIL no word completed"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back words"); end
    if (n_wrap == 0)  begin failures++; $display("FAIL LFSR never wrapped"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset in mid-run"); end
    if (n_fixed < 3)  begin failures++; $display("FAIL fixed words not all sent"); end
    $display("words %0d, back-to-back %0d, LFSR wraps %0d, resets %0d, fixed words %0d",
             n_words, n_b2b, n_wrap, n_reset, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
