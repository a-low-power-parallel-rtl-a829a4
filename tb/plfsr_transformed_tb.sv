// plfsr_transformed_tb: self-checking test of the transformed parallel LFSR.
//
// Eight instances run side by side: the default CRC-8 (g = x^8+x^2+x+1,
// 8 bits per clock); the same with sharing and T isolation turned off; a
// CRC-16 (g = x^16+x^12+x^5+1) with zero and with all-ones start value; the
// CRC-16 with T^-1 upper anti-triangular and lower triangular; the CRC-8 with
// T^-1 upper triangular; and the CRC-8 taking 32 bits per clock. Every remainder is compared with a
// bit-serial model of the LFSR that divides u(x)*x^N by g(x), and with the
// published check values for the ASCII string "123456789" (0xF4, 0x31C3,
// 0x29B1). The testbench also checks that each remainder appears exactly one
// clock after the edge that took the message's last beat, with messages
// sent back to back and with idle cycles between beats.
module plfsr_transformed_tb;

  localparam int NDUT8 = 7;   // instances that take 8-bit beats

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Bit-serial reference: r <= (r << 1) ^ (r[N-1] ^ u ? g : 0).
  function automatic logic [15:0] ref_rem(input logic [7:0] msg[$], input int n,
                                          input logic [15:0] g, input logic [15:0] init);
    logic [15:0] r, mask;
    logic f;
    mask = (n == 16) ? 16'hFFFF : 16'h00FF;
    r = init & mask;
    foreach (msg[i])
      for (int b = 7; b >= 0; b--) begin
        f = r[n-1] ^ msg[i][b];
        r = ((r << 1) ^ (f ? g : 16'h0)) & mask;
      end
    return r;
  endfunction

  // ---- instances with 8-bit beats ----
  logic       v8, f8, l8;
  logic [7:0] d8;
  logic [NDUT8-1:0]       ov;
  logic [NDUT8-1:0][15:0] orem;

  plfsr_transformed #(.N(8), .P(8), .G(8'h07)) dut_crc8 (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[0]), .out_rem(orem[0][7:0]));
  plfsr_transformed #(.N(8), .P(8), .G(8'h07), .SHARE(1'b0), .ISOLATE_T(1'b0)) dut_crc8_plain (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[1]), .out_rem(orem[1][7:0]));
  plfsr_transformed #(.N(16), .P(8), .G(16'h1021)) dut_crc16 (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[2]), .out_rem(orem[2]));
  plfsr_transformed #(.N(16), .P(8), .G(16'h1021), .INIT(16'hFFFF)) dut_crc16_ff (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[3]), .out_rem(orem[3]));
  plfsr_transformed #(.N(16), .P(8), .G(16'h1021), .TINV_FMT(plfsr_pkg::TINV_UPPER_ANTI)) dut_fmt1 (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[4]), .out_rem(orem[4]));
  plfsr_transformed #(.N(16), .P(8), .G(16'h1021), .TINV_FMT(plfsr_pkg::TINV_LOWER)) dut_fmt2 (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[5]), .out_rem(orem[5]));
  plfsr_transformed #(.N(8), .P(8), .G(8'h07), .TINV_FMT(plfsr_pkg::TINV_UPPER)) dut_fmt3 (
    .clk, .rst, .in_valid(v8), .in_first(f8), .in_last(l8), .in_data(d8),
    .out_valid(ov[6]), .out_rem(orem[6][7:0]));
  assign orem[6][15:8] = '0;
  assign orem[0][15:8] = '0;
  assign orem[1][15:8] = '0;

  // ---- instance with 32-bit beats ----
  logic        v32, f32, l32;
  logic [31:0] d32;
  logic        ov32;
  logic [7:0]  orem32;
  plfsr_transformed #(.N(8), .P(32), .G(8'h07)) dut_crc8_p32 (
    .clk, .rst, .in_valid(v32), .in_first(f32), .in_last(l32), .in_data(d32),
    .out_valid(ov32), .out_rem(orem32));

  // Scoreboards: expected remainder and the cycle in which it must appear.
  typedef struct { logic [15:0] rem; int at; } exp_t;
  exp_t q8[NDUT8][$];
  exp_t q32[$];

  always @(negedge clk) begin
    for (int k = 0; k < NDUT8; k++) begin
      if (ov[k]) begin
        checks++;
        if (q8[k].size() == 0) begin
          failures++;
          $display("FAIL dut%0d: unexpected out_valid at cycle %0d", k, cyc);
        end else begin
          exp_t e;
          e = q8[k].pop_front();
          if (e.rem !== orem[k] || e.at != cyc) begin
            failures++;
            $display("FAIL dut%0d: rem %h at cycle %0d, expected %h at cycle %0d",
                     k, orem[k], cyc, e.rem, e.at);
          end
        end
      end
    end
    if (ov32) begin
      checks++;
      if (q32.size() == 0) begin
        failures++;
        $display("FAIL p32: unexpected out_valid at cycle %0d", cyc);
      end else begin
        exp_t e;
        e = q32.pop_front();
        if (e.rem[7:0] !== orem32 || e.at != cyc) begin
          failures++;
          $display("FAIL p32: rem %h at cycle %0d, expected %h at cycle %0d",
                   orem32, cyc, e.rem[7:0], e.at);
        end
      end
    end
  end

  localparam logic [15:0] G8[NDUT8]   = '{16'h07, 16'h07, 16'h1021, 16'h1021, 16'h1021, 16'h1021, 16'h07};
  localparam int          N8[NDUT8]   = '{8, 8, 16, 16, 16, 16, 8};
  localparam logic [15:0] INIT8[NDUT8] = '{16'h0, 16'h0, 16'h0, 16'hFFFF, 16'h0, 16'h0, 16'h0};

  // Send one message of bytes; gap_pct is the chance of an idle cycle before a beat.
  task automatic send8(input logic [7:0] msg[$], input int gap_pct);
    for (int i = 0; i < msg.size(); i++) begin
      while ($urandom_range(99) < gap_pct) begin
        @(negedge clk);
        v8 = 1'b0; f8 = 1'($urandom); l8 = 1'($urandom); d8 = 8'($urandom);
      end
      @(negedge clk);
      v8 = 1'b1;
      f8 = (i == 0);
      l8 = (i == msg.size() - 1);
      d8 = msg[i];
      if (l8)
        for (int k = 0; k < NDUT8; k++)
          q8[k].push_back('{ref_rem(msg, N8[k], G8[k], INIT8[k]), cyc + 2});
    end
  endtask

  task automatic send32(input logic [7:0] msg[$], input int gap_pct);
    for (int i = 0; i < msg.size(); i += 4) begin
      while ($urandom_range(99) < gap_pct) begin
        @(negedge clk);
        v32 = 1'b0; f32 = 1'($urandom); l32 = 1'($urandom); d32 = $urandom;
      end
      @(negedge clk);
      v32 = 1'b1;
      f32 = (i == 0);
      l32 = (i + 4 >= msg.size());
      d32 = {msg[i], msg[i+1], msg[i+2], msg[i+3]};
      if (l32) q32.push_back('{ref_rem(msg, 8, 16'h07, 16'h0), cyc + 2});
    end
  endtask

  logic [7:0] check_str[$];
  logic [7:0] m[$];

  initial begin
    v8 = 0; f8 = 0; l8 = 0; d8 = 0;
    v32 = 0; f32 = 0; l32 = 0; d32 = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Published check values for "123456789".
    check_str = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    checks += 3;
    if (ref_rem(check_str, 8, 16'h07, 16'h0) != 16'hF4) failures++;
    if (ref_rem(check_str, 16, 16'h1021, 16'h0) != 16'h31C3) failures++;
    if (ref_rem(check_str, 16, 16'h1021, 16'hFFFF) != 16'h29B1) failures++;
    send8(check_str, 0);

    // Random messages, back to back and with gaps.
    for (int t = 0; t < 300; t++) begin
      int len;
      len = 1 + $urandom_range(11);
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      send8(m, (t < 100) ? 0 : 30);
    end
    @(negedge clk);
    v8 = 1'b0;

    // 32-bit beats: messages of 1 to 4 words.
    for (int t = 0; t < 200; t++) begin
      int len;
      len = 4 * (1 + $urandom_range(3));
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      send32(m, (t < 100) ? 0 : 30);
    end
    @(negedge clk);
    v32 = 1'b0;

    repeat (5) @(negedge clk);
    for (int k = 0; k < NDUT8; k++) begin
      checks++;
      if (q8[k].size() != 0) begin
        failures++;
        $display("FAIL dut%0d: %0d remainders never appeared", k, q8[k].size());
      end
    end
    checks++;
    if (q32.size() != 0) begin
      failures++;
      $display("FAIL p32: %0d remainders never appeared", q32.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
