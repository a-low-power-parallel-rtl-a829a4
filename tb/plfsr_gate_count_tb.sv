// plfsr_gate_count_tb: compares the transformed parallel LFSR with the plain
// (untransformed) parallel LFSR it replaces, for three configurations:
// CRC-8 (x^8+x^2+x+1) at 8 and 32 bits per clock and CRC-16 (0x1021) at
// 8 bits per clock.
//
// For each configuration both forms are built from gf2_ss_matmul networks:
// plain Bp and A^P, transformed BpT and ApT, and the output matrix T. Both
// state registers are stepped with the same random message blocks, and every
// clock the testbench checks that T * rT equals the plain state r. It then
// checks the property the choice of T^-1 guarantees: the pre-processing
// matrix BpT has no more ones in total than Bp, because each row of T^-1 may
// fall back to a plain row of Bp. It also counts how many network output
// bits toggle per clock in each form. The XOR2 counts of the per-clock
// networks, their XOR depth and the toggle counts are printed as a measure of the switching
// activity the transformation removes.
module plfsr_gate_count_tb;
  import plfsr_pkg::*;

  localparam int NCFG = 3;
  localparam int CN[NCFG] = '{8, 16, 8};
  localparam int CP[NCFG] = '{8, 8, 32};
  localparam logic [63:0] CG[NCFG] = '{64'h07, 64'h1021, 64'h07};

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  int err[NCFG];
  int tog_plain[NCFG];
  int tog_trans[NCFG];
  int x_plain[NCFG];
  int x_trans[NCFG];
  int x_t[NCFG];
  int w_bp[NCFG];
  int w_bpt[NCFG];
  int d_plain[NCFG];
  int d_trans[NCFG];

  function automatic int mat_ones(input mat_t m, input int rows, input int cols);
    int c;
    c = 0;
    for (int r = 0; r < rows; r++)
      for (int k = 0; k < cols; k++) c += int'(m[r][k]);
    return c;
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int   N   = CN[c];
    localparam int   P   = CP[c];
    localparam mat_t BP  = bp_matrix(CG[c], N, P);
    localparam mat_t AP  = ap_matrix(CG[c], N, P);
    localparam mat_t BPT = bpt_matrix(CG[c], N, P, TINV_LOWER_ANTI);
    localparam mat_t APT = apt_matrix(CG[c], N, P, TINV_LOWER_ANTI);
    localparam mat_t TM  = t_matrix(CG[c], N, P, TINV_LOWER_ANTI);

    logic [P-1:0] d;
    logic [N-1:0] r_q, rt_q;
    logic [N-1:0] pre_p, fb_p, pre_t, fb_t, r_from_t;
    logic [N-1:0] pre_p_q, fb_p_q, pre_t_q, fb_t_q;

    gf2_ss_matmul #(.NIN(P), .NOUT(N), .M(BP))  u_bp  (.x(d),    .y(pre_p));
    gf2_ss_matmul #(.NIN(N), .NOUT(N), .M(AP))  u_ap  (.x(r_q),  .y(fb_p));
    gf2_ss_matmul #(.NIN(P), .NOUT(N), .M(BPT)) u_bpt (.x(d),    .y(pre_t));
    gf2_ss_matmul #(.NIN(N), .NOUT(N), .M(APT)) u_apt (.x(rt_q), .y(fb_t));
    gf2_ss_matmul #(.NIN(N), .NOUT(N), .M(TM))  u_t   (.x(rt_q), .y(r_from_t));

    initial begin
      err[c] = 0;
      tog_plain[c] = 0;
      tog_trans[c] = 0;
      x_plain[c] = u_bp.XOR2_GATES + u_ap.XOR2_GATES;
      x_trans[c] = u_bpt.XOR2_GATES + u_apt.XOR2_GATES;
      x_t[c] = u_t.XOR2_GATES;
      // Register-to-register path: the deeper of the two networks, then the final XOR.
      d_plain[c] = ((u_bp.XOR_DEPTH > u_ap.XOR_DEPTH) ? u_bp.XOR_DEPTH : u_ap.XOR_DEPTH) + 1;
      d_trans[c] = ((u_bpt.XOR_DEPTH > u_apt.XOR_DEPTH) ? u_bpt.XOR_DEPTH : u_apt.XOR_DEPTH) + 1;
      w_bp[c] = mat_ones(BP, N, P);
      w_bpt[c] = mat_ones(BPT, N, P);
    end

    always @(posedge clk) begin
      d <= P'({$urandom, $urandom});
      if (rst) begin
        r_q  <= '0;
        rt_q <= '0;
      end else begin
        r_q  <= fb_p ^ pre_p;
        rt_q <= fb_t ^ pre_t;
      end
      pre_p_q <= pre_p;
      fb_p_q  <= fb_p;
      pre_t_q <= pre_t;
      fb_t_q  <= fb_t;
    end

    always @(negedge clk) begin
      if (!rst) begin
        checks++;
        if (r_from_t !== r_q) err[c]++;
        tog_plain[c] += $countones(pre_p ^ pre_p_q) + $countones(fb_p ^ fb_p_q);
        tog_trans[c] += $countones(pre_t ^ pre_t_q) + $countones(fb_t ^ fb_t_q);
      end
    end
  end

  localparam int CYCLES = 2000;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (CYCLES) @(negedge clk);
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (err[c] != 0) begin
        failures++;
        $display("FAIL N=%0d P=%0d: T*rT differed from r in %0d clocks", CN[c], CP[c], err[c]);
      end
      checks++;
      if (w_bpt[c] > w_bp[c]) begin
        failures++;
        $display("FAIL N=%0d P=%0d: BpT has %0d ones, Bp %0d", CN[c], CP[c], w_bpt[c], w_bp[c]);
      end
      $display("N=%0d P=%0d: ones in Bp %0d, in BpT %0d; per-clock XOR2 plain %0d, transformed %0d (+%0d in T); XOR levels plain %0d, transformed %0d; output toggles per clock plain %0.2f, transformed %0.2f",
               CN[c], CP[c], w_bp[c], w_bpt[c], x_plain[c], x_trans[c], x_t[c], d_plain[c], d_trans[c],
               real'(tog_plain[c]) / CYCLES, real'(tog_trans[c]) / CYCLES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
