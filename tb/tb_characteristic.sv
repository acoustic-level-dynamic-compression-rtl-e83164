// tb_characteristic: static compression characteristic and its error against
// the ideal curve, for 16-, 24- and 32-bit compressors with polynomials of
// degree 3 and 7.
//
// Threshold -40 dB (v_t = 0.01) unless stated. The polynomial coefficients are computed
// here for ratio p by interpolating f(alpha) = A - v_t^((p-1)/p) * A^(1/p),
// A = alpha + v_t, at the m equally spaced points alpha_j = j*(1 - v_t)/m,
// j = 1..m (a Vandermonde system solved by Gaussian elimination), then
// rounded to the coefficient format. Smoothing is made instant (C1 = 0) so
// every output shows the static gain. DC inputs from -60 dB to 0 dB in 1 dB
// steps are applied and the output level is compared with the ideal
// V_o = (V_i - V_T)/p + V_T above the threshold and V_o = V_i below it.
// The RMS error sigma over the 61 levels must stay below 0.5 dB for degree 7
// and 1.2 dB for degree 3, and differ by less than 0.05 dB between 16 and
// 32 bits. The 16-bit degree-7 compressor is also swept for p = 1, 1.4, 4,
// 6 and 10. Finally the degree-7 compressors are swept with a -50 dB
// threshold, where the 32-bit word must give a smaller error than 16 bits.
module tb_characteristic;
  import comp_pkg::*;
  localparam int NCFG = 6;
  localparam int NS [NCFG] = '{16, 24, 32, 16, 24, 32};
  localparam int MS [NCFG] = '{7, 7, 7, 3, 3, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit  fin [NCFG];
  real sigma_p2 [NCFG];
  real sigma_50 [NCFG];

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Interpolating coefficients b1..bm of f(alpha) for ratio p, threshold vt.
  function automatic void fit_poly(input real p, input real vt, input int m, output real bc [1:7]);
    real a [1:7][1:8];
    real al, aa, t;
    int piv;
    for (int j = 1; j <= m; j++) begin
      al = j * (1.0 - vt) / m;
      aa = al + vt;
      for (int k = 1; k <= m; k++) a[j][k] = $pow(al, k);
      a[j][m + 1] = aa - $pow(vt, (p - 1.0) / p) * $pow(aa, 1.0 / p);
    end
    for (int c = 1; c <= m; c++) begin
      piv = c;
      for (int r = c + 1; r <= m; r++) if (rabs(a[r][c]) > rabs(a[piv][c])) piv = r;
      for (int k = 1; k <= m + 1; k++) begin t = a[c][k]; a[c][k] = a[piv][k]; a[piv][k] = t; end
      for (int r = 1; r <= m; r++) if (r != c) begin
        t = a[r][c] / a[c][c];
        for (int k = c; k <= m + 1; k++) a[r][k] -= t * a[c][k];
      end
    end
    for (int k = 1; k <= 7; k++) bc[k] = (k <= m) ? a[k][m + 1] / a[k][k] : 0.0;
  endfunction

  for (genvar gc = 0; gc < NCFG; gc++) begin : g_cfg
    localparam int N = NS[gc], M = MS[gc], W = N + DEF_CB_INT;
    localparam real SCALE = 2.0 ** (N - 1);

    logic                in_valid, in_ready, out_valid, above;
    logic signed [N-1:0] vi, vo;
    logic        [N-1:0] vt, h0, h1, r0, r1, gain;
    logic signed [W-1:0] b [1:M];
    ar_mode_e            ar_mode;

    compressor #(.N(N), .M(M), .CB_INT(DEF_CB_INT)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .vi, .vt, .b, .h0, .h1, .r0, .r1,
      .out_valid, .vo, .gain, .ar_mode, .above);

    task automatic sweep(input real p, input real vt_db, output real sigma);
      real bc [1:7];
      real vin, vout, ideal, err2;
      longint v;
      vt = N'(longint'($pow(10.0, vt_db / 20.0) * SCALE));
      fit_poly(p, real'(vt) / SCALE, M, bc);
      for (int k = 1; k <= M; k++) b[k] = W'(longint'(bc[k] * SCALE));
      err2 = 0.0;
      for (int db = -60; db <= 0; db++) begin
        v = longint'($pow(10.0, db / 20.0) * SCALE);
        if (real'(v) >= SCALE) v = longint'(SCALE) - 1;
        @(negedge clk);
        vi = N'(v); in_valid = 1'b1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 1'b0;
        while (!out_valid) @(posedge clk);
        vin  = 20.0 * $log10(real'(v) / SCALE);
        vout = 20.0 * $log10(real'(vo) / SCALE);
        ideal = (vin > vt_db) ? (vin - vt_db) / p + vt_db : vin;
        err2 += (vout - ideal) * (vout - ideal);
      end
      sigma = $sqrt(err2 / 61.0);
    endtask

    initial begin
      real s;
      real ratios [5] = '{1.0, 1.4, 4.0, 6.0, 10.0};
      in_valid = 1'b0; vi = '0;
      vt = '0;
      h1 = '0; r1 = '0;                         // instant smoothing
      h0 = N'(longint'(SCALE) - 1); r0 = N'(longint'(SCALE) - 1);
      for (int k = 1; k <= M; k++) b[k] = '0;
      @(posedge rst_n);
      sweep(2.0, -40.0, s);
      sigma_p2[gc] = s;
      $display("N=%0d m=%0d p=2: sigma = %f dB", N, M, s);
      checks++;
      if (s > ((M == 7) ? 0.5 : 1.2)) begin
        failures++;
        $display("FAIL N=%0d m=%0d sigma too large", N, M);
      end
      if (gc == 0) begin
        foreach (ratios[i]) begin
          sweep(ratios[i], -40.0, s);
          $display("N=%0d m=%0d p=%0.1f: sigma = %f dB", N, M, ratios[i], s);
          checks++;
          if (s > 0.5) begin
            failures++;
            $display("FAIL p=%0.1f sigma too large", ratios[i]);
          end
        end
      end
      if (M == 7) begin
        sweep(2.0, -50.0, s);
        sigma_50[gc] = s;
        $display("N=%0d m=%0d p=2 threshold -50 dB: sigma = %f dB", N, M, s);
      end
      fin[gc] = 1'b1;
    end
  end

  initial begin
    for (int i = 0; i < NCFG; i++) fin[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCFG; i++) wait (fin[i]);
    for (int i = 0; i < NCFG; i += 3) begin
      checks++;
      if (rabs(sigma_p2[i] - sigma_p2[i + 2]) > 0.05) begin
        failures++;
        $display("FAIL 16-bit and 32-bit sigma differ: %f %f", sigma_p2[i], sigma_p2[i + 2]);
      end
    end
    // at -50 dB the threshold is only ~100 LSBs of a 16-bit word: more bits help
    checks++;
    if (!(sigma_50[2] < sigma_50[0])) begin
      failures++;
      $display("FAIL -50 dB: 32-bit sigma %f not below 16-bit %f", sigma_50[2], sigma_50[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
