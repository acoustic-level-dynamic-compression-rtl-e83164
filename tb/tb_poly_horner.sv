// tb_poly_horner: self-checking testbench for the Horner polynomial evaluator.
//
// Instance A is the default configuration (N = 16, degree 7, 4 extra
// coefficient integer bits); instance B has degree 3. Random coefficients in
// [-8, 8) and random x in [0, 1) are checked against a reference Horner loop
// written here with 64-bit integers (product floored to 15 fraction bits and
// saturated, sums saturated). A degree-7 fit of a 2:1 compressor at -40 dB is
// also checked against the real-valued polynomial (tolerance 0.002), and the
// start-to-done time must be M*(N+2) clock edges.
module tb_poly_horner;
  localparam int N = 16, CBI = 4, W = N + CBI;
  localparam int MA = 7, MB = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sa, busya, donea, sb, busyb, doneb;
  logic [N-1:0] xa, xb;
  logic signed [W-1:0] ba [1:MA];
  logic signed [W-1:0] bb [1:MB];
  logic signed [W-1:0] fa, fb;

  poly_horner #(.N(N), .M(MA), .CB_INT(CBI)) dut_a (.clk, .rst_n, .start(sa), .x(xa), .b(ba),
                                                   .busy(busya), .done(donea), .f(fa));
  poly_horner #(.N(N), .M(MB), .CB_INT(CBI)) dut_b (.clk, .rst_n, .start(sb), .x(xb), .b(bb),
                                                   .busy(busyb), .done(doneb), .f(fb));

  localparam longint WMAX = (longint'(1) <<< (W - 1)) - 1;
  localparam longint WMIN = -(longint'(1) <<< (W - 1));

  function automatic longint satw(longint v);
    if (v > WMAX) return WMAX;
    if (v < WMIN) return WMIN;
    return v;
  endfunction

  function automatic longint ref_poly(longint c [], longint x);
    int m = c.size() - 1;       // c[1..m] used, c[0] = b0 = 0
    longint f = c[m];
    for (int i = 1; i <= m; i++)
      f = satw(satw((f * x) >>> (N - 1)) + ((i == m) ? 0 : c[m - i]));
    return f;
  endfunction

  task automatic run_a(input longint c [], input longint x, input bit real_check);
    int cyc;
    longint e;
    real fr, xr;
    @(negedge clk);
    for (int k = 1; k <= MA; k++) ba[k] = W'(c[k]);
    xa = N'(x); sa = 1'b1;
    @(negedge clk);
    sa = 1'b0;
    cyc = 1;
    while (!donea) begin @(negedge clk); cyc++; end
    e = ref_poly(c, x);
    checks++;
    if (longint'(fa) != e) begin
      failures++;
      $display("FAIL poly7 x=%0d f=%0d exp=%0d", x, fa, e);
    end
    checks++;
    if (cyc != MA * (N + 2) + 1) begin
      failures++;
      $display("FAIL poly7 latency %0d", cyc);
    end
    if (real_check) begin
      xr = real'(x) / 32768.0;
      fr = 0.0;
      for (int k = MA; k >= 1; k--) fr = (fr + real'(c[k]) / 32768.0) * xr;
      checks++;
      if ((real'(fa) / 32768.0 - fr) > 0.002 || (fr - real'(fa) / 32768.0) > 0.002) begin
        failures++;
        $display("FAIL poly7 real x=%0d f=%f exp=%f", x, real'(fa) / 32768.0, fr);
      end
    end
  endtask

  task automatic run_b(input longint c [], input longint x);
    longint e;
    @(negedge clk);
    for (int k = 1; k <= MB; k++) bb[k] = W'(c[k]);
    xb = N'(x); sb = 1'b1;
    @(negedge clk);
    sb = 1'b0;
    while (!doneb) @(negedge clk);
    e = ref_poly(c, x);
    checks++;
    if (longint'(fb) != e) begin
      failures++;
      $display("FAIL poly3 x=%0d f=%0d exp=%0d", x, fb, e);
    end
  endtask

  initial begin
    longint c7 [] = new[MA + 1];
    longint c3 [] = new[MB + 1];
    // degree-7 interpolation of f = A - 0.1*sqrt(A), A = x + 0.01 (p = 2, -40 dB)
    real fit [1:7] = '{0.68161585, 1.20890859, -3.69688159, 6.98761114,
                       -7.76505054, 4.64488855, -1.15166436};
    sa = 0; sb = 0; xa = 0; xb = 0;
    for (int k = 1; k <= MA; k++) ba[k] = '0;
    for (int k = 1; k <= MB; k++) bb[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    c7[0] = 0;
    for (int k = 1; k <= MA; k++) c7[k] = longint'($rtoi(fit[k] * 32768.0));
    for (int i = 0; i <= 32; i++) run_a(c7, longint'(i * 1000), 1'b1);
    run_a(c7, 0, 1'b1);
    run_a(c7, 32767, 1'b1);
    for (int i = 0; i < 150; i++) begin
      for (int k = 1; k <= MA; k++) c7[k] = longint'($signed(19'($urandom)));
      run_a(c7, longint'($urandom_range(32767, 0)), 1'b0);
    end
    // saturation: large coefficients at x close to 1
    for (int k = 1; k <= MA; k++) c7[k] = WMAX;
    run_a(c7, 32767, 1'b0);
    for (int k = 1; k <= MA; k++) c7[k] = WMIN;
    run_a(c7, 32767, 1'b0);
    c3[0] = 0;
    for (int i = 0; i < 150; i++) begin
      for (int k = 1; k <= MB; k++) c3[k] = longint'($signed(19'($urandom)));
      run_b(c3, longint'($urandom_range(32767, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
