// tb_gain_calc: self-checking testbench for the gain calculation
// G_i = 1 - f_m(x) / A_i (N = 16, degree 7).
//
// The expected gain is computed here independently: the Horner polynomial
// with 64-bit integers, the clamp of f to [0, A_i], the quotient by integer
// division and G = 1 - q (1 itself given as 1 - 2^-15). Three coefficient
// sets are used: the limiter (b1 = 1, so G_i = v_t / A_i), a degree-7 fit of
// a 2:1 compressor at -40 dB (also checked against the ideal gain
// (v_t/A_i)^(1/2) within 1 dB, the accuracy of that fit) and random sets that drive f outside [0, A_i].
// The start-to-done time must be M*(N+2) + N + 1 clock edges.
module tb_gain_calc;
  localparam int N = 16, M = 7, CBI = 4, W = N + CBI;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [N-1:0] ai, x, gi;
  logic signed [W-1:0] b [1:M];

  gain_calc #(.N(N), .M(M), .CB_INT(CBI)) dut (.clk, .rst_n, .start, .ai, .x, .b,
                                               .busy, .done, .gi);

  localparam longint WMAX = (longint'(1) <<< (W - 1)) - 1;
  localparam longint WMIN = -(longint'(1) <<< (W - 1));
  longint c [1:M];

  function automatic longint satw(longint v);
    return (v > WMAX) ? WMAX : (v < WMIN) ? WMIN : v;
  endfunction

  function automatic longint ref_gain(longint a, longint xx);
    longint f = c[M];
    longint q;
    for (int i = 1; i <= M; i++)
      f = satw(satw((f * xx) >>> (N - 1)) + ((i == M) ? 0 : c[M - i]));
    if (f <= 0)      q = 0;
    else if (f >= a) q = 32767;
    else             q = (f << (N - 1)) / a;
    return (q == 0) ? 32767 : 32768 - q;
  endfunction

  task automatic run(input longint a, input longint t, input real ideal_tol);
    int cyc;
    longint e, xx;
    real ideal;
    xx = (a > t) ? a - t : 0;
    @(negedge clk);
    ai = N'(a); x = N'(xx); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    e = ref_gain(a, xx);
    checks++;
    if (longint'(gi) != e) begin
      failures++;
      $display("FAIL gain A=%0d x=%0d g=%0d exp=%0d", a, xx, gi, e);
    end
    checks++;
    if (cyc != M * (N + 2) + N + 2) begin
      failures++;
      $display("FAIL gain latency %0d", cyc);
    end
    if (ideal_tol > 0.0) begin
      ideal = (a > t) ? $sqrt(real'(t) / real'(a)) : 1.0;
      checks++;
      ideal = 20.0 * $log10(real'(gi) / 32768.0 / ideal);   // error in dB
      if (ideal > ideal_tol || -ideal > ideal_tol) begin
        failures++;
        $display("FAIL gain ideal A=%0d g=%f error %f dB", a, real'(gi) / 32768.0, ideal);
      end
    end
  endtask

  initial begin
    real fit [1:7] = '{0.68161585, 1.20890859, -3.69688159, 6.98761114,
                       -7.76505054, 4.64488855, -1.15166436};
    start = 0; ai = 0; x = 0;
    for (int k = 1; k <= M; k++) b[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // limiter: G_i = v_t / A_i
    for (int k = 1; k <= M; k++) c[k] = 0;
    c[1] = 32768;
    for (int k = 1; k <= M; k++) b[k] = W'(c[k]);
    for (int i = 0; i < 60; i++) run(longint'($urandom_range(32767, 0)), 3277, 0.0);
    run(0, 3277, 0.0);
    run(3277, 3277, 0.0);
    // 2:1 compressor, threshold 0.01 (-40 dB)
    for (int k = 1; k <= M; k++) c[k] = longint'($rtoi(fit[k] * 32768.0));
    for (int k = 1; k <= M; k++) b[k] = W'(c[k]);
    for (int i = 1; i <= 60; i++) run(longint'(i * 546), 328, 1.0);
    // random coefficient sets, including f < 0 and f >= A_i
    for (int j = 0; j < 40; j++) begin
      for (int k = 1; k <= M; k++) c[k] = longint'($signed(19'($urandom)));
      for (int k = 1; k <= M; k++) b[k] = W'(c[k]);
      for (int i = 0; i < 4; i++) run(longint'($urandom_range(32767, 0)), longint'($urandom_range(2000, 0)), 0.0);
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
