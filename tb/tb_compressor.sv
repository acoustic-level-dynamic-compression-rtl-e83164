// tb_compressor: end-to-end testbench of the compressor at its default size
// (16-bit samples, degree-7 gain polynomial).
//
// A bit-exact reference model written here (|v_i|, threshold, Horner
// polynomial, clamp and divide, attack/release recursion, output product)
// predicts every output sample; outputs must arrive in order and match.
// The stimulus is a sequence of sine bursts at -6, -20, -30 and -60 dBFS with
// a 2:1 characteristic at a -40 dB threshold, then the same input with the
// coefficients switched to the limiter setting (b1 = 1) and instant attack,
// where every output magnitude must stay at or below the threshold.
// Mechanisms counted (each must occur): samples below and above the
// threshold, attack and release smoothing steps, limiter-mode samples and a
// full-scale negative sample. The first sample's latency must be
// M*(N+2) + 4N + 10 clock edges and back-to-back samples must be accepted
// every M*(N+2) + N + 3 edges.
module tb_compressor;
  import comp_pkg::*;
  localparam int N = comp_pkg::DEF_N, M = comp_pkg::DEF_M, CBI = comp_pkg::DEF_CB_INT;
  localparam int W = N + CBI;
  localparam longint ONE = longint'(1) <<< (N - 1);
  localparam longint WMAX = (longint'(1) <<< (W - 1)) - 1;
  localparam longint WMIN = -(longint'(1) <<< (W - 1));

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                in_valid, in_ready, out_valid, above;
  logic signed [N-1:0] vi, vo;
  logic        [N-1:0] vt, h0, h1, r0, r1, gain;
  logic signed [W-1:0] b [1:M];
  ar_mode_e            ar_mode;

  compressor dut (.clk, .rst_n, .in_valid, .in_ready, .vi, .vt, .b, .h0, .h1, .r0, .r1,
                  .out_valid, .vo, .gain, .ar_mode, .above);

  // ---------------- reference model ----------------
  longint c [1:M];
  longint g_state = ONE - 1;
  longint exp_vo [$];
  longint exp_att [$];
  longint exp_above [$];

  function automatic longint satw(longint v);
    return (v > WMAX) ? WMAX : (v < WMIN) ? WMIN : v;
  endfunction

  function automatic longint fmul(longint a, longint bb, longint lim);
    longint p = (a * bb) >>> (N - 1);
    return (p > lim - 1) ? lim - 1 : (p < -lim) ? -lim : p;
  endfunction

  task automatic model(input longint v);
    longint a, x, f, q, g_i, cc0, cc1, g;
    bit att;
    a = (v < 0) ? -v : v;
    if (a > ONE - 1) a = ONE - 1;
    x = (a > longint'(vt)) ? a - longint'(vt) : 0;
    f = c[M];
    for (int i = 1; i <= M; i++)
      f = satw(fmul(f, x, WMAX + 1) + ((i == M) ? 0 : c[M - i]));
    if (f <= 0)      q = 0;
    else if (f >= a) q = ONE - 1;
    else             q = (f * ONE) / a;
    g_i = (q == 0) ? ONE - 1 : ONE - q;
    att = (g_i < g_state);
    cc0 = att ? longint'(h0) : longint'(r0);
    cc1 = att ? longint'(h1) : longint'(r1);
    g = fmul(cc1, g_state, ONE) + fmul(cc0, g_i, ONE);
    if (g > ONE - 1) g = ONE - 1;
    g_state = g;
    exp_vo.push_back(fmul(v, g, ONE));
    exp_att.push_back(longint'(att));
    exp_above.push_back(longint'(x > 0));
  endtask

  // ---------------- mechanism counters ----------------
  int n_below = 0, n_above = 0, n_attack = 0, n_release = 0, n_limiter = 0, n_fullscale = 0;
  int n_out = 0;
  bit limiter_phase = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    n_out++;
    checks++;
    if (exp_vo.size() == 0) begin
      failures++;
      $display("FAIL output without a pending sample");
    end else begin
      e = exp_vo.pop_front();
      if (longint'(vo) != e || longint'(ar_mode) != exp_att.pop_front()
          || longint'(above) != exp_above.pop_front()) begin
        failures++;
        $display("FAIL sample %0d: vo=%0d exp=%0d", n_out, vo, e);
      end
    end
    if (above) n_above++; else n_below++;
    if (ar_mode == AR_ATTACK) n_attack++; else n_release++;
    if (limiter_phase) begin
      n_limiter++;
      checks++;
      if (vo > $signed(vt) || vo < -$signed(vt)) begin
        failures++;
        $display("FAIL limiter output %0d above threshold %0d", vo, vt);
      end
    end
  end

  // ---------------- stimulus ----------------
  int last_accept = -1, cycle = 0, n_rate_ok = 0;
  always @(posedge clk) cycle++;

  task automatic send(input longint v, input bit b2b);
    @(negedge clk);
    vi = N'(v); in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    model(v);
    if (v == -ONE) n_fullscale++;
    if (b2b && last_accept >= 0) begin
      checks++;
      if (cycle - last_accept != M * (N + 2) + N + 3) begin
        failures++;
        $display("FAIL accept interval %0d", cycle - last_accept);
      end else n_rate_ok++;
    end
    last_accept = cycle;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic burst(input real amp_db, input int count);
    real amp = $pow(10.0, amp_db / 20.0);
    for (int i = 0; i < count; i++)
      send(longint'($rtoi(amp * $sin(6.2831853 * i / 24.0) * 32767.0)), 1'b1);
  endtask

  task automatic drain();
    while (exp_vo.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    real fit [1:7] = '{0.68161585, 1.20890859, -3.69688159, 6.98761114,
                       -7.76505054, 4.64488855, -1.15166436};
    real a1, rr1;
    int t0, lat;
    a1  = $exp(-1.0 / (10.0 + 1.0));
    rr1 = $exp(-1.0 / (100.0 + 1.0));
    h1 = N'($rtoi(a1 * 32768.0));  h0 = N'(32768 - $rtoi(a1 * 32768.0));
    r1 = N'($rtoi(rr1 * 32768.0)); r0 = N'(32768 - $rtoi(rr1 * 32768.0));
    vt = N'(328);                                  // 0.01 = -40 dB
    for (int k = 1; k <= M; k++) c[k] = longint'($rtoi(fit[k] * 32768.0));
    for (int k = 1; k <= M; k++) b[k] = W'(c[k]);
    in_valid = 0; vi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // latency of one sample through an empty pipeline
    send(20000, 1'b0);
    t0 = cycle;
    while (!out_valid) @(posedge clk);
    lat = cycle - t0;
    checks++;
    if (lat != M * (N + 2) + 4 * N + 10) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, M * (N + 2) + 4 * N + 10);
    end
    drain();
    last_accept = -1;
    burst(-6.0, 48);
    burst(-20.0, 48);
    burst(-60.0, 72);
    burst(-30.0, 48);
    send(-ONE, 1'b1);
    send(ONE - 1, 1'b1);
    drain();
    // mode switch: limiter with instant attack
    for (int k = 1; k <= M; k++) c[k] = 0;
    c[1] = ONE;
    for (int k = 1; k <= M; k++) b[k] = W'(c[k]);
    h1 = '0; h0 = N'(ONE - 1);
    limiter_phase = 1'b1;
    last_accept = -1;
    burst(-3.0, 48);
    burst(-50.0, 24);
    send(-ONE, 1'b1);
    drain();
    $display("below=%0d above=%0d attack=%0d release=%0d limiter=%0d fullscale=%0d rate_checks=%0d",
             n_below, n_above, n_attack, n_release, n_limiter, n_fullscale, n_rate_ok);
    checks++;
    if (n_below == 0 || n_above == 0 || n_attack == 0 || n_release == 0 || n_limiter == 0
        || n_fullscale == 0 || n_rate_ok == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
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
