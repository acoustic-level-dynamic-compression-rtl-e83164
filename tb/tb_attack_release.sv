// tb_attack_release: self-checking testbench for the attack/release smoother.
//
// Every sample is checked against a reference computed here:
// mode = attack if G_i(t) < G(t-1); G(t) = floor(C1*G(t-1)) + floor(C0*G_i(t))
// in 15-bit fractions, saturated at 1 - 2^-15. The coefficients follow
// C1 = exp(-1/(fs*T + 1)), C0 = 1 - C1 with fs*T_a = 10 and fs*T_r = 100
// samples. A gain step down and a step back up check the time constants:
// the smoothed gain must cover 63.2 % of the step after fs*T + 1 samples
// (within one sample). Start-to-done must be 2*(N+2) clock edges.
module tb_attack_release;
  import comp_pkg::*;
  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [N-1:0] gi, h0, h1, r0, r1, g;
  ar_mode_e mode;

  attack_release #(.N(N)) dut (.clk, .rst_n, .start, .gi, .h0, .h1, .r0, .r1,
                               .busy, .done, .g, .mode);

  longint gm = 32767;   // reference model state G(t-1)
  int n_attack = 0, n_release = 0;

  task automatic run(input longint g_in);
    int cyc;
    longint c0, c1, e;
    bit att;
    @(negedge clk);
    gi = N'(g_in); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    att = (g_in < gm);
    c0 = att ? longint'(h0) : longint'(r0);
    c1 = att ? longint'(h1) : longint'(r1);
    e = ((c1 * gm) >>> 15) + ((c0 * g_in) >>> 15);
    if (e > 32767) e = 32767;
    gm = e;
    if (att) n_attack++; else n_release++;
    checks++;
    if (longint'(g) != e || mode != (att ? AR_ATTACK : AR_RELEASE)) begin
      failures++;
      $display("FAIL ar gi=%0d g=%0d exp=%0d mode=%0d exp_att=%0d", g_in, g, e, mode, att);
    end
    checks++;
    if (cyc != 2 * (N + 2) + 1) begin
      failures++;
      $display("FAIL ar latency %0d", cyc);
    end
  endtask

  // Apply a constant G_i until the output has moved 63.2 % of the way from
  // g0 to the target; return the number of samples that took.
  task automatic step_time(input longint target, input longint g0, output int n);
    real frac;
    n = 0;
    do begin
      run(target);
      n++;
      frac = real'(longint'(g) - g0) / real'(target - g0);
    end while (frac < 0.632 && n < 1000);
  endtask

  initial begin
    int n;
    longint g_settled;
    real a1, rr1;
    a1  = $exp(-1.0 / (10.0 + 1.0));
    rr1 = $exp(-1.0 / (100.0 + 1.0));
    h1 = N'($rtoi(a1 * 32768.0));  h0 = N'(32768 - $rtoi(a1 * 32768.0));
    r1 = N'($rtoi(rr1 * 32768.0)); r0 = N'(32768 - $rtoi(rr1 * 32768.0));
    start = 0; gi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // attack: step from 1 to 0.25
    step_time(8192, 32767, n);
    checks++;
    if (n < 10 || n > 12) begin
      failures++;
      $display("FAIL attack time: %0d samples, expected 11", n);
    end
    repeat (100) run(8192);
    // release: step back to 1 from the settled value
    g_settled = longint'(g);
    step_time(32767, g_settled, n);
    checks++;
    if (n < 100 || n > 102) begin
      failures++;
      $display("FAIL release time: %0d samples, expected 101", n);
    end
    for (int i = 0; i < 300; i++) run(longint'($urandom_range(32767, 1)));
    checks++;
    if (n_attack == 0 || n_release == 0) failures++;
    $display("attack samples %0d, release samples %0d", n_attack, n_release);
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
