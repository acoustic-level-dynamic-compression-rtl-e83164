// tb_compressor_stall: compressor with a degree-1 polynomial (a pure limiter,
// b1 = 1), where the gain calculation of stage 1 is shorter than the
// attack/release and output multiply of stage 2.
//
// Stage 1 then finishes while stage 2 is still busy and must hold its result
// until REG-P/REG-V can be loaded: back-to-back samples are accepted every
// 3N + 9 clock edges instead of every M*(N+2) + N + 3 (only the second
// sample, which finds stage 2 free, comes at that rate). The testbench counts
// these stalls (accept intervals set by stage 2), checks every output against
// a bit-exact reference model written here, and checks that with instant
// attack every output magnitude is at or below the threshold.
module tb_compressor_stall;
  import comp_pkg::*;
  localparam int N = 16, M = 1, CBI = 4;
  localparam int W = N + CBI;
  localparam longint ONE = longint'(1) <<< (N - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                in_valid, in_ready, out_valid, above;
  logic signed [N-1:0] vi, vo;
  logic        [N-1:0] vt, h0, h1, r0, r1, gain;
  logic signed [W-1:0] b [1:M];
  ar_mode_e            ar_mode;

  compressor #(.N(N), .M(M), .CB_INT(CBI)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .vi, .vt, .b, .h0, .h1, .r0, .r1,
    .out_valid, .vo, .gain, .ar_mode, .above);

  longint g_state = ONE - 1;
  longint exp_vo [$];

  function automatic longint fmul(longint a, longint bb);
    longint p = (a * bb) >>> (N - 1);
    return (p > ONE - 1) ? ONE - 1 : (p < -ONE) ? -ONE : p;
  endfunction

  // Degree-1 polynomial with b1 = 1: f = x, G_i = 1 - x / A = v_t / A.
  task automatic model(input longint v);
    longint a, x, q, g_i, g;
    bit att;
    a = (v < 0) ? -v : v;
    if (a > ONE - 1) a = ONE - 1;
    x = (a > longint'(vt)) ? a - longint'(vt) : 0;
    if (x <= 0)      q = 0;
    else if (x >= a) q = ONE - 1;
    else             q = (x * ONE) / a;
    g_i = (q == 0) ? ONE - 1 : ONE - q;
    att = (g_i < g_state);
    g = fmul(att ? longint'(h1) : longint'(r1), g_state) + fmul(att ? longint'(h0) : longint'(r0), g_i);
    if (g > ONE - 1) g = ONE - 1;
    g_state = g;
    exp_vo.push_back(fmul(v, g));
  endtask

  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    n_out++;
    checks += 2;
    if (exp_vo.size() == 0) begin
      failures++;
      $display("FAIL output without a pending sample");
    end else begin
      e = exp_vo.pop_front();
      if (longint'(vo) != e) begin
        failures++;
        $display("FAIL sample %0d: vo=%0d exp=%0d", n_out, vo, e);
      end
    end
    if (vo > $signed(vt) || vo < -$signed(vt)) begin
      failures++;
      $display("FAIL limiter output %0d above threshold %0d", vo, vt);
    end
  end

  int cycle = 0, last_accept = -1, n_stall = 0;
  always @(posedge clk) cycle++;

  initial begin
    longint v;
    vt = N'(3277);                 // 0.1 = -20 dB
    b[1] = W'(ONE);                // b1 = 1: limiter
    h1 = '0; h0 = N'(ONE - 1);     // instant attack
    r1 = N'(32000); r0 = N'(768);
    in_valid = 0; vi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      v = (i % 50 < 25) ? longint'($rtoi(30000.0 * $sin(6.2831853 * i / 16.0)))
                                : longint'($rtoi(2000.0 * $sin(6.2831853 * i / 16.0)));
      @(negedge clk);
      vi = N'(v); in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      model(v);
      if (last_accept >= 0) begin
        checks++;
        if (cycle - last_accept == 3 * N + 9) n_stall++;
        else if (!(i == 1 && cycle - last_accept == M * (N + 2) + N + 3)) begin
          failures++;
          $display("FAIL accept interval %0d expected %0d", cycle - last_accept, 3 * N + 9);
        end
      end
      last_accept = cycle;
      @(negedge clk);
      in_valid = 1'b0;
    end
    while (exp_vo.size() != 0) @(posedge clk);
    $display("outputs=%0d stalls=%0d", n_out, n_stall);
    checks++;
    if (n_stall == 0 || n_out != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
