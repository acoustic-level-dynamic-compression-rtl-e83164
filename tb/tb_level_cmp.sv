// tb_level_cmp: self-checking testbench for the CMP block (16 bits).
//
// Random samples and thresholds plus the corners (-1, 0, largest value,
// sample exactly at the threshold) are compared with |v_i|, delta = |v_i| > v_t
// and x = delta * (|v_i| - v_t) worked out here with integer arithmetic.
module tb_level_cmp;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic signed [N-1:0] vi;
  logic [N-1:0] vt, ai, x;
  logic delta;

  level_cmp #(.N(N)) dut (.vi, .vt, .ai, .x, .delta);

  task automatic check(input int v, input int t);
    int ea, ex, ed;
    vi = N'(v); vt = N'(t);
    #1;
    ea = (v < 0) ? -v : v;
    if (ea > 32767) ea = 32767;
    ed = (ea > t) ? 1 : 0;
    ex = ed ? ea - t : 0;
    checks++;
    if (int'(ai) != ea || int'(x) != ex || int'(delta) != ed) begin
      failures++;
      $display("FAIL cmp vi=%0d vt=%0d: ai=%0d x=%0d d=%0d exp %0d %0d %0d",
               v, t, ai, x, delta, ea, ex, ed);
    end
  endtask

  initial begin
    check(-32768, 100);
    check(32767, 100);
    check(0, 0);
    check(0, 328);
    check(328, 328);
    check(-328, 328);
    check(329, 328);
    check(-329, 328);
    check(-32768, 32767);
    for (int i = 0; i < 2000; i++)
      check($signed(16'($urandom)), int'($urandom_range(32767, 0)));
    for (int i = 0; i < 2000; i++)
      check($signed(16'($urandom)) >>> 6, int'($urandom_range(600, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
