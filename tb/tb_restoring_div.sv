// tb_restoring_div: self-checking testbench for restoring_div (16 bits).
//
// Random fractions 0 <= num < den, plus the edge cases num = 0, den = 0 and
// num >= den (saturation), are checked against q = floor(num * 2^15 / den)
// computed with integer division; start-to-done must be N-1 clock edges.
module tb_restoring_div;
  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic start, busy, done;
  logic [N-1:0] num, den, q;

  restoring_div #(.N(N)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  task automatic run(input longint n, input longint d);
    int cyc;
    longint e;
    @(negedge clk);
    num = N'(n); den = N'(d); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (n == 0)      e = 0;
    else if (n >= d) e = (1 << (N - 1)) - 1;
    else             e = (n << (N - 1)) / d;
    checks++;
    if (longint'(q) != e) begin
      failures++;
      $display("FAIL div num=%0d den=%0d q=%0d exp=%0d", n, d, q, e);
    end
    checks++;
    if (cyc != N) begin
      failures++;
      $display("FAIL div latency %0d expected %0d", cyc, N);
    end
  endtask

  initial begin
    longint n, d;
    start = 0; num = 0; den = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 0);
    run(0, 1000);
    run(5, 0);
    run(1000, 1000);
    run(32767, 100);
    run(1, 32767);
    run(32766, 32767);
    run(327, 32767);
    for (int i = 0; i < 500; i++) begin
      d = longint'($urandom_range(32767, 1));
      n = longint'($urandom_range(32767, 0)) % d;
      run(n, d);
    end
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
