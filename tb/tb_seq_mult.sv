// tb_seq_mult: self-checking testbench for seq_mult.
//
// Three instances: the n x n fractional multiplier (16 x 16) and the wide
// multiplicand variants used by the Horner evaluator (20 x 16 and, for the
// 32-bit compressor, 36 x 32, checked with 128-bit reference arithmetic). Each gets
// corner operands (+-1, 0, largest values) and random ones; every product is
// compared with floor(a*b / 2^(WB-1)) saturated to WA bits, computed here with
// 64-bit integer arithmetic, and the start-to-done time must be WB cycles.
module tb_seq_mult;
  localparam int WA0 = 16, WB0 = 16;
  localparam int WA1 = 20, WB1 = 16;
  localparam int WA2 = 36, WB2 = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start0, busy0, done0;
  logic signed [WA0-1:0] a0, p0;
  logic signed [WB0-1:0] b0;
  logic start1, busy1, done1;
  logic signed [WA1-1:0] a1, p1;
  logic signed [WB1-1:0] b1;

  logic start2, busy2, done2;
  logic signed [WA2-1:0] a2, p2;
  logic signed [WB2-1:0] b2;

  seq_mult #(.WA(WA2), .WB(WB2)) dut2 (.clk, .rst_n, .start(start2), .a(a2), .b(b2),
                                      .busy(busy2), .done(done2), .p(p2));
  seq_mult #(.WA(WA0), .WB(WB0)) dut0 (.clk, .rst_n, .start(start0), .a(a0), .b(b0),
                                      .busy(busy0), .done(done0), .p(p0));
  seq_mult #(.WA(WA1), .WB(WB1)) dut1 (.clk, .rst_n, .start(start1), .a(a1), .b(b1),
                                      .busy(busy1), .done(done1), .p(p1));

  function automatic longint ref_mul(longint a, longint b, int wa, int wb);
    longint pr, mx, mn;
    pr = (a * b) >>> (wb - 1);
    mx = (longint'(1) <<< (wa - 1)) - 1;
    mn = -(longint'(1) <<< (wa - 1));
    if (pr > mx) pr = mx;
    if (pr < mn) pr = mn;
    return pr;
  endfunction

  task automatic run0(input longint a, input longint b);
    int cyc = 0;
    longint exp_p;
    @(negedge clk);
    a0 = WA0'(a); b0 = WB0'(b); start0 = 1'b1;
    @(negedge clk);
    start0 = 1'b0;
    cyc = 1;
    while (!done0) begin @(negedge clk); cyc++; end
    exp_p = ref_mul(longint'(a0), longint'(b0), WA0, WB0);
    checks++;
    if (longint'(p0) != exp_p) begin
      failures++;
      $display("FAIL mult16 a=%0d b=%0d p=%0d exp=%0d", a0, b0, p0, exp_p);
    end
    checks++;
    if (cyc != WB0 + 1) begin
      failures++;
      $display("FAIL mult16 latency %0d, expected %0d", cyc, WB0 + 1);
    end
  endtask

  task automatic run1(input longint a, input longint b);
    longint exp_p;
    @(negedge clk);
    a1 = WA1'(a); b1 = WB1'(b); start1 = 1'b1;
    @(negedge clk);
    start1 = 1'b0;
    while (!done1) @(negedge clk);
    exp_p = ref_mul(longint'(a1), longint'(b1), WA1, WB1);
    checks++;
    if (longint'(p1) != exp_p) begin
      failures++;
      $display("FAIL mult20x16 a=%0d b=%0d p=%0d exp=%0d", a1, b1, p1, exp_p);
    end
  endtask

  // 36 x 32 (the 32-bit Horner multiplier): 128-bit reference arithmetic.
  task automatic run2(input logic signed [WA2-1:0] a, input logic signed [WB2-1:0] b);
    logic signed [127:0] pr, mx, mn;
    @(negedge clk);
    a2 = a; b2 = b; start2 = 1'b1;
    @(negedge clk);
    start2 = 1'b0;
    while (!done2) @(negedge clk);
    pr = (128'(a) * 128'(b)) >>> (WB2 - 1);
    mx = (128'sd1 <<< (WA2 - 1)) - 1;
    mn = -(128'sd1 <<< (WA2 - 1));
    if (pr > mx) pr = mx;
    if (pr < mn) pr = mn;
    checks++;
    if (128'(p2) != pr) begin
      failures++;
      $display("FAIL mult36x32 a=%0d b=%0d p=%0d exp=%0d", a, b, p2, pr);
    end
  endtask

  initial begin
    start2 = 0; a2 = 0; b2 = 0;
    start0 = 0; start1 = 0; a0 = 0; b0 = 0; a1 = 0; b1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // corners
    run0(-32768, -32768);   // -1 * -1 saturates
    run0(-32768, 32767);
    run0(32767, 32767);
    run0(0, -32768);
    run0(16384, 16384);     // 0.5 * 0.5 = 0.25
    run0(-1, 1);            // floor rounds toward -inf
    run0(12345, -1);
    for (int i = 0; i < 400; i++) run0($signed(16'($urandom)), $signed(16'($urandom)));
    run1(-524288, 32767);
    run1(524287, 32767);
    run1(262144, 16384);    // 8.0 * 0.5
    for (int i = 0; i < 400; i++) run1($signed(20'($urandom)), $signed(16'($urandom)));
    run2({1'b1, 35'd0}, {1'b1, 31'd0});   // -16 * -1 saturates
    run2({1'b0, {35{1'b1}}}, {1'b0, {31{1'b1}}});
    run2({1'b1, 35'd0}, {1'b0, {31{1'b1}}});
    for (int i = 0; i < 200; i++) run2($signed({4'($urandom), 32'($urandom)}), $signed(32'($urandom)));
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
