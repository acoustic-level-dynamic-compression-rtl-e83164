// poly_horner: evaluates the gain polynomial f_m(x) = b1 x + b2 x^2 + ... + bm x^m
// by Horner's rule on one sequential multiplier and one adder.
//
// The recurrence is f_0 = b_m, f_i = f_(i-1) * x + b_(m-i) for i = 1..m, with
// b_0 = 0 (the polynomial has no constant term), so f_m is the result after m
// multiply-add steps. x is a non-negative fraction in Q1.(N-1). Coefficients
// and the accumulator are W = N + CB_INT bits wide with N-1 fraction bits:
// the extra integer bits hold coefficients above 1 in magnitude (a choice of
// this design). Each product is truncated to N-1 fraction bits by seq_mult and
// each sum saturates to the W-bit range.
//
// Interface: pulse start while busy is low; x is sampled then and the
// coefficient ports must stay stable until done. Each step takes N + 2
// cycles (operand load, N multiplier cycles, accumulate), so done rises
// M * (N + 2) clock edges after the edge that samples start; f is valid from
// then until the next start.
module poly_horner #(
  parameter int unsigned N      = comp_pkg::DEF_N,
  parameter int unsigned M      = comp_pkg::DEF_M,
  parameter int unsigned CB_INT = comp_pkg::DEF_CB_INT,
  localparam int unsigned W     = N + CB_INT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic        [N-1:0] x,
  input  logic signed [W-1:0] b [1:M],   // b[k] multiplies x^k
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] f
);

  localparam int unsigned IW = $clog2(M + 1);

  typedef enum logic [1:0] {S_IDLE, S_KICK, S_WAIT} state_e;
  state_e state;

  logic        [N-1:0] xr;
  logic        [IW-1:0] step;          // i of the recurrence, 1..M
  logic                m_start, m_done;
  logic signed [W-1:0] m_p;
  logic signed [W-1:0] bnext;
  logic signed [W:0]   sum;

  seq_mult #(.WA(W), .WB(N)) u_mult (
    .clk, .rst_n,
    .start (m_start),
    .a     (f),
    .b     (xr),
    .busy  (),
    .done  (m_done),
    .p     (m_p)
  );

  assign m_start = (state == S_KICK);

  // Coefficient added after step i is b_(M-i); b_0 = 0.
  always_comb begin
    bnext = '0;
    for (int k = 1; k <= int'(M) - 1; k++)
      if (int'(step) == int'(M) - k) bnext = b[k];
    sum = (W+1)'(m_p) + (W+1)'(bnext);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xr    <= '0;
      step  <= '0;
      f     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr    <= x;
          f     <= b[M];
          step  <= IW'(1);
          state <= S_KICK;
        end
        S_KICK: state <= S_WAIT;
        S_WAIT: if (m_done) begin
          if (sum[W] != sum[W-1]) f <= sum[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
          else                    f <= sum[W-1:0];
          if (step == IW'(M)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step  <= step + 1'b1;
            state <= S_KICK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("poly_horner: start while busy");

endmodule
