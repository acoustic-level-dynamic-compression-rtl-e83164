// gain_calc: the GAIN CALCULATION block, G_i = 1 - f_m(x) / A_i.
//
// The compression characteristic above the threshold needs the fractional
// power (v_t / A_i)^((p-1)/p). It is replaced by G_i = 1 - f_m(x) / A_i, where
// f_m is a degree-M polynomial in x = A_i - v_t (x = 0 at or below the
// threshold, which gives G_i = 1). The polynomial runs on poly_horner and the
// quotient on restoring_div, one after the other.
//
// f_m(x) is clamped to [0, A_i] before the division (a choice of this design:
// the ideal f lies in [0, A_i) but a fitted polynomial can stray outside),
// and the quotient saturates below 1, so G_i is never below 2^-(N-1). G_i = 1
// is not representable in Q1.(N-1) and is returned as 1 - 2^-(N-1).
//
// Interface: pulse start while busy is low; ai and x are sampled then, the
// coefficients must stay stable until done. done rises M*(N+2) + N + 1
// clock edges after the edge that samples start; gi holds until the next
// result.
module gain_calc #(
  parameter int unsigned N      = comp_pkg::DEF_N,
  parameter int unsigned M      = comp_pkg::DEF_M,
  parameter int unsigned CB_INT = comp_pkg::DEF_CB_INT,
  localparam int unsigned W     = N + CB_INT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic        [N-1:0] ai,      // |v_i|
  input  logic        [N-1:0] x,       // delta * (|v_i| - v_t)
  input  logic signed [W-1:0] b [1:M], // polynomial coefficients b1..bM
  output logic                busy,
  output logic                done,
  output logic        [N-1:0] gi       // raw gain, Q1.(N-1), 0 < gi < 1
);

  typedef enum logic [1:0] {S_IDLE, S_POLY, S_DIV} state_e;
  state_e state;

  logic [N-1:0]        air;
  logic                p_done, d_done;
  logic signed [W-1:0] f;
  logic [N-1:0]        num, q;
  logic [N-1:0]        g_full;    // unsigned: 1 - q <= 1 fits in N bits

  poly_horner #(.N(N), .M(M), .CB_INT(CB_INT)) u_poly (
    .clk, .rst_n,
    .start (start && state == S_IDLE),
    .x, .b,
    .busy  (),
    .done  (p_done),
    .f
  );

  // Clamp f to [0, A_i]: f <= 0 gives no gain reduction, f >= A_i saturates.
  always_comb begin
    if (f <= 0)                  num = '0;
    else if (f >= W'(air))       num = air;
    else                         num = f[N-1:0];
  end

  restoring_div #(.N(N)) u_div (
    .clk, .rst_n,
    .start (p_done),
    .num,
    .den   (air),
    .busy  (),
    .done  (d_done),
    .q
  );

  // G_i = 1 - q, with 1 itself replaced by the largest fraction.
  always_comb begin
    g_full = {1'b1, {(N-1){1'b0}}} - q;
    if (q == '0) g_full = {1'b0, {(N-1){1'b1}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      air   <= '0;
      gi    <= {1'b0, {(N-1){1'b1}}};
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          air   <= ai;
          state <= S_POLY;
        end
        S_POLY: if (p_done) state <= S_DIV;
        S_DIV:  if (d_done) begin
          gi    <= g_full;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("gain_calc: start while busy");

endmodule
