// attack_release: attack/release gain smoother on a single multiplier.
//
// Per sample it computes G(t) = C1 * G(t-1) + C0 * G_i(t), a first-order
// recursive filter that moves the applied gain G towards the raw gain G_i
// with time constant T: C1 = exp(-1/(fs*T + 1)), C0 = 1 - C1. The pair
// (C0, C1) is (h0, h1) for the attack time T_a while the gain is falling
// (G_i(t) < G(t-1)) and (r0, r1) for the release time T_r otherwise.
// The two products share one multiplier in two steps:
//   step 1: REG  := C1 * G(t-1)
//   step 2: G(t) := C0 * G_i(t) + REG
// Selectors in front of the multiplier choose the operands of each step.
//
// Selecting the attack pair for a falling gain follows the definition of
// attack and release time (attack when G_i < G); it is the reverse of the
// comparison written in the coefficient-switch equation, whose direction
// would give a rising gain the attack constant. The coefficients are run-time
// inputs, Q1.(N-1), 0 <= C < 1; the host computes them from fs, T_a and T_r.
// G resets to 1 - 2^-(N-1) (unity gain); the sum saturates at that value.
//
// Interface: pulse start while busy is low with gi valid; the coefficients
// must be stable until done. done rises 2*(N+2) clock edges after the edge
// that samples start; g
// and mode then hold the new gain and the pair that was used.
module attack_release
  import comp_pkg::*;
#(
  parameter int unsigned N = comp_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] gi,           // raw gain G_i(t)
  input  logic [N-1:0] h0, h1,       // attack coefficients
  input  logic [N-1:0] r0, r1,       // release coefficients
  output logic         busy,
  output logic         done,
  output logic [N-1:0] g,            // smoothed gain G(t)
  output ar_mode_e     mode          // pair used for the last sample
);

  typedef enum logic [2:0] {S_IDLE, S_K1, S_W1, S_K2, S_W2} state_e;
  state_e state;

  logic [N-1:0] gir, c0, c1, reg_p;
  logic         m_start, m_done;
  logic [N-1:0] m_a, m_b;
  logic signed [N-1:0] m_p;
  logic [N:0]   sum;

  localparam logic [N-1:0] GMAX = {1'b0, {(N-1){1'b1}}};

  // Operand selectors: step 1 uses (C1, G(t-1)), step 2 uses (C0, G_i(t)).
  always_comb begin
    if (state == S_K1 || state == S_W1) begin
      m_a = c1;
      m_b = g;
    end else begin
      m_a = c0;
      m_b = gir;
    end
    m_start = (state == S_K1) || (state == S_K2);
    sum     = {1'b0, N'(m_p)} + {1'b0, reg_p};
  end

  seq_mult #(.WA(N), .WB(N)) u_mult (
    .clk, .rst_n,
    .start (m_start),
    .a     (m_a),
    .b     (m_b),
    .busy  (),
    .done  (m_done),
    .p     (m_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gir   <= '0;
      c0    <= '0;
      c1    <= '0;
      reg_p <= '0;
      g     <= GMAX;
      mode  <= AR_RELEASE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          gir <= gi;
          if (gi < g) begin
            c0   <= h0;
            c1   <= h1;
            mode <= AR_ATTACK;
          end else begin
            c0   <= r0;
            c1   <= r1;
            mode <= AR_RELEASE;
          end
          state <= S_K1;
        end
        S_K1: state <= S_W1;
        S_W1: if (m_done) begin
          reg_p <= N'(m_p);
          state <= S_K2;
        end
        S_K2: state <= S_W2;
        S_W2: if (m_done) begin
          g     <= (sum > {1'b0, GMAX}) ? GMAX : sum[N-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("attack_release: start while busy");

endmodule
