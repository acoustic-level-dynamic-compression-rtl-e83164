// compressor: digital audio level compressor / limiter (top level).
//
// For each input sample v_i the compressor computes a gain G and outputs
// v_o = G * v_i. Below the threshold v_t the gain is 1; above it the gain
// follows G_i = 1 - f_m(A_i - v_t) / A_i, where f_m is a programmable
// polynomial that approximates the ideal compression curve
// G = (v_t / A_i)^((p-1)/p) of ratio p (b1 = 1, all other bk = 0 gives a
// limiter, p = infinity). The raw gain is smoothed with separate attack and
// release time constants before it is applied.
//
// Two-stage pipeline:
//   stage 1: CMP (|v_i|, x = delta * (|v_i| - v_t)), then GAIN CALCULATION
//            (Horner polynomial + restoring divide) -> G_i
//   REG-P / REG-V: pipeline registers holding G_i and the sample v_i
//   stage 2: ATTACK/RELEASE smoothing -> G, then the output multiplier
// Stage 1 of sample k+1 runs while stage 2 finishes sample k. If stage 1
// finishes while stage 2 is still busy, its result waits (stage 1 stalls and
// in_ready stays low) until REG-P/REG-V can be loaded.
//
// Interface: a sample is taken when in_valid && in_ready. out_valid pulses
// for one cycle with vo and gain (the smoothed gain applied to that sample);
// there is no output backpressure. vt, b, h0/h1, r0/r1 are configuration
// inputs that must be stable while samples are processed. out_valid rises
// M*(N+2) + 4*N + 10 clock edges after the edge that accepts the sample when
// stage 2 is free (200 cycles at N = 16, M = 7); stage 1 can accept a new
// sample every M*(N+2) + N + 3 cycles (145), stage 2 needs 3*N + 9 (57) per
// sample, so for M >= 3 stage 1 sets the rate and stage 2 never stalls it. The two-register pipeline, the
// position of the multiplier chain and the formats follow the architecture;
// the handshake, the stall rule and the saturation guards are this design's.
module compressor
  import comp_pkg::*;
#(
  parameter int unsigned N      = comp_pkg::DEF_N,
  parameter int unsigned M      = comp_pkg::DEF_M,
  parameter int unsigned CB_INT = comp_pkg::DEF_CB_INT,
  localparam int unsigned W     = N + CB_INT
) (
  input  logic                clk,
  input  logic                rst_n,
  // sample input
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [N-1:0] vi,
  // configuration
  input  logic        [N-1:0] vt,        // threshold magnitude v_t
  input  logic signed [W-1:0] b [1:M],   // polynomial coefficients b1..bM
  input  logic        [N-1:0] h0, h1,    // attack coefficients
  input  logic        [N-1:0] r0, r1,    // release coefficients
  // sample output
  output logic                out_valid,
  output logic signed [N-1:0] vo,
  output logic        [N-1:0] gain,      // smoothed gain applied to vo
  output ar_mode_e            ar_mode,   // attack or release pair used for vo
  output logic                above      // sample of vo was above threshold
);

  // ---------------- stage 1: CMP + gain calculation ----------------
  typedef enum logic [1:0] {S1_IDLE, S1_BUSY, S1_HOLD} s1_state_e;
  typedef enum logic [2:0] {S2_IDLE, S2_AR_KICK, S2_AR, S2_MUL_KICK, S2_MUL} s2_state_e;
  s1_state_e s1;
  s2_state_e s2;

  logic [N-1:0]        cmp_ai, cmp_x;
  logic                cmp_delta;
  logic signed [N-1:0] s1_v;
  logic                s1_delta;
  logic                gc_done;
  logic [N-1:0]        gc_gi;
  logic                accept, s2_load;

  level_cmp #(.N(N)) u_cmp (
    .vi, .vt,
    .ai    (cmp_ai),
    .x     (cmp_x),
    .delta (cmp_delta)
  );

  assign in_ready = (s1 == S1_IDLE);
  assign accept   = in_valid && in_ready;

  gain_calc #(.N(N), .M(M), .CB_INT(CB_INT)) u_gain (
    .clk, .rst_n,
    .start (accept),
    .ai    (cmp_ai),
    .x     (cmp_x),
    .b,
    .busy  (),
    .done  (gc_done),
    .gi    (gc_gi)
  );

  assign s2_load = (s2 == S2_IDLE) && ((s1 == S1_BUSY && gc_done) || s1 == S1_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1       <= S1_IDLE;
      s1_v     <= '0;
      s1_delta <= 1'b0;
    end else begin
      unique case (s1)
        S1_IDLE: if (accept) begin
          s1_v     <= vi;
          s1_delta <= cmp_delta;
          s1       <= S1_BUSY;
        end
        S1_BUSY: if (gc_done) s1 <= s2_load ? S1_IDLE : S1_HOLD;
        S1_HOLD: if (s2_load) s1 <= S1_IDLE;
        default: s1 <= S1_IDLE;
      endcase
    end
  end

  // ---------------- pipeline registers REG-P / REG-V ----------------
  logic [N-1:0]        reg_p;   // raw gain G_i of the sample in stage 2
  logic signed [N-1:0] reg_v;   // the sample itself
  logic                reg_delta;

  // ---------------- stage 2: attack/release + output multiplier ----------------
  logic         ar_done;
  logic [N-1:0] ar_g;
  ar_mode_e     ar_m;
  logic         om_done;
  logic signed [N-1:0] om_p;

  attack_release #(.N(N)) u_ar (
    .clk, .rst_n,
    .start (s2 == S2_AR_KICK),
    .gi    (reg_p),
    .h0, .h1, .r0, .r1,
    .busy  (),
    .done  (ar_done),
    .g     (ar_g),
    .mode  (ar_m)
  );

  seq_mult #(.WA(N), .WB(N)) u_out_mult (
    .clk, .rst_n,
    .start (s2 == S2_MUL_KICK),
    .a     (reg_v),
    .b     (ar_g),
    .busy  (),
    .done  (om_done),
    .p     (om_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2        <= S2_IDLE;
      reg_p     <= '0;
      reg_v     <= '0;
      reg_delta <= 1'b0;
      out_valid <= 1'b0;
      vo        <= '0;
      gain      <= {1'b0, {(N-1){1'b1}}};
      ar_mode   <= AR_RELEASE;
      above     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (s2)
        S2_IDLE: if (s2_load) begin
          reg_p     <= gc_gi;
          reg_v     <= s1_v;
          reg_delta <= s1_delta;
          s2        <= S2_AR_KICK;
        end
        S2_AR_KICK:  s2 <= S2_AR;
        S2_AR:       if (ar_done) s2 <= S2_MUL_KICK;
        S2_MUL_KICK: s2 <= S2_MUL;
        S2_MUL: if (om_done) begin
          vo        <= om_p;
          gain      <= ar_g;
          ar_mode   <= ar_m;
          above     <= reg_delta;
          out_valid <= 1'b1;
          s2        <= S2_IDLE;
        end
        default: s2 <= S2_IDLE;
      endcase
    end
  end

endmodule
