// restoring_div: sequential restoring divider for the gain quotient f / A_i.
//
// num and den are non-negative fractions in Q1.(N-1). For 0 <= num < den the
// quotient q = floor(num * 2^(N-1) / den) is a fraction in [0, 1) and is
// produced one bit per clock, MSB first: the partial remainder is doubled,
// the divisor is subtracted, and the subtraction is kept (quotient bit 1) or
// undone (quotient bit 0). The datapath is an adder, a remainder register
// and a quotient shift register, like the multiplier.
//
// num = 0 gives q = 0. num >= den (outside the range the gain formula
// allows) saturates q to the largest fraction 1 - 2^-(N-1); this guard is a
// choice of this design.
//
// Interface: pulse start while busy is low; num and den are sampled then.
// busy stays high for N-1 cycles, done pulses once after the last quotient
// bit (N-1 clock edges after the edge that samples start) and q holds until
// the next start.
module restoring_div #(
  parameter int unsigned N = comp_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] num,
  input  logic [N-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] q
);

  localparam int unsigned CW = $clog2(N);

  logic [N:0]    rem;       // partial remainder, one bit wider than the operands
  logic [N-1:0]  dvs;
  logic [N-1:0]  quo;
  logic [CW-1:0] cnt;
  logic          sat;

  logic [N+1:0]  rem2;
  logic [N:0]    diff;      // rem2 - dvs, only kept when it is below dvs
  logic          fits;

  always_comb begin
    rem2 = {rem, 1'b0};
    diff = rem2[N:0] - {1'b0, dvs};
    fits = (dvs != '0) && (rem2 >= (N+2)'(dvs));
  end

  assign q = sat ? {1'b0, {(N-1){1'b1}}} : quo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dvs  <= '0;
      quo  <= '0;
      cnt  <= '0;
      sat  <= 1'b0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem  <= {1'b0, num};
        dvs  <= den;
        quo  <= '0;
        cnt  <= '0;
        sat  <= (num != '0) && (num >= den);
        busy <= 1'b1;
      end else if (busy) begin
        rem <= fits ? diff : rem2[N:0];
        quo <= {quo[N-2:0], fits};
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("restoring_div: start while busy");

endmodule
