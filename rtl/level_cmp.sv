// level_cmp: the CMP block of the compressor (combinational).
//
// From a sample v_i and the threshold v_t (both Q1.(N-1)) it forms the
// magnitude A_i = |v_i|, the excess alpha = A_i - v_t, the flag
// delta = (alpha > 0) and the polynomial argument x = delta * alpha, which is
// alpha above the threshold and 0 at or below it. The magnitude of -1 is not
// representable and is saturated to 1 - 2^-(N-1) (a choice of this design).
// v_t is taken as non-negative; the top level registers the outputs.
module level_cmp #(
  parameter int unsigned N = comp_pkg::DEF_N
) (
  input  logic signed [N-1:0] vi,     // input sample
  input  logic        [N-1:0] vt,     // threshold magnitude, 0 <= vt < 1
  output logic        [N-1:0] ai,     // |vi|
  output logic        [N-1:0] x,      // delta * (ai - vt)
  output logic                delta   // ai above threshold
);

  logic [N:0] alpha;   // ai - vt with a borrow bit

  always_comb begin
    if (vi == {1'b1, {(N-1){1'b0}}}) ai = {1'b0, {(N-1){1'b1}}};
    else if (vi < 0)                 ai = N'(-vi);
    else                             ai = N'(vi);
    alpha = {1'b0, ai} - {1'b0, vt};
    delta = !alpha[N] && (alpha != '0);
    x     = delta ? alpha[N-1:0] : '0;
  end

endmodule
