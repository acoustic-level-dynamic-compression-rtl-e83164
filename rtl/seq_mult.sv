// seq_mult: sequential shift-accumulate multiplier for two's complement
// fractions.
//
// Multiplies a WA-bit two's complement multiplicand a (whatever its binary
// point) by a WB-bit multiplier b in Q1.(WB-1) format and returns the MSB-side WA bits of the product, i.e.
// p = floor(a * b / 2^(WB-1)), saturated to the WA-bit range. With WA = WB = n
// this is the n-bit fractional multiplier of the compressor: an adder, a
// double-length product register {acc, mq} and a multiplicand register.
//
// Algorithm: one multiplier bit per clock, LSB first. When the bit is 1 the
// multiplicand is added to the upper half of the product register (subtracted
// for the sign bit of b, which has weight -1), then the whole register shifts
// right arithmetically. After WB steps it holds the full product.
//
// Interface: pulse start for one cycle while busy is low; a and b are sampled
// then. busy is high for WB cycles; done pulses for one cycle after the last
// step (it rises WB clock edges after the edge that samples start) and p
// stays valid until the next start. Truncation (not rounding) and
// the guard bits of the adder are choices of this design.
module seq_mult #(
  parameter int unsigned WA = comp_pkg::DEF_N,  // multiplicand and result width
  parameter int unsigned WB = comp_pkg::DEF_N   // multiplier width (Q1.(WB-1))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [WA-1:0] a,
  input  logic signed [WB-1:0] b,
  output logic                 busy,
  output logic                 done,
  output logic signed [WA-1:0] p
);

  localparam int unsigned AW = WA + 2;               // accumulator, with guard bits
  localparam int unsigned PW = AW + WB;              // full product register
  localparam int unsigned CW = $clog2(WB + 1);

  logic signed [AW-1:0] acc;
  logic        [WB-1:0] mq;
  logic signed [WA-1:0] mcand;
  logic        [CW-1:0] cnt;

  logic signed [AW-1:0] addend, sum;
  logic signed [PW-1:0] prod, shifted, nxt;
  logic                 last;

  assign last = (cnt == CW'(WB - 1));

  always_comb begin
    addend = '0;
    if (mq[0]) addend = last ? -AW'(mcand) : AW'(mcand);
    sum = acc + addend;
    nxt = $signed({sum, mq}) >>> 1;
  end

  // Full product, rounded down to the result's fraction weight, then saturated.
  localparam logic signed [PW-1:0] PMAX = {{(PW-WA+1){1'b0}}, {(WA-1){1'b1}}};
  localparam logic signed [PW-1:0] PMIN = {{(PW-WA+1){1'b1}}, {(WA-1){1'b0}}};
  always_comb begin
    prod    = $signed({acc, mq});
    shifted = prod >>> (WB - 1);
    if (shifted > PMAX)      p = PMAX[WA-1:0];
    else if (shifted < PMIN) p = PMIN[WA-1:0];
    else                     p = shifted[WA-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      mq    <= '0;
      mcand <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        acc   <= '0;
        mq    <= b;
        mcand <= a;
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        {acc, mq} <= nxt;
        cnt       <= cnt + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A start while the previous product is still being formed is a protocol error.
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("seq_mult: start while busy");

endmodule
