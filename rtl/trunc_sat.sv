// trunc_sat -- cuts a signed value to a narrower bus between two pipeline
// stages of the DCTQ processor.
//
// The input is divided by 2^SHIFT and the result is clamped to the signed
// range of OUT_W bits.  With TO_ZERO = 0 the low bits are simply dropped
// (arithmetic shift, rounding towards minus infinity); with TO_ZERO = 1 the
// quotient is rounded towards zero, as a sign-magnitude truncation does, so
// that small negative values become 0 rather than -1 (used for the
// quantiser).  Combinational.  The published architecture truncates between
// stages to save area; the shift amounts, the rounding direction and the
// clamp are this design's choice (the clamp is there for safety and does
// not act on 8-bit pixel data).
module trunc_sat #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned SHIFT = 4,
  parameter bit          TO_ZERO = 1'b0
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 << (OUT_W - 1));

  logic signed [IN_W-1:0] sh;

  always_comb begin
    if (TO_ZERO && din < 0) sh = (din + IN_W'((1 << SHIFT) - 1)) >>> SHIFT;
    else                    sh = din >>> SHIFT;
    if (sh > MAXV)      dout = OUT_W'(MAXV);
    else if (sh < MINV) dout = OUT_W'(MINV);
    else                dout = OUT_W'(sh);
  end

endmodule
