// vedic_mult -- pipelined Urdhva-Tiryagbhyam ("vertically and crosswise")
// multiplier with selectable operand signedness.
//
// The DCTQ processor uses three multiplier units, all of this module with
// different widths: 8u x 8s for the eight stage-I products, 11s x 8s for the
// stage-III product and 12s x 8s for the quantiser.  Each is an 8-stage
// pipeline, as in the published architecture.
//
// How it works: signed operands are turned into sign and magnitude (the
// sign bit is only treated as a sign where the operand is signed).  The
// magnitudes are multiplied the Vedic way: for every output column k the
// bit products a[i]&b[j] with i+j=k (the vertical and crosswise products)
// are counted, then the column counts are weighted and added, and the sign
// is applied last.  Pipeline registers: 1 sign/magnitude, 2 column counts,
// 3 weighted sum, 4 signed result; further LATENCY-4 registers only delay
// the result so that the unit has the published latency.  The split of the
// work over the stages is this design's choice.
//
// Interface: in_valid/a/b are sampled every cycle (no stall); out_valid/p
// appear LATENCY cycles later.  p is AW+BW bits wide, signed whenever either
// operand is signed.
module vedic_mult #(
  parameter int unsigned AW       = 8,
  parameter int unsigned BW       = 8,
  parameter bit          A_SIGNED = 1'b0,
  parameter bit          B_SIGNED = 1'b1,
  parameter int unsigned LATENCY  = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [AW-1:0]       a,
  input  logic [BW-1:0]       b,
  output logic                out_valid,
  output logic [AW+BW-1:0]    p
);
  localparam int unsigned PW   = AW + BW;
  localparam int unsigned NCOL = AW + BW - 1;
  localparam int unsigned CW   = $clog2((AW < BW ? AW : BW) + 1);

  initial begin
    assert (LATENCY >= 4) else $fatal(1, "vedic_mult needs LATENCY >= 4");
  end

  // stage 1: sign and magnitude
  logic          neg1;
  logic [AW-1:0] ma1;
  logic [BW-1:0] mb1;
  logic          a_neg, b_neg;

  assign a_neg = A_SIGNED && a[AW-1];
  assign b_neg = B_SIGNED && b[BW-1];

  // stage 2: column counts of the crosswise bit products
  logic [CW-1:0] col2 [NCOL];
  logic          neg2;
  logic [CW-1:0] col_c [NCOL];

  always_comb begin
    for (int k = 0; k < NCOL; k++) col_c[k] = '0;
    for (int i = 0; i < AW; i++)
      for (int j = 0; j < BW; j++)
        col_c[i+j] = col_c[i+j] + CW'(ma1[i] & mb1[j]);
  end

  // stage 3: weighted sum of the columns (magnitude of the product)
  logic [PW-1:0] mag3;
  logic          neg3;
  logic [PW-1:0] mag_c;

  always_comb begin
    mag_c = '0;
    for (int k = 0; k < NCOL; k++) mag_c = mag_c + (PW'(col2[k]) << k);
  end

  // stage 4 .. LATENCY: signed result and delay
  logic [PW-1:0] pipe [LATENCY-3];
  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    neg1 <= a_neg ^ b_neg;
    ma1  <= a_neg ? AW'(-a) : a;
    mb1  <= b_neg ? BW'(-b) : b;
    col2 <= col_c;
    neg2 <= neg1;
    mag3 <= mag_c;
    neg3 <= neg2;
    pipe[0] <= neg3 ? PW'(-mag3) : mag3;
    for (int s = 1; s < LATENCY - 3; s++) pipe[s] <= pipe[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign p         = pipe[LATENCY-4];
  assign out_valid = vld[LATENCY-1];

endmodule
