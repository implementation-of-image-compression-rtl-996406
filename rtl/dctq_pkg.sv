// dctq_pkg -- widths, scalings and constant tables shared by the DCTQ processor.
//
// The processor computes an 8x8 2-D DCT followed by quantisation.  Every
// arithmetic stage has the width of the unit that performs it (8u x 8s and
// 11s x 8s multipliers, 12- and 14-bit adders, 12s x 8s quantiser, 9-bit
// result); after each stage the result is cut back to the next stage's width
// by an arithmetic right shift.  The unit widths are those of the published
// architecture; how many low bits each cut drops is this design's choice,
// picked so that the 12-bit DCT coefficient comes out at unit scale
// (cosines are scaled by 2^8, twice, and the four shifts remove 2^16).
//
// Cosine matrix: C[u][x] = round(256 * a(u) * cos((2x+1) u pi / 16)),
// a(u>0) = 1/2, except that row 0 (a(0) = 1/sqrt(8), 90.5 after scaling) is
// rounded down to 90 so that the DC coefficient of a white block (exactly
// 2040) stays inside the 12-bit DCT range.  Computed here from the eight
// distinct magnitudes, so no table file is needed.
// Quantisation: the divider is replaced by a multiplication with
// IQ[u][v] = round(1024 / Q[u][v]) followed by a 10-bit right shift.  Q is the
// common JPEG luminance table (the published architecture does not list its
// quantisation values).
package dctq_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel, unsigned
  localparam int unsigned COS_W   = 8;   // cosine term, signed
  localparam int unsigned IQ_W    = 8;   // inverse quantisation value, signed
  localparam int unsigned T1_W    = 12;  // stage-I product after cut (16 -> 12)
  localparam int unsigned S1_W    = 15;  // Adder12s output
  localparam int unsigned T2_W    = 11;  // row sum after cut (15 -> 11)
  localparam int unsigned T3_W    = 14;  // stage-III product after cut (19 -> 14)
  localparam int unsigned S2_W    = 17;  // Adder14s output
  localparam int unsigned DCT_W   = 12;  // DCT coefficient
  localparam int unsigned DCTQ_W  = 9;   // quantised coefficient

  localparam int unsigned SH1     = 4;   // 16 -> 12
  localparam int unsigned SH2     = 4;   // 15 -> 11
  localparam int unsigned SH3     = 5;   // 19 -> 14
  localparam int unsigned SH4     = 3;   // 17 -> 12
  localparam int unsigned SHQ     = 10;  // 20 -> 9 (inverse quantiser scale)

  localparam int unsigned MUL_LAT = 8;   // pipeline stages of every multiplier
  localparam int unsigned MEM_LAT = 2;   // read latency of RAM and ROMs
  localparam int unsigned ADD1_LAT = 5;  // Adder12s pipeline stages
  localparam int unsigned ADD2_LAT = 6;  // Adder14s pipeline stages
  localparam int unsigned STACK_LAT = 8; // stack: first product in to burst out
  // 2 + 8 + 5 + 8 + 8 + 6 + 8 = 45 cycles to the first DCTQ coefficient
  localparam int unsigned TOTAL_LAT = MEM_LAT + MUL_LAT + ADD1_LAT + MUL_LAT +
                                      STACK_LAT + ADD2_LAT + MUL_LAT;

  typedef logic        [PIX_W-1:0] pixel_t;
  typedef logic signed [COS_W-1:0] cos_t;
  typedef logic signed [IQ_W-1:0]  iq_t;
  typedef logic        [2:0]       idx_t;

  // 128 * cos(k pi / 16), k = 0..8, rounded
  localparam int COS_MAG [9] = '{128, 126, 118, 106, 91, 71, 49, 25, 0};

  // JPEG luminance quantisation table, row-major: Q[u][v] = QTAB[8*u + v]
  localparam int QTAB [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99
  };

  // C[u][x] scaled by 256, as a signed 8-bit value
  function automatic cos_t cos_coef(input int u, input int x);
    int k;
    int val;
    if (u == 0) return cos_t'(90);       // 256 / sqrt(8) = 90.5, rounded down
    k = ((2 * x + 1) * u) % 32;          // angle in units of pi/16
    if (k <= 8)       val =  COS_MAG[k];
    else if (k <= 16) val = -COS_MAG[16 - k];
    else if (k <= 24) val = -COS_MAG[k - 16];
    else              val =  COS_MAG[32 - k];
    return cos_t'(val);
  endfunction

  // inverse quantisation value round(2^SHQ / Q[u][v])
  function automatic iq_t quant_iq(input int u, input int v);
    int q;
    q = QTAB[8 * u + v];
    return iq_t'(((1 << SHQ) + q / 2) / q);
  endfunction

endpackage
