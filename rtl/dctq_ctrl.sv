// dctq_ctrl -- DCTQ controller: index sequencing and memory addressing.
//
// For each 8x8 block the processor produces the 64 coefficients row by row
// (u = row, v = column).  Coefficient (u,v) is sum_i C[u][i] * S_i(v) with
// the row sum S_i(v) = sum_j C[v][j] * I[i][j], so the controller spends
// eight cycles per coefficient, one per image row i: it runs a 9-bit count
// t = {u, v, i} from 0 to 511 and reads pixel row i together with cosine
// row v in every cycle.  That gives one coefficient every 8 cycles, as
// published.
//
// The other memories must be addressed when the matching data reaches them
// in the fixed-latency pipeline, so the count is carried along a delay line
// and tapped:
//   tap 13: stage-III cosine ROM address (u, i), data at the multiplier at 15
//   tap 35: quantisation ROM address (u, v), data at the quantiser at 37
//   tap 45: index (u, v) of the coefficient leaving the quantiser
// (with 2-cycle memories, 8-stage multipliers, a 5- and a 6-stage adder and
// the 8-cycle stack; see dctq_pkg).
//
// Block handshake with the decked RAM: a block starts when blk_avail is
// set; in its last cycle (t = 511) rd_release frees the bank, and if the
// other bank already holds a block (next_avail) the next block starts in
// the following cycle with no gap.  The count sequencing follows the
// published algorithm; the delay-line structure is this design's choice.
module dctq_ctrl
  import dctq_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic blk_avail,
  input  logic next_avail,
  output logic busy,
  // pixel RAM and stage-I cosine ROM
  output logic rd_en,
  output idx_t rd_row,
  output logic rd_release,
  output idx_t cos1_row,
  // stage-III cosine ROM
  output idx_t cos2_row,
  output idx_t cos2_col,
  // quantisation ROM
  output idx_t q_u,
  output idx_t q_v,
  // index of the coefficient at the output
  output idx_t out_u,
  output idx_t out_v
);
  typedef struct packed {
    idx_t u;
    idx_t v;
    idx_t i;
  } tag_t;

  localparam int unsigned TAP_COS2  = MEM_LAT + MUL_LAT + ADD1_LAT - MEM_LAT;   // 13
  localparam int unsigned TAP_QUANT = TOTAL_LAT - MUL_LAT - MEM_LAT;            // 35
  localparam int unsigned TAP_OUT   = TOTAL_LAT;                                // 45

  tag_t t;
  tag_t dl [1:TAP_OUT];
  logic last;

  assign last       = busy && (t == tag_t'(9'd511));
  assign rd_en      = busy;
  assign rd_row     = t.i;
  assign cos1_row   = t.v;
  assign rd_release = last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      t    <= '0;
    end else if (!busy) begin
      busy <= blk_avail;
      t    <= '0;
    end else begin
      t <= t + 1'b1;                 // wraps from 511 to 0
      if (last) busy <= next_avail;
    end
  end

  always_ff @(posedge clk) begin
    dl[1] <= t;
    for (int k = 2; k <= TAP_OUT; k++) dl[k] <= dl[k-1];
  end

  assign cos2_row = dl[TAP_COS2].u;
  assign cos2_col = dl[TAP_COS2].i;
  assign q_u      = dl[TAP_QUANT].u;
  assign q_v      = dl[TAP_QUANT].v;
  assign out_u    = dl[TAP_OUT].u;
  assign out_v    = dl[TAP_OUT].v;

endmodule
