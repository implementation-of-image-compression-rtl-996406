// cosine_rom -- program ROM holding the 8x8 DCT cosine matrix.
//
// The DCTQ processor reads it in two places: the stage-I multipliers need
// a whole row C[v][0..7] per cycle (64 bits), the stage-III multiplier a
// single term C[u][i].  Each use has its own instance.  Entries are
// C[r][c] = round(256 * a(r) * cos((2c+1) r pi / 16)) as signed 8-bit
// numbers, row 0 rounded down to 90 (see dctq_pkg::cos_coef); the scaling
// by 2^8 is this design's choice.  Read latency is MEM_LAT = 2 cycles (address register, data
// register), the same as the pixel RAM so that the two line up.
module cosine_rom
  import dctq_pkg::*;
(
  input  logic         clk,
  input  idx_t         row,
  input  idx_t         col,
  output cos_t [7:0]   row_data,   // C[row][0..7], element c at [c]
  output cos_t         elem        // C[row][col]
);
  cos_t [7:0] rom [8];

  always_comb
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        rom[r][c] = cos_coef(r, c);

  idx_t row_q, col_q;

  always_ff @(posedge clk) begin
    row_q    <= row;
    col_q    <= col;
    row_data <= rom[row_q];
    elem     <= rom[row_q][col_q];
  end

endmodule
