// dctq_top -- 8x8 DCT and quantisation (DCTQ) processor.
//
// Pixels of 8x8 blocks are written one at a time into a decked RAM; for
// every block the processor emits its 64 quantised DCT coefficients in
// row-major order (u = vertical frequency, v = horizontal), one every 8
// clock cycles, the first 45 cycles after it starts on the block.
//
// Dataflow (each arrow one fixed-latency pipeline):
//   RAM row i (8 pixels) x cosine row C[v][*]  -> 8 multipliers 8u x 8s (8)
//   cut 16 -> 12 bits, Adder12s: S_i(v) = sum_j C[v][j] I[i][j]     (5)
//   cut 15 -> 11 bits, multiplier 11s x 8s: C[u][i] * S_i(v)         (8)
//   cut 19 -> 14 bits, stack collects i = 0..7                       (8)
//   Adder14s, cut 17 -> 12 bits: DCT coefficient (u,v)               (6)
//   multiplier 12s x 8s with IQ[u][v], cut 20 -> 9 bits towards 0: DCTQ (8)
// plus the 2-cycle memory read: 2+8+5+8+8+6+8 = 45 cycles.  The dataflow,
// the unit widths and all latencies follow the published architecture;
// the number of bits each cut drops, the quantisation table and the
// interfaces are this design's choices (see dctq_pkg).
//
// Ports: pix_valid/pix_addr/pix_data/pix_ready write pixels (address
// 8*row + col, address 63 last, held while pix_ready is low).  dct_valid/
// dct give each unquantised 12-bit coefficient (8 cycles before the
// quantised one), dctq_valid/dctq/dctq_u/dctq_v the 9-bit quantised result
// and its position.  busy is high while a block is being processed.
module dctq_top
  import dctq_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic [5:0]               pix_addr,
  input  pixel_t                   pix_data,
  output logic                     pix_ready,
  output logic                     busy,
  output logic                     dct_valid,
  output logic signed [DCT_W-1:0]  dct,
  output logic                     dctq_valid,
  output logic signed [DCTQ_W-1:0] dctq,
  output idx_t                     dctq_u,
  output idx_t                     dctq_v
);
  // ---------------- controller and memories ----------------
  logic   blk_avail, next_avail, rd_en, rd_release, rd_valid;
  idx_t   rd_row, cos1_row, cos2_row, cos2_col, q_u, q_v;
  pixel_t [7:0] rd_data;
  cos_t   [7:0] cos1_data;
  cos_t   [7:0] cos2_row_unused;
  cos_t         cos2_data;
  cos_t         cos1_elem_unused;
  iq_t          iq;

  dctq_ctrl u_ctrl (
    .clk, .rst_n, .blk_avail, .next_avail, .busy,
    .rd_en, .rd_row, .rd_release, .cos1_row,
    .cos2_row, .cos2_col, .q_u, .q_v,
    .out_u(dctq_u), .out_v(dctq_v)
  );

  dual_ram u_ram (
    .clk, .rst_n,
    .wr_en(pix_valid), .wr_addr(pix_addr), .wr_data(pix_data), .wr_ready(pix_ready),
    .blk_avail, .next_avail, .rd_en, .rd_row, .rd_release, .rd_valid, .rd_data
  );

  cosine_rom u_cos1 (
    .clk, .row(cos1_row), .col(3'd0), .row_data(cos1_data), .elem(cos1_elem_unused)
  );

  cosine_rom u_cos2 (
    .clk, .row(cos2_row), .col(cos2_col), .row_data(cos2_row_unused), .elem(cos2_data)
  );

  quant_rom u_quant (.clk, .u(q_u), .v(q_v), .iq);

  // ---------------- stage I: eight 8u x 8s multipliers ----------------
  logic [7:0]                 m1_valid;
  logic [2*PIX_W-1:0]         m1_p [8];
  logic signed [T1_W-1:0]     t1   [8];

  for (genvar j = 0; j < 8; j++) begin : g_stage1
    vedic_mult #(.AW(PIX_W), .BW(COS_W), .A_SIGNED(1'b0), .B_SIGNED(1'b1),
                 .LATENCY(MUL_LAT)) u_mul (
      .clk, .rst_n, .in_valid(rd_valid), .a(rd_data[j]), .b(cos1_data[j]),
      .out_valid(m1_valid[j]), .p(m1_p[j])
    );
    trunc_sat #(.IN_W(2*PIX_W), .OUT_W(T1_W), .SHIFT(SH1)) u_cut (
      .din(m1_p[j]), .dout(t1[j])
    );
  end

  // ---------------- stage II: Adder12s ----------------
  // The eight stage-I multipliers run in lockstep, so the valid of the
  // first stands for all of them (the other seven valid bits are unused).
  logic                   a1_valid;
  logic signed [S1_W-1:0] a1_sum;
  logic signed [T2_W-1:0] t2;

  csa_adder8 #(.IN_W(T1_W), .OUT_W(S1_W), .STAGES(ADD1_LAT)) u_add12 (
    .clk, .rst_n, .in_valid(m1_valid[0]), .x(t1), .out_valid(a1_valid), .sum(a1_sum)
  );
  trunc_sat #(.IN_W(S1_W), .OUT_W(T2_W), .SHIFT(SH2)) u_cut2 (.din(a1_sum), .dout(t2));

  // ---------------- stage III: 11s x 8s multiplier ----------------
  logic                          m2_valid;
  logic [T2_W+COS_W-1:0]         m2_p;
  logic signed [T3_W-1:0]        t3;

  vedic_mult #(.AW(T2_W), .BW(COS_W), .A_SIGNED(1'b1), .B_SIGNED(1'b1),
               .LATENCY(MUL_LAT)) u_mul2 (
    .clk, .rst_n, .in_valid(a1_valid), .a(t2), .b(cos2_data),
    .out_valid(m2_valid), .p(m2_p)
  );
  trunc_sat #(.IN_W(T2_W+COS_W), .OUT_W(T3_W), .SHIFT(SH3)) u_cut3 (.din(m2_p), .dout(t3));

  // ---------------- stack ----------------
  logic                   st_valid;
  logic signed [T3_W-1:0] st_data [8];

  stack_reg #(.W(T3_W), .DEPTH(8)) u_stack (
    .clk, .rst_n, .in_valid(m2_valid), .din(t3), .out_valid(st_valid), .dout(st_data)
  );

  // ---------------- stage IV: Adder14s ----------------
  logic                   a2_valid;
  logic signed [S2_W-1:0] a2_sum;

  csa_adder8 #(.IN_W(T3_W), .OUT_W(S2_W), .STAGES(ADD2_LAT)) u_add14 (
    .clk, .rst_n, .in_valid(st_valid), .x(st_data), .out_valid(a2_valid), .sum(a2_sum)
  );
  trunc_sat #(.IN_W(S2_W), .OUT_W(DCT_W), .SHIFT(SH4)) u_cut4 (.din(a2_sum), .dout(dct));
  assign dct_valid = a2_valid;

  // ---------------- quantiser: 12s x 8s multiplier ----------------
  logic [DCT_W+IQ_W-1:0] m3_p;

  vedic_mult #(.AW(DCT_W), .BW(IQ_W), .A_SIGNED(1'b1), .B_SIGNED(1'b1),
               .LATENCY(MUL_LAT)) u_mul3 (
    .clk, .rst_n, .in_valid(a2_valid), .a(dct), .b(iq),
    .out_valid(dctq_valid), .p(m3_p)
  );
  trunc_sat #(.IN_W(DCT_W+IQ_W), .OUT_W(DCTQ_W), .SHIFT(SHQ), .TO_ZERO(1'b1)) u_cutq (.din(m3_p), .dout(dctq));

endmodule
