// csa_adder8 -- pipelined eight-operand signed carry-save adder.
//
// The DCTQ processor has two of these: Adder12s (eight 12-bit stage-I
// products to a 15-bit row sum, 5 pipeline stages) and Adder14s (the eight
// 14-bit stage-III products from the stack to a 17-bit coefficient sum,
// 6 pipeline stages).  Carry-save addition and the stage counts follow the
// published architecture; the tree shape is this design's choice.
//
// How it works: operands are sign-extended to OUT_W bits.  A Wallace-style
// tree of 3:2 carry-save compressors reduces 8 -> 6 -> 4 -> 3 -> 2 operands,
// one register level each, and a final carry-propagate add gives the sum in
// the fifth level.  Any STAGES above 5 are extra input registers.  All
// arithmetic is modulo 2^OUT_W, so OUT_W must hold the true sum
// (IN_W + 3 bits always does).
//
// Interface: in_valid/x[] sampled every cycle, out_valid/sum STAGES cycles
// later.  No stall.
module csa_adder8 #(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned OUT_W  = 15,
  parameter int unsigned STAGES = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum
);
  localparam int unsigned XTRA = STAGES - 5;
  typedef logic signed [OUT_W-1:0] w_t;

  initial begin
    assert (STAGES >= 5) else $fatal(1, "csa_adder8 needs STAGES >= 5");
  end

  // 3:2 compressor: a+b+c == s+c_out (mod 2^OUT_W)
  function automatic void csa(input w_t a, input w_t b, input w_t c,
                              output w_t s, output w_t co);
    s  = a ^ b ^ c;
    co = ((a & b) | (a & c) | (b & c)) << 1;
  endfunction

  // optional input registers
  w_t   xin [XTRA+1][8];
  logic [STAGES-1:0] vld;

  always_comb
    for (int k = 0; k < 8; k++) xin[0][k] = w_t'(x[k]);

  if (XTRA > 0) begin : g_in
    always_ff @(posedge clk)
      for (int s = 1; s <= XTRA; s++) xin[s] <= xin[s-1];
  end

  w_t l1 [6];
  w_t l2 [4];
  w_t l3 [3];
  w_t l4 [2];
  w_t l5;
  always_ff @(posedge clk) begin
    w_t s_a, c_a, s_b, c_b;
    // level 1: 8 -> 6
    csa(xin[XTRA][0], xin[XTRA][1], xin[XTRA][2], s_a, c_a);
    csa(xin[XTRA][3], xin[XTRA][4], xin[XTRA][5], s_b, c_b);
    l1 <= '{s_a, c_a, s_b, c_b, xin[XTRA][6], xin[XTRA][7]};
    // level 2: 6 -> 4
    csa(l1[0], l1[1], l1[2], s_a, c_a);
    csa(l1[3], l1[4], l1[5], s_b, c_b);
    l2 <= '{s_a, c_a, s_b, c_b};
    // level 3: 4 -> 3
    csa(l2[0], l2[1], l2[2], s_a, c_a);
    l3 <= '{s_a, c_a, l2[3]};
    // level 4: 3 -> 2
    csa(l3[0], l3[1], l3[2], s_a, c_a);
    l4 <= '{s_a, c_a};
    // level 5: carry-propagate add
    l5 <= l4[0] + l4[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[STAGES-2:0], in_valid};
  end

  assign sum       = l5;
  assign out_valid = vld[STAGES-1];

endmodule
