// tb_dctq_image -- full-size workload: one 256x256 8-bit image (1024 blocks
// of 8x8) through the DCTQ processor at its default configuration, pixels
// written at full rate, so blocks run back to back.
//
// The image is generated here (smooth shading, edges, a textured region and
// noise) because no photograph can be shipped with the test.  Every DCTQ
// coefficient is compared with the bit-exact reference model; the total
// cycle count must equal 45 + 1024*512 - 8 from the first block's start to
// the last coefficient (one coefficient every 8 cycles with no gaps).
// Reported: the worst DCT error against the exact transform, the share of
// zero quantised coefficients, and the PSNR of the image rebuilt by
// dequantising and inverse-transforming in floating point.
module tb_dctq_image;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;
  localparam int W = 256, H = 256;
  localparam int NBLK = (W / 8) * (H / 8);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                     pix_valid, pix_ready, busy, dct_valid, dctq_valid;
  logic [5:0]               pix_addr;
  pixel_t                   pix_data;
  logic signed [DCT_W-1:0]  dct;
  logic signed [DCTQ_W-1:0] dctq;
  idx_t                     dctq_u, dctq_v;

  dctq_top dut (.*);

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %t: %s", $time, msg);
    end
  endtask

  function automatic int image(input int y, input int x);
    int p;
    p = (x + y) / 2;                                   // diagonal shading
    if ((x - 128) * (x - 128) + (y - 110) * (y - 110) < 60 * 60) p = 40 + y / 8;  // dark disc
    if (y > 200) p = ((x / 4 + y / 4) % 2) ? 180 : 90; // textured ground
    if (x > 200 && x < 210 && y < 200) p = 230;        // thin bright pole
    p += int'($urandom_range(0, 8)) - 4;               // sensor noise
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction

  int   img [H][W];
  blk_t blk [NBLK];
  blk_t qrx [NBLK];
  int   q_n = 0, zeros = 0, max_err = 0, first_start = -1, last_out = -1, cyc = 0;

  function automatic blk_t get_block(input int b);
    blk_t r;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) r[i][j] = img[(b / (W / 8)) * 8 + i][(b % (W / 8)) * 8 + j];
    return r;
  endfunction

  blk_t cur_dct, cur_q;
  int   cur_blk = -1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy && first_start < 0) first_start = cyc;
    if (dctq_valid) begin
      int b, u, v, e;
      b = q_n / 64; u = (q_n % 64) / 8; v = q_n % 8;
      if (b != cur_blk) begin
        ref_block(blk[b], cur_dct, cur_q);
        cur_blk = b;
      end
      chk(int'(dctq) == cur_q[u][v] && dctq_u == idx_t'(u) && dctq_v == idx_t'(v),
          $sformatf("blk %0d dctq(%0d,%0d) = %0d expected %0d", b, u, v, dctq, cur_q[u][v]));
      e = rnd(float_dct(blk[b], u, v)) - cur_dct[u][v];
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      qrx[b][u][v] = int'(dctq);
      if (dctq == 0) zeros++;
      last_out = cyc;
      q_n++;
    end
  end

  initial begin
    real se, psnr;
    pix_valid = 0; pix_addr = '0; pix_data = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = image(y, x);
    for (int b = 0; b < NBLK; b++) blk[b] = get_block(b);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int a = 0; a < 64; a++) begin
        pix_valid = 1; pix_addr = 6'(a); pix_data = pixel_t'(blk[b][a / 8][a % 8]);
        while (!pix_ready) @(negedge clk);
        @(negedge clk);
      end
    end
    pix_valid = 0;
    while (q_n < NBLK * 64) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(q_n == NBLK * 64, "coefficient count");
    chk(last_out - first_start == TOTAL_LAT + NBLK * 512 - 8,
        $sformatf("%0d cycles from first start to last coefficient, expected %0d",
                  last_out - first_start, TOTAL_LAT + NBLK * 512 - 8));
    chk(max_err <= DCT_TOL, $sformatf("worst DCT error %0d", max_err));
    // reconstruction quality
    se = 0.0;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          real r;
          r = float_idct(qrx[b], i, j);
          r = (r < 0.0) ? 0.0 : (r > 255.0) ? 255.0 : r;
          se += (r - blk[b][i][j]) * (r - blk[b][i][j]);
        end
    psnr = 10.0 * $log10(255.0 * 255.0 / (se / (W * H)));
    $display("cycles %0d for %0d blocks, worst DCT error %0d, zero coefficients %0d of %0d, PSNR %0.2f dB",
             last_out - first_start, NBLK, max_err, zeros, NBLK * 64, psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 512 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
