// tb_dctq_top -- end-to-end test of the DCTQ processor.
//
// Ten 8x8 blocks (all-white, all-black, random, checkerboard, ramps, ...)
// are written pixel by pixel.  The first blocks arrive slowly, so the
// processor finishes each block and waits for the next; the later ones
// arrive at full rate, so both RAM banks fill, the writer is held off and
// blocks are processed back to back.  Every DCT and DCTQ output is compared
// with the bit-exact reference model (value and (u,v) position, in order),
// every DCT value is also held within DCT_TOL (32) of the exact DCT, the
// first DCT and DCTQ values of each block must appear 37 and 45 cycles after
// the block starts, and consecutive coefficients 8 cycles apart.  Each mechanism (bank
// switching, writer held off, idle wait, back-to-back blocks) must occur.
module tb_dctq_top;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;
  localparam int NBLK = 10;

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

  blk_t blocks [NBLK];
  blk_t exp_dct [NBLK], exp_q [NBLK];

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %t: %s", $time, msg);
    end
  endtask

  function automatic int gen_pixel(input int b, input int i, input int j);
    case (b % 8)
      0: return 255;
      1: return 0;
      2: return ((i + j) % 2) ? 255 : 0;
      3: return 32 * j + 3 * i;
      4: return 255 - 30 * i;
      5: return (i < 4) ? 200 : 20;
      default: return int'($urandom_range(0, 255));
    endcase
  endfunction

  // ---------------- output checking ----------------
  int  cyc = 0;
  int  dct_n = 0, q_n = 0;       // coefficients seen
  int  start_cyc [$];            // cycles at which blocks started
  int  last_q_cyc = -1;
  bit  busy_q = 0;
  int  stalls = 0, idle = 0, back_to_back = 0, bank_switches = 0, max_err = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy && !busy_q) start_cyc.push_back(cyc);
    if (busy && dut.rd_release && dut.next_avail) begin
      back_to_back++;
      start_cyc.push_back(cyc + 1);
    end
    busy_q = busy;
    if (!busy) idle++;
    if (pix_valid && !pix_ready) stalls++;
    if (pix_valid && pix_ready && pix_addr == 6'd63) bank_switches++;

    if (dct_valid) begin
      int b, u, v, e;
      b = dct_n / 64; u = (dct_n % 64) / 8; v = dct_n % 8;
      chk(int'(dct) == exp_dct[b][u][v],
          $sformatf("blk %0d dct(%0d,%0d) = %0d expected %0d", b, u, v, dct, exp_dct[b][u][v]));
      e = rnd(float_dct(blocks[b], u, v)) - int'(dct);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      chk(e <= DCT_TOL, $sformatf("blk %0d dct(%0d,%0d) = %0d too far from exact", b, u, v, dct));
      if (u == 0 && v == 0)
        chk(b < start_cyc.size() && cyc - start_cyc[b] == TOTAL_LAT - MUL_LAT,
            $sformatf("blk %0d first DCT coefficient %0d cycles after start, expected 37", b,
                      (b < start_cyc.size()) ? cyc - start_cyc[b] : -1));
      dct_n++;
    end
    if (dctq_valid) begin
      int b, u, v;
      b = q_n / 64; u = (q_n % 64) / 8; v = q_n % 8;
      chk(int'(dctq) == exp_q[b][u][v],
          $sformatf("blk %0d dctq(%0d,%0d) = %0d expected %0d", b, u, v, dctq, exp_q[b][u][v]));
      chk(dctq_u == idx_t'(u) && dctq_v == idx_t'(v),
          $sformatf("position (%0d,%0d) expected (%0d,%0d)", dctq_u, dctq_v, u, v));
      if (u == 0 && v == 0)
        chk(b < start_cyc.size() && cyc - start_cyc[b] == TOTAL_LAT,
            $sformatf("blk %0d first coefficient %0d cycles after start, expected 45", b,
                      (b < start_cyc.size()) ? cyc - start_cyc[b] : -1));
      else
        chk(cyc - last_q_cyc == 8, $sformatf("coefficient spacing %0d", cyc - last_q_cyc));
      last_q_cyc = cyc;
      q_n++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    pix_valid = 0; pix_addr = '0; pix_data = '0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) blocks[b][i][j] = gen_pixel(b, i, j);
      ref_block(blocks[b], exp_dct[b], exp_q[b]);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      // blocks 0..2 come slowly (processor idles), the rest at full rate
      if (b < 3) repeat (600) @(negedge clk);
      for (int a = 0; a < 64; a++) begin
        pix_valid = 1; pix_addr = 6'(a); pix_data = pixel_t'(blocks[b][a / 8][a % 8]);
        // pix_ready is stable between rising edges: wait here until the
        // coming edge accepts the pixel
        while (!pix_ready) @(negedge clk);
        @(negedge clk);
      end
      pix_valid = 0;
    end
    while (q_n < NBLK * 64) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(dct_n == NBLK * 64 && q_n == NBLK * 64, "no extra outputs");
    chk(bank_switches == NBLK, "every block switched the write bank");
    chk(stalls > 0, "writer held off while both banks were full");
    chk(idle > 0, "processor idle waiting for a block");
    chk(back_to_back > 0, "blocks processed back to back");
    $display("bank switches %0d, writer stall cycles %0d, idle cycles %0d, back-to-back %0d, max |DCT error| %0d",
             bank_switches, stalls, idle, back_to_back, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
