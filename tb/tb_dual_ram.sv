// tb_dual_ram -- random test of the decked pixel RAM.  A writer process
// loads random 8x8 blocks pixel by pixel with random idle cycles; a reader
// process waits for a complete block, reads its rows in random order with
// gaps, then releases the bank.  A reference queue of complete blocks
// predicts blk_avail, next_avail, wr_ready and every row read, which must
// arrive exactly 2 cycles after rd_en.  The test also requires that the
// writer was held off (both banks full) and that the reader found no block
// waiting, at least once each.
module tb_dual_ram;
  import dctq_pkg::*;
  localparam int NBLK = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic         wr_en, wr_ready, blk_avail, next_avail, rd_en, rd_release, rd_valid;
  logic [5:0]   wr_addr;
  pixel_t       wr_data;
  idx_t         rd_row;
  pixel_t [7:0] rd_data;

  dual_ram dut (.*);

  typedef pixel_t [7:0] row_t;
  typedef row_t blk_t [8];

  blk_t q [$];
  blk_t cur;
  row_t exp_row [3];
  bit   exp_vld [3];
  int   stalls = 0, waits = 0, blocks_read = 0;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %t: %s", $time, msg);
    end
  endtask

  // reference model, sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    chk(blk_avail == (q.size() >= 1), "blk_avail");
    chk(next_avail == (q.size() >= 2), "next_avail");
    chk(wr_ready == (q.size() < 2), "wr_ready");
    chk(rd_valid == exp_vld[2], "rd_valid latency");
    if (exp_vld[2]) chk(rd_data == exp_row[2], "rd_data");
    if (wr_en && !wr_ready) stalls++;
    exp_vld[2] = exp_vld[1]; exp_row[2] = exp_row[1];
    exp_vld[1] = rd_en;
    if (rd_en && q.size() > 0) exp_row[1] = q[0][rd_row];
    if (wr_en && wr_ready) begin
      cur[wr_addr[5:3]][wr_addr[2:0]] = wr_data;
      if (wr_addr == 6'd63) q.push_back(cur);
    end
    if (rd_release && q.size() > 0) void'(q.pop_front());
  end

  // writer
  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int a = 0; a < 64; a++) begin
        // the first third of the blocks arrive slowly, so the reader waits
        while ($urandom_range(0, (b < NBLK / 3) ? 1 : 12) == 0) begin
          wr_en = 0;
          @(negedge clk);
        end
        wr_en = 1; wr_addr = 6'(a); wr_data = pixel_t'($urandom);
        while (!wr_ready) @(negedge clk);
        @(negedge clk);
      end
    end
    wr_en = 0;
  end

  // reader
  initial begin
    rd_en = 0; rd_row = '0; rd_release = 0;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      int order [8];
      @(negedge clk);
      if (!blk_avail) waits++;
      while (!blk_avail) @(negedge clk);
      for (int k = 0; k < 8; k++) order[k] = k;
      order.shuffle();
      for (int k = 0; k < 8; k++) begin
        rd_en = 1; rd_row = idx_t'(order[k]);
        rd_release = (k == 7);
        @(negedge clk);
        rd_en = 0; rd_release = 0;
        if (b >= NBLK / 3) repeat ($urandom_range(0, 30)) @(negedge clk);
      end
      blocks_read++;
    end
    repeat (4) @(negedge clk);
    chk(blocks_read == NBLK, "all blocks read");
    chk(q.size() == 0, "queue empty at end");
    chk(stalls > 0, "writer was held off at least once");
    chk(waits > 0, "reader waited for a block at least once");
    $display("writer stall cycles %0d, reader waits %0d", stalls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
