// tb_dctq_ctrl -- checks the DCTQ controller against a model of the block
// buffer.  Blocks become available at random times (sometimes two at once,
// sometimes none for a while).  Checked every cycle: a block starts the
// cycle after one is available; the read index runs i fastest, then v,
// then u over 512 cycles; rd_release comes with the 512th read; a waiting
// second block starts with no idle cycle; the stage-III cosine address
// (u,i), the quantiser address (u,v) and the output index (u,v) are the
// read index of 13, 35 and 45 cycles earlier.
module tb_dctq_ctrl;
  import dctq_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic blk_avail, next_avail, busy, rd_en, rd_release;
  idx_t rd_row, cos1_row, cos2_row, cos2_col, q_u, q_v, out_u, out_v;

  dctq_ctrl dut (.*);

  int nblk = 0;           // complete blocks in the buffer
  int hist [$];           // issued count per cycle, -1 when idle
  int exp_t = -1;         // expected count this cycle, -1 idle
  int started = 0, back_to_back = 0, idle_waits = 0, done = 0;

  assign blk_avail  = nblk >= 1;
  assign next_avail = nblk >= 2;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %t: %s", $time, msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    int n;
    chk(rd_en == (exp_t >= 0), "rd_en / busy");
    if (exp_t >= 0) begin
      chk(rd_row == idx_t'(exp_t % 8), "i index");
      chk(cos1_row == idx_t'((exp_t / 8) % 8), "v index");
      chk(rd_release == (exp_t == 511), "rd_release");
    end else chk(!rd_release, "no release while idle");
    hist.push_back(exp_t);
    n = hist.size();
    if (n > 13 && hist[n-14] >= 0) begin
      chk(cos2_row == idx_t'(hist[n-14] / 64), "cos2 u");
      chk(cos2_col == idx_t'(hist[n-14] % 8), "cos2 i");
    end
    if (n > 35 && hist[n-36] >= 0) begin
      chk(q_u == idx_t'(hist[n-36] / 64), "quant u");
      chk(q_v == idx_t'((hist[n-36] / 8) % 8), "quant v");
    end
    if (n > 45 && hist[n-46] >= 0) begin
      chk(out_u == idx_t'(hist[n-46] / 64), "out u");
      chk(out_v == idx_t'((hist[n-46] / 8) % 8), "out v");
    end
    // next expected count
    if (exp_t == 511) begin
      nblk--;
      done++;
      if (nblk >= 1) begin exp_t = 0; back_to_back++; started++; end
      else exp_t = -1;
    end else if (exp_t >= 0) exp_t++;
    else if (nblk >= 1) begin exp_t = 0; started++; end
    else idle_waits++;
  end

  // block arrivals
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (done < 12) begin
      @(negedge clk);
      if (nblk < 2 && $urandom_range(0, (done < 6) ? 700 : 60) == 0) nblk++;
    end
    chk(back_to_back > 0, "a block followed another with no gap");
    chk(idle_waits > 0, "controller idled without a block");
    $display("blocks %0d, back-to-back starts %0d", done, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
