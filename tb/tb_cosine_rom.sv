// tb_cosine_rom -- checks every entry of the cosine ROM, through both its
// row output and its single-element output, against
// round(256 * a(u) * cos((2x+1) u pi / 16)) computed here in floating point
// (row 0, 256/sqrt(8) = 90.5, rounded down),
// and checks the 2-cycle read latency by changing the address every cycle.
module tb_cosine_rom;
  import dctq_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  idx_t       row, col;
  cos_t [7:0] row_data;
  cos_t       elem;

  cosine_rom dut (.clk, .row, .col, .row_data, .elem);

  function automatic int ref_cos(input int u, input int x);
    real a, v;
    a = (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    v = 256.0 * a * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0);
    if (u == 0) return int'($floor(v));
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  int hist_r [$], hist_c [$];

  initial begin
    row = 0; col = 0;
    for (int n = 0; n < 64 + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        int r, c;
        r = hist_r[n-2]; c = hist_c[n-2];
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(row_data[k]) != ref_cos(r, k)) begin
            failures++;
            $display("FAIL row %0d col %0d: %0d expected %0d", r, k, row_data[k], ref_cos(r, k));
          end
        end
        checks++;
        if (int'(elem) != ref_cos(r, c)) begin
          failures++;
          $display("FAIL elem %0d,%0d: %0d expected %0d", r, c, elem, ref_cos(r, c));
        end
      end
      // visit all 64 (row, col) pairs in a scrambled order
      row = idx_t'((n * 5) % 8);
      col = idx_t'((n * 3 + n / 8) % 8);
      hist_r.push_back(int'(row));
      hist_c.push_back(int'(col));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
