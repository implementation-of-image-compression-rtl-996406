// tb_quant_rom -- checks all 64 inverse quantisation values against
// round(1024 / Q) for the JPEG luminance table (kept here as its own copy),
// with the address changing every cycle to check the 2-cycle latency.
module tb_quant_rom;
  import dctq_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  idx_t u, v;
  iq_t  iq;

  quant_rom dut (.clk, .u, .v, .iq);

  int q_ref [8][8] = '{
    '{16, 11, 10, 16,  24,  40,  51,  61},
    '{12, 12, 14, 19,  26,  58,  60,  55},
    '{14, 13, 16, 24,  40,  57,  69,  56},
    '{14, 17, 22, 29,  51,  87,  80,  62},
    '{18, 22, 37, 56,  68, 109, 103,  77},
    '{24, 35, 55, 64,  81, 104, 113,  92},
    '{49, 64, 78, 87, 103, 121, 120, 101},
    '{72, 92, 95, 98, 112, 100, 103,  99}};

  int hist [$];

  initial begin
    u = 0; v = 0;
    for (int n = 0; n < 64 + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        int a, e;
        a = hist[n-2];
        e = int'($floor(1024.0 / q_ref[a/8][a%8] + 0.5));
        checks++;
        if (int'(iq) != e) begin
          failures++;
          $display("FAIL IQ[%0d][%0d] = %0d expected %0d", a / 8, a % 8, iq, e);
        end
      end
      {u, v} = 6'((n * 37) % 64);
      hist.push_back(int'({u, v}));
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
