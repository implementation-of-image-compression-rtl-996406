// tb_stack_reg -- feeds the stack groups of eight values, first back to
// back (one per cycle, as in the processor) and then with random gaps, and
// checks that each burst appears exactly once, one cycle after the eighth
// value (8 cycles after the first when there are no gaps), holding the eight
// values in arrival order; out_valid must stay low at all other times.
module tb_stack_reg;
  localparam int NGROUPS = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic signed [13:0] din;
  logic signed [13:0] dout [8];

  stack_reg #(.W(14), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);

  logic signed [13:0] grp [8];
  logic signed [13:0] seen [8];
  logic signed [13:0] exp_vals [8];
  int   bursts = 0;
  int   nseen = 0;
  bit   pending = 0;

  // monitor at the clock edge: the burst must follow the eighth value by
  // exactly one cycle
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== pending) begin
      failures++;
      $display("FAIL %t: out_valid %0b expected %0b", $time, out_valid, pending);
    end
    if (out_valid) begin
      bursts++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (dout[k] !== exp_vals[k]) begin
          failures++;
          $display("FAIL burst %0d slot %0d: %0d expected %0d", bursts, k, dout[k], exp_vals[k]);
        end
      end
    end
    pending = 0;
    if (in_valid) begin
      seen[nseen] = din;
      nseen++;
      if (nseen == 8) begin
        exp_vals = seen;
        pending  = 1;
        nseen    = 0;
      end
    end
  end

  initial begin
    in_valid = 0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NGROUPS; g++) begin
      for (int k = 0; k < 8; k++) grp[k] = 14'($urandom);
      for (int k = 0; k < 8; k++) begin
        // groups in the second half have random idle cycles between values
        while (g >= NGROUPS / 2 && $urandom_range(0, 2) == 0) begin
          in_valid = 0; din = 14'($urandom);
          @(negedge clk);
        end
        in_valid = 1; din = grp[k];
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (bursts != NGROUPS) begin
      failures++;
      $display("FAIL %0d bursts, expected %0d", bursts, NGROUPS);
    end
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
