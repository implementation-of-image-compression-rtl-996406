// tb_csa_adder8 -- checks the eight-operand carry-save adder in both of its
// uses: Adder12s (12-bit operands, 15-bit sum, 5 stages) and Adder14s
// (14-bit operands, 17-bit sum, 6 stages).  Random signed operands, with
// all-minimum and all-maximum vectors mixed in, are applied every cycle
// with random valid; each sum is compared with the integer sum of the inputs
// applied exactly 5 (resp. 6) cycles earlier.
module tb_csa_adder8;
  localparam int NCYC = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic               v1_in, v1_out, v2_in, v2_out;
  logic signed [11:0] x1 [8];
  logic signed [13:0] x2 [8];
  logic signed [14:0] s1;
  logic signed [16:0] s2;

  csa_adder8 #(.IN_W(12), .OUT_W(15), .STAGES(5)) dut12 (
    .clk, .rst_n, .in_valid(v1_in), .x(x1), .out_valid(v1_out), .sum(s1));
  csa_adder8 #(.IN_W(14), .OUT_W(17), .STAGES(6)) dut14 (
    .clk, .rst_n, .in_valid(v2_in), .x(x2), .out_valid(v2_out), .sum(s2));

  int exp1 [NCYC], exp2 [NCYC];
  bit vl1 [NCYC], vl2 [NCYC];

  task automatic check(input string name, input bit gv, input bit ev, input int g, input int e);
    checks++;
    if (gv !== ev || (ev && g != e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: valid %0b/%0b sum %0d expected %0d", name, gv, ev, g, e);
    end
  endtask

  initial begin
    v1_in = 0; v2_in = 0;
    foreach (x1[k]) x1[k] = '0;
    foreach (x2[k]) x2[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int mode;
      @(negedge clk);
      if (cyc >= 5) check("Adder12s", v1_out, vl1[cyc-5], int'(s1), exp1[cyc-5]);
      if (cyc >= 6) check("Adder14s", v2_out, vl2[cyc-6], int'(s2), exp2[cyc-6]);
      v1_in = $urandom_range(0, 3) != 0;
      v2_in = $urandom_range(0, 3) != 0;
      mode = $urandom_range(0, 9);
      exp1[cyc] = 0; exp2[cyc] = 0;
      for (int k = 0; k < 8; k++) begin
        x1[k] = (mode == 0) ? 12'sh800 : (mode == 1) ? 12'sh7ff : 12'($urandom);
        x2[k] = (mode == 0) ? 14'sh2000 : (mode == 1) ? 14'sh1fff : 14'($urandom);
        exp1[cyc] += int'(x1[k]);
        exp2[cyc] += int'(x2[k]);
      end
      vl1[cyc] = v1_in; vl2[cyc] = v2_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
