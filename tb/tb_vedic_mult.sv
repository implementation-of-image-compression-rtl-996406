// tb_vedic_mult -- self-checking test of the pipelined Vedic multiplier in
// the three configurations the DCTQ processor uses: 8u x 8s, 11s x 8s and
// 12s x 8s.  Random operands (with the extreme values mixed in) are applied
// every cycle with random valid; each product is compared with the integer
// product of the inputs applied exactly 8 cycles earlier, which checks both
// the value and the 8-cycle latency.
module tb_vedic_mult;
  localparam int LAT = 8;
  localparam int NCYC = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // configuration A: 8u x 8s
  logic        va_in, va_out;
  logic [7:0]  aa, ba;
  logic [15:0] pa;
  // configuration B: 11s x 8s
  logic        vb_in, vb_out;
  logic [10:0] ab;
  logic [7:0]  bb;
  logic [18:0] pb;
  // configuration C: 12s x 8s
  logic        vc_in, vc_out;
  logic [11:0] ac;
  logic [7:0]  bc;
  logic [19:0] pc;

  vedic_mult #(.AW(8),  .BW(8), .A_SIGNED(1'b0), .B_SIGNED(1'b1), .LATENCY(LAT)) dut_a (
    .clk, .rst_n, .in_valid(va_in), .a(aa), .b(ba), .out_valid(va_out), .p(pa));
  vedic_mult #(.AW(11), .BW(8), .A_SIGNED(1'b1), .B_SIGNED(1'b1), .LATENCY(LAT)) dut_b (
    .clk, .rst_n, .in_valid(vb_in), .a(ab), .b(bb), .out_valid(vb_out), .p(pb));
  vedic_mult #(.AW(12), .BW(8), .A_SIGNED(1'b1), .B_SIGNED(1'b1), .LATENCY(LAT)) dut_c (
    .clk, .rst_n, .in_valid(vc_in), .a(ac), .b(bc), .out_valid(vc_out), .p(pc));

  // expected results by cycle
  longint exp_a [NCYC], exp_b [NCYC], exp_c [NCYC];
  bit     vld_a [NCYC], vld_b [NCYC], vld_c [NCYC];

  function automatic logic [31:0] pick(input int w);
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return 32'(1) << (w - 1);            // most negative / top bit
    if (r == 1) return (32'(1) << (w - 1)) - 1;      // most positive
    if (r == 2) return '1;                           // -1 / all ones
    return $urandom;
  endfunction

  task automatic check(input string name, input bit got_v, input bit exp_v,
                       input longint got, input longint exp);
    checks++;
    if (got_v !== exp_v || (exp_v && got != exp)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: valid %0b/%0b value %0d expected %0d", name, got_v, exp_v, got, exp);
    end
  endtask

  initial begin
    va_in = 0; vb_in = 0; vc_in = 0;
    aa = 0; ba = 0; ab = 0; bb = 0; ac = 0; bc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      // check the outputs belonging to the inputs of cycle cyc-LAT
      if (cyc >= LAT) begin
        check("8ux8s",  va_out, vld_a[cyc-LAT], longint'($signed(pa)), exp_a[cyc-LAT]);
        check("11sx8s", vb_out, vld_b[cyc-LAT], longint'($signed(pb)), exp_b[cyc-LAT]);
        check("12sx8s", vc_out, vld_c[cyc-LAT], longint'($signed(pc)), exp_c[cyc-LAT]);
      end
      va_in = ($urandom_range(0, 3) != 0);
      vb_in = ($urandom_range(0, 3) != 0);
      vc_in = ($urandom_range(0, 3) != 0);
      aa = 8'(pick(8));  ba = 8'(pick(8));
      ab = 11'(pick(11)); bb = 8'(pick(8));
      ac = 12'(pick(12)); bc = 8'(pick(8));
      vld_a[cyc] = va_in; exp_a[cyc] = longint'(int'(aa)) * longint'($signed(ba));
      vld_b[cyc] = vb_in; exp_b[cyc] = longint'($signed(ab)) * longint'($signed(bb));
      vld_c[cyc] = vc_in; exp_c[cyc] = longint'($signed(ac)) * longint'($signed(bc));
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
