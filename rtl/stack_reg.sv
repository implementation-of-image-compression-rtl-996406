// stack_reg -- the "stack" between the stage-III multiplier and Adder14s.
//
// The stage-III multiplier delivers one product per cycle; the eight
// products C[u][i] * S_i (i = 0..7) of one DCT coefficient must be added
// together.  The stack holds them until the eighth arrives and then hands
// all eight to the adder at once.  Following the published architecture the
// stack adds eight cycles: the burst appears DEPTH cycles after the first
// product of a group went in (one cycle after the last one).
//
// How it works: a position counter writes each valid input into the next
// slot; when the last slot is written, all slots plus the new value are
// copied to the output registers and out_valid is raised for one cycle.
// Groups are assumed to arrive as DEPTH valid inputs; the counter restarts at
// reset.  Gaps between products of a group are allowed.
module stack_reg #(
  parameter int unsigned W     = 14,
  parameter int unsigned DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout [DEPTH]
);
  localparam int unsigned CNT_W = $clog2(DEPTH);

  logic signed [W-1:0] slot [DEPTH];
  logic [CNT_W-1:0]    pos;
  logic                last;

  assign last = (pos == CNT_W'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      slot[pos] <= din;
      if (last) begin
        for (int k = 0; k < DEPTH - 1; k++) dout[k] <= slot[k];
        dout[DEPTH-1] <= din;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) pos <= last ? '0 : pos + 1'b1;
    end
  end

endmodule
