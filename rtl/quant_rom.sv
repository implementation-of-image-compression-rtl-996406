// quant_rom -- program ROM of inverse quantisation values.
//
// Quantisation divides each DCT coefficient by a table entry Q[u][v].  As
// in the published architecture the division is replaced by multiplying
// with a stored inverse; here IQ[u][v] = round(1024 / Q[u][v]) as a signed
// 8-bit number, and the quantiser shifts its product right by 10.  The
// table Q is the usual JPEG luminance table, since no values are published
// with the architecture.  Read latency MEM_LAT = 2 cycles.
module quant_rom
  import dctq_pkg::*;
(
  input  logic clk,
  input  idx_t u,
  input  idx_t v,
  output iq_t  iq
);
  iq_t rom [64];

  always_comb
    for (int k = 0; k < 64; k++) rom[k] = quant_iq(k / 8, k % 8);

  logic [5:0] addr_q;

  always_ff @(posedge clk) begin
    addr_q <= {u, v};
    iq     <= rom[addr_q];
  end

endmodule
