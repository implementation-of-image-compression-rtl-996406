// dual_ram -- decked ("ping-pong") pixel RAM of the DCTQ processor.
//
// Two banks each hold one 8x8 block of 8-bit pixels.  While the controller
// reads one bank, the image source writes the next block into the other, so
// the arithmetic pipeline never waits for a block to be loaded.  This
// double buffering, byte-wide pixel writes with an address, and 64-bit
// (eight pixel) reads feeding the eight stage-I multipliers follow the
// published architecture; the handshake below is this design's own.
//
// Write side: wr_en/wr_addr/wr_data write one pixel (wr_addr = 8*row + col)
// into the write bank.  A write to address 63 marks the bank full and
// switches writing to the other bank.  wr_ready is low while the write bank
// is still full (both banks hold unread blocks); a write offered then is
// ignored, so the source must hold it until wr_ready returns.
// Read side: blk_avail says the read bank holds a complete block,
// next_avail that the other bank does too.  rd_en/rd_row read one row of
// eight pixels; rd_valid/rd_data follow MEM_LAT = 2 cycles later (address
// register, then data register).  rd_release empties the read bank and
// switches reading to the other bank.
module dual_ram
  import dctq_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // pixel write port
  input  logic             wr_en,
  input  logic [5:0]       wr_addr,
  input  pixel_t           wr_data,
  output logic             wr_ready,
  // row read port
  output logic             blk_avail,
  output logic             next_avail,
  input  logic             rd_en,
  input  idx_t             rd_row,
  input  logic             rd_release,
  output logic             rd_valid,
  output pixel_t [7:0]     rd_data
);
  pixel_t [7:0] mem [2][8];      // [bank][row] -> eight pixels of the row
  logic   [1:0] full;
  logic         wr_bank, rd_bank;
  logic         wr_fire;

  logic         rd_en_q;
  logic         rd_bank_q;
  idx_t         rd_row_q;

  assign wr_ready   = !full[wr_bank];
  assign wr_fire    = wr_en && wr_ready;
  assign blk_avail  = full[rd_bank];
  assign next_avail = full[!rd_bank];

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wr_bank][wr_addr[5:3]][wr_addr[2:0]] <= wr_data;
    rd_bank_q <= rd_bank;
    rd_row_q  <= rd_row;
    if (rd_en_q) rd_data <= mem[rd_bank_q][rd_row_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      wr_bank  <= 1'b0;
      rd_bank  <= 1'b0;
      rd_en_q  <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      rd_en_q  <= rd_en;
      rd_valid <= rd_en_q;
      if (wr_fire && wr_addr == 6'd63) begin
        full[wr_bank] <= 1'b1;
        wr_bank       <= !wr_bank;
      end
      if (rd_release) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= !rd_bank;
      end
    end
  end

  // a bank is released only after it was filled
  property p_release_full;
    @(posedge clk) disable iff (!rst_n) rd_release |-> blk_avail;
  endproperty
  a_release_full: assert property (p_release_full);

endmodule
