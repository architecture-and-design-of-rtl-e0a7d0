// asp_bottom - the BOTTOM block: read sense amplifier resolver, the 72-bit
// Output Register, the sector multiplexer that puts a READ result on the
// 24-bit read bus, and the FIFO output section that drives VOUT.
//
// The MATRIX is built as three physical row blocks, each with its own read
// sense amplifiers, so every column has three candidate outputs (bl). The
// resolver picks, per column:
//   * ARRAY columns on READ: the block whose response (blk_rsp) is 1, the
//     lowest such block if several are;
//   * FIFO columns on a FIFO transfer: the block that holds the address token.
// READ takes three cycles: in its execute cycle the Output Register loads the
// resolved ARRAY columns; in the next cycle sector s of it is registered onto
// rd_data (Output Register bits [15:0] to bus bits [15:0], [23:16] to
// [23:16]); in the third cycle rd_oe is high and rd_data is on the pins.
// On a FIFO transfer the FIFO section of the Output Register loads the
// addressed word; VOUT shows that section (FIFO granules only, the other
// bits 0). While image I/O is active a READ leaves the FIFO section alone.
// Reset values are this design's choice.
module asp_bottom
  import asp_pkg::*;
#(
  parameter int unsigned NBLK = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NBLK-1:0][WIDTH-1:0] bl,
  input  logic [NBLK-1:0]           blk_rsp,
  input  logic [NBLK-1:0]           tok_blk,
  input  logic [WIDTH-1:0]          fifo_cols,
  input  logic                      io_active,
  input  logic                      read,
  input  logic [1:0]                sector,
  input  logic                      fifo_xfer,
  output logic [WIDTH-1:0]          out_reg,
  output logic [SECT_W-1:0]         rd_data,
  output logic                      rd_oe,
  output logic [SECT_W-1:0]         vout
);

  logic [WIDTH-1:0] arr_sel, fifo_sel, ld;
  logic [1:0]       rd_sec;
  logic             rd_p1;

  always_comb begin
    arr_sel  = '1;
    fifo_sel = '1;
    for (int b = NBLK - 1; b >= 0; b--) begin
      if (blk_rsp[b]) arr_sel  = bl[b];
      if (tok_blk[b]) fifo_sel = bl[b];
    end
  end

  always_comb begin
    ld = '0;
    if (read)      ld = io_active ? ~fifo_cols : '1;
    if (fifo_xfer) ld = ld & ~fifo_cols;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_reg <= '0; rd_data <= '0; rd_oe <= 1'b0; rd_sec <= '0; rd_p1 <= 1'b0;
    end else begin
      out_reg <= (out_reg & ~ld) | (arr_sel & ld);
      if (fifo_xfer) out_reg <= (out_reg & ~ld & ~fifo_cols) | (arr_sel & ld) | (fifo_sel & fifo_cols);
      rd_p1  <= read;
      rd_sec <= sector;
      if (rd_p1) begin
        rd_data[15:0]  <= out_reg[int'(rd_sec)*SECT_W +: 16];
        rd_data[23:16] <= out_reg[int'(rd_sec)*SECT_W + 16 +: 8];
      end
      rd_oe <= rd_p1;
    end
  end

  assign vout = out_reg[FIFO_BASE +: SECT_W] & fifo_cols[FIFO_BASE +: SECT_W];

endmodule
