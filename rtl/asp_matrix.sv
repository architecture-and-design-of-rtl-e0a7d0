// asp_matrix - the ASP100 MATRIX: a WORDS x 72 content-addressable array
// that holds both the processing ARRAY and the image FIFO.
//
// Every bit is an associative processing element (APE) with three parts, as
// in the document: a static storage bit, a write device that writes the bit
// line value only when both the column MASK line and the row word line are
// high, and a match device that compares the stored bit with the bit lines.
// Here the three parts are written per bit in plain logic:
//   * compare: ml[j] is 1 when every column with mask=1 holds comp in word j
//     (a masked column never discharges the match line). ml is combinational;
//     the match line sense amplifier that turns the dynamic match line into a
//     logic level is folded into this function.
//   * write: on a clock edge with wr_en, word j, column i takes comp[i] when
//     wl[j] (TAG, gated by the write enable) and mask[i] are both 1.
//   * FIFO word port: the FIFO address generator raises exactly one word
//     line; on fifo_wr the FIFO columns (fifo_cols) of that word take
//     fifo_wdata. The columns outside fifo_cols are untouched, which models
//     the bi-directional switch column that cuts the FIFO word lines off the
//     ARRAY during image I/O. The FIFO port takes priority on its columns.
//   * read: the array is physically three row blocks of BLK_ROWS words, each
//     with its own bit lines. bl[b][i] is the precharged bit line of column i
//     in block b: it stays 1 unless some selected word of block b holds 0
//     there. Columns in fifo_cols are selected by the FIFO word line, the
//     others by rd_wl (the TAG). A block with no selected word reads all ones.
// Timing: compare and read are combinational from the stored contents; both
// writes happen at the rising clock edge. The contents have no reset, as in
// a CAM: software initialises them.
// The sizes and the cell function follow the document; reading several
// tagged words as the AND of their bits is this model's choice (the document
// reads one responder at a time).
module asp_matrix
  import asp_pkg::*;
#(
  parameter int unsigned WORDS    = WORDS_DEF,
  parameter int unsigned BLK_ROWS = 342,
  parameter int unsigned NBLK     = 3
) (
  input  logic                  clk,
  // compare / write (ARRAY side)
  input  logic [WIDTH-1:0]      comp,
  input  logic [WIDTH-1:0]      mask,
  output logic [WORDS-1:0]      ml,
  input  logic                  wr_en,
  input  logic [WORDS-1:0]      wl,
  // read word lines (ARRAY side)
  input  logic [WORDS-1:0]      rd_wl,
  output logic [NBLK-1:0][WIDTH-1:0] bl,
  // FIFO side
  input  logic [WIDTH-1:0]      fifo_cols,
  input  logic [WORDS-1:0]      fifo_wl,
  input  logic                  fifo_wr,
  input  logic [WIDTH-1:0]      fifo_wdata
);

  logic [WIDTH-1:0] mem [WORDS];

  // Match devices and match line per word
  always_comb begin
    for (int j = 0; j < WORDS; j++)
      ml[j] = ~|((mem[j] ^ comp) & mask);
  end

  // Write devices
  always_ff @(posedge clk) begin
    for (int j = 0; j < WORDS; j++) begin
      logic [WIDTH-1:0] fsel, asel;
      fsel = (fifo_wr && fifo_wl[j]) ? fifo_cols : '0;
      asel = (wr_en && wl[j]) ? (mask & ~fsel) : '0;
      if (|(fsel | asel))
        mem[j] <= (mem[j] & ~(fsel | asel)) | (comp & asel) | (fifo_wdata & fsel);
    end
  end

  initial assert (NBLK * BLK_ROWS >= WORDS)
    else $error("asp_matrix: NBLK*BLK_ROWS must cover WORDS");

  // Bit lines of the three physical blocks
  always_comb begin
    for (int b = 0; b < NBLK; b++) bl[b] = '1;
    for (int j = 0; j < WORDS; j++) begin
      logic [WIDTH-1:0] act;
      act = ({WIDTH{rd_wl[j]}} & ~fifo_cols) | ({WIDTH{fifo_wl[j]}} & fifo_cols);
      bl[j / BLK_ROWS] = bl[j / BLK_ROWS] & (mem[j] | ~act);
    end
  end

endmodule
