// asp_fifo_ctrl - FIFO controller and address generator for IMAGE I/O mode.
//
// While FENB is high the FIFO streams one frame of WORDS pixels: every cycle
// the pixel on VIN enters the FIFO input register (fifo_ld); in the next
// cycle the word selected by the address generator is read into the FIFO
// output register and the buffered pixel is written into the same word
// (fifo_xfer with fifo_wl), so an old image leaves on VOUT while the new one
// comes in. The address generator is a shift register holding one token
// that starts at word 0 and moves one word per transfer (sequential
// addressing). After the WORDS-th pixel is taken ffull rises; it stays high
// until FENB falls, which also returns the token to word 0. In a chain the
// FFUL of one chip is the FENB of the next, so the next chip takes the very
// next VIN pixel. vout_oe is high in each cycle in which VOUT carries a word
// (the cycle after its transfer). io_active is high while FENB is high or a
// transfer is pending: the FIFO columns are then cut off from the array.
// tok_blk tells the read resolver which physical row block holds the token.
// The one-transfer-per-cycle rate is this design's choice; the document says
// only that the read-then-write loop runs 1024 times.
// rst_n is used both as the asynchronous reset of the flip-flops and in the
// 'disable iff' of the assertion below; the lint notice that it is seen as a
// synchronous and an asynchronous signal comes from the assertion only.
module asp_fifo_ctrl
  import asp_pkg::*;
#(
  parameter int unsigned WORDS    = WORDS_DEF,
  parameter int unsigned BLK_ROWS = 342,
  parameter int unsigned NBLK     = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fenb,
  output logic             ffull,
  output logic             fifo_ld,
  output logic             fifo_xfer,
  output logic [WORDS-1:0] fifo_wl,
  output logic [NBLK-1:0]  tok_blk,
  output logic             io_active,
  output logic             vout_oe
);

  localparam int unsigned CW = $clog2(WORDS + 1);

  logic [CW-1:0]    cnt;
  logic [WORDS-1:0] tok;
  logic             pend;

  assign fifo_ld   = fenb && !ffull;
  assign fifo_xfer = pend;
  assign fifo_wl   = pend ? tok : '0;
  assign io_active = fenb || pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; tok <= WORDS'(1); pend <= 1'b0; ffull <= 1'b0; vout_oe <= 1'b0;
    end else begin
      pend    <= fifo_ld;
      vout_oe <= pend;
      if (pend) tok <= {tok[WORDS-2:0], tok[WORDS-1]};
      if (fifo_ld) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(WORDS - 1)) ffull <= 1'b1;
      end
      if (!fenb && !pend) begin
        cnt   <= '0;
        ffull <= 1'b0;
        tok   <= WORDS'(1);
      end
    end
  end

  always_comb begin
    tok_blk = '0;
    for (int j = 0; j < WORDS; j++)
      if (tok[j]) tok_blk[j / BLK_ROWS] = 1'b1;
  end

  // The address token is always a single word
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tok));

endmodule
