// asp_rsp - some/none responder (RSP).
//
// The RSP line is a wired NOR over all TAG bits: it reports whether at least
// one CAM line responds. The RSP pin is registered so that it keeps the
// response of the last COMPARE until the next one: on capture (the clock
// edge that executes a COMPARE) rsp takes the OR of resp, the vector that is
// being loaded into TAG by that compare, so RSP is valid in the cycle right
// after the compare. blk_rsp gives, without a register, the response of each
// physical row block of BLK_ROWS words from the current TAG; the read sense
// amplifier resolver uses it to pick the block that drives the output.
// Register reset value 0 is this design's choice.
module asp_rsp
  import asp_pkg::*;
#(
  parameter int unsigned WORDS    = WORDS_DEF,
  parameter int unsigned BLK_ROWS = 342,
  parameter int unsigned NBLK     = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  logic [WORDS-1:0] resp,
  input  logic [WORDS-1:0] tag,
  output logic             rsp,
  output logic [NBLK-1:0]  blk_rsp
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rsp <= 1'b0;
    else if (capture) rsp <= |resp;
  end

  always_comb begin
    blk_rsp = '0;
    for (int j = 0; j < WORDS; j++)
      if (tag[j]) blk_rsp[j / BLK_ROWS] = 1'b1;
  end

endmodule
