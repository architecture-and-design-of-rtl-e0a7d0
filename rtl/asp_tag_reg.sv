// asp_tag_reg - the TAG register of the SIDE block with its shift network.
//
// One TAG cell per CAM line: a flip-flop fed by an 8:1 multiplexer whose
// inputs are, as in the document, far north, near north, far south, near
// south, the match line, the cell's own output (hold), ground (reset) and the
// select first output. Near connections link word j to j-1 and j+1, far
// connections to j-B and j+B (B = 16). Word 0 is the south (low) end and
// word WORDS-1 the north (high) end; what moves past an end leaves the chip:
//   lo_in[k]  = virtual word k-B   (the neighbour chip's word WORDS-B+k)
//   hi_in[k]  = virtual word WORDS+k (the next chip's word k)
//   lo_out    = tag[B-1:0],  hi_out = tag[WORDS-1 -: B]
// so the hi_out of one chip feeds the lo_in of the next and vice versa.
// Near shifts into word 0 use lo_in[B-1]; into word WORDS-1 use hi_in[0].
// setag forces every cell to 1; it overrides any select (the silicon uses
// the flip-flop's asynchronous set in a clock phase of its own, here it is a
// synchronous set). Everything updates at the rising edge of clk; rst_n is
// an asynchronous clear of this design's own (the pin list shows no reset).
module asp_tag_reg
  import asp_pkg::*;
#(
  parameter int unsigned WORDS = WORDS_DEF,
  parameter int unsigned B     = FAR_B_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tag_src_e         sel,
  input  logic             setag,
  input  logic [WORDS-1:0] ml,
  input  logic [WORDS-1:0] selfir,
  input  logic [B-1:0]     lo_in,
  input  logic [B-1:0]     hi_in,
  output logic [WORDS-1:0] tag,
  output logic [B-1:0]     lo_out,
  output logic [B-1:0]     hi_out
);

  // Tag vector extended by the off-chip neighbours on both ends:
  // ext[B + j] is word j, for j in -B .. WORDS+B-1.
  logic [WORDS+2*B-1:0] ext;
  assign ext = {hi_in, tag, lo_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag <= '0;
    end else if (setag) begin
      tag <= '1;
    end else begin
      unique case (sel)
        TAG_HOLD:   tag <= tag;
        TAG_GND:    tag <= '0;
        TAG_ML:     tag <= ml;
        TAG_NN:     tag <= ext[B+1 +: WORDS];
        TAG_NS:     tag <= ext[B-1 +: WORDS];
        TAG_FN:     tag <= ext[2*B +: WORDS];
        TAG_FS:     tag <= ext[0 +: WORDS];
        TAG_SELFIR: tag <= selfir;
        default:    tag <= tag;
      endcase
    end
  end

  assign lo_out = tag[B-1:0];
  assign hi_out = tag[WORDS-1 -: B];

endmodule
