// asp_side - the SIDE block: TAG register and shift network, response
// counter, select first circuit and some/none responder.
//
// It receives the execute-stage control of one micro-instruction and the
// match lines of the MATRIX, and decides what every TAG flip-flop loads:
//   select first result (when the FIRSEL sequence finishes) > COMPARE (match
//   lines) > shift (SHUP/SHDN/LGUP/LGDN) > RESETAG > SETAG > hold.
// The order among operations issued in one horizontal micro-instruction is
// this design's choice; the document only lists which groups may be combined.
// The select first and response count circuits see the TAG outputs only
// while fircnten is 1 (the document disconnects them otherwise to save
// power); here their inputs are forced to 0 instead. lin / hin gate the words
// shifted in from the neighbour chip at the low / high end (0 enters when
// low). COUNTAG and FIRSEL are started by one micro-instruction and then run
// on their own for 31 and 23 cycles; busy is high meanwhile.
// Timing: TAG, RSP and the peripheral circuits change on the rising edge of
// clk that executes the micro-instruction.
module asp_side
  import asp_pkg::*;
#(
  parameter int unsigned WORDS    = WORDS_DEF,
  parameter int unsigned B        = FAR_B_DEF,
  parameter int unsigned BLK_ROWS = 342,
  parameter int unsigned NBLK     = 3,
  parameter int unsigned STAGES   = 18,
  parameter int unsigned CELLS    = 19
) (
  input  logic             clk,
  input  logic             rst_n,
  // execute-stage control
  input  g2_op_e           g2,
  input  g3_op_e           g3,
  input  logic             compare,
  input  logic             countag,
  input  logic             firsel,
  input  logic             fircnten,
  input  logic             firstin,
  input  logic             lin,
  input  logic             hin,
  // array and shift network
  input  logic [WORDS-1:0] ml,
  input  logic [B-1:0]     lo_in,
  input  logic [B-1:0]     hi_in,
  output logic [B-1:0]     lo_out,
  output logic [B-1:0]     hi_out,
  output logic [WORDS-1:0] tag,
  // responses
  output logic             rsp,
  output logic [NBLK-1:0]  blk_rsp,
  output logic             ctag,
  output logic             ctag_valid,
  output logic             count_done,
  output logic             firsel_done,
  output logic             busy
);

  logic [WORDS-1:0] periph_in, selfir;
  logic             sf_done, sf_busy, rc_busy, firout_unused;
  tag_src_e         sel;
  logic             setag_eff;

  assign periph_in = tag & {WORDS{fircnten}};

  always_comb begin
    sel       = TAG_HOLD;
    setag_eff = 1'b0;
    if (sf_done)                 sel = TAG_SELFIR;
    else if (compare)            sel = TAG_ML;
    else if (g3 == G3_SHUP)      sel = TAG_NS;
    else if (g3 == G3_SHDN)      sel = TAG_NN;
    else if (g3 == G3_LGUP)      sel = TAG_FS;
    else if (g3 == G3_LGDN)      sel = TAG_FN;
    else if (g2 == G2_RESETAG)   sel = TAG_GND;
    else if (g2 == G2_SETAG)     setag_eff = 1'b1;
  end

  asp_tag_reg #(.WORDS(WORDS), .B(B)) u_tag (
    .clk, .rst_n, .sel, .setag(setag_eff), .ml, .selfir,
    .lo_in(lo_in & {B{lin}}), .hi_in(hi_in & {B{hin}}),
    .tag, .lo_out, .hi_out
  );

  asp_select_first #(.WORDS(WORDS)) u_sf (
    .clk, .rst_n, .start(firsel), .firstin, .tagin(periph_in),
    .selfir, .firout(firout_unused), .busy(sf_busy), .done(sf_done)
  );

  asp_resp_count #(.WORDS(WORDS), .NBLK(NBLK), .STAGES(STAGES), .CELLS(CELLS)) u_rc (
    .clk, .rst_n, .start(countag), .respin(periph_in),
    .ctag, .ctag_valid, .busy(rc_busy), .done(count_done)
  );

  asp_rsp #(.WORDS(WORDS), .BLK_ROWS(BLK_ROWS), .NBLK(NBLK)) u_rsp (
    .clk, .rst_n, .capture(compare), .resp(ml), .tag, .rsp, .blk_rsp
  );

  assign firsel_done = sf_done;
  assign busy        = sf_busy | rc_busy;

endmodule
