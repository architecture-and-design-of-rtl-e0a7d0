// asp100 - the ASP100 associative processor chip.
//
// A 1024-word by 72-bit content-addressable MATRIX does all processing: the
// controller loads a pattern into COMPARAND and MASK (TOP), COMPAREs it
// against every word at once, which loads the TAG register (SIDE) with the
// match of each word, and WRITEs the comparand into the masked columns of
// the tagged words. Sequences of compare/write pairs give word-parallel,
// bit-serial arithmetic. SIDE also shifts TAG to near (1) and far (16) neighbour
// words, across chip boundaries through SHBUS, counts the tagged words
// (COUNTAG, serial result on CTAG), keeps only the first tagged word
// (FIRSEL, chained through FIRSTIN) and reports whether any word responded
// (RSP). BOTTOM reads a tagged word (READ) onto DBUS and SHBUS. Sector 2 of
// the matrix can be split into an image FIFO of 24, 16 or 8 bits (CONFIFO)
// that streams frames in on VIN and out on VOUT while the rest computes,
// with a FENB/FFUL chain between chips.
//
// Interface: ctl is the decoded micro-instruction (one field per group, the
// WE and SETAG pins are its write and g2 fields), DBUS[23:0] its operand and
// DBUS[31] the NOP bit. Bidirectional pins are split into _i, _o and _oe.
// SHBUS[15:0] is the low-word end, SHBUS[31:16] the high-word end: during a
// shift up the low end is input and the high end output, during a shift down
// the reverse; during the third cycle of a READ SHBUS[23:0] and DBUS[23:0]
// carry the read data, driven only by a chip that holds a tagged word. Timing: a micro-instruction on the pins in cycle t
// has group 1 done at the end of t+1 and the rest at the end of t+2; COUNTAG
// and FIRSEL then run 31 and 23 cycles (busy high), READ 3 cycles.
// One clock replaces the document's CLK/DCLK four-phase scheme; rst_n is an
// asynchronous reset of this design's own.
// rst_n is used both as the asynchronous reset of the flip-flops and in the
// 'disable iff' of the assertion below; the lint notice that it is seen as a
// synchronous and an asynchronous signal comes from the assertion only.
module asp100
  import asp_pkg::*;
#(
  parameter int unsigned WORDS    = WORDS_DEF,
  parameter int unsigned B        = FAR_B_DEF,
  parameter int unsigned BLK_ROWS = 342,
  parameter int unsigned NBLK     = 3,
  parameter int unsigned STAGES   = 18,
  parameter int unsigned CELLS    = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uinstr_t           ctl,
  input  logic [31:0]       dbus_i,
  output logic [31:0]       dbus_o,
  output logic              dbus_oe,
  input  logic [SECT_W-1:0] vin,
  output logic [SECT_W-1:0] vout,
  output logic              vout_oe,
  input  logic [31:0]       shbus_i,
  output logic [31:0]       shbus_o,
  output logic [31:0]       shbus_oe,
  output logic              ctag,
  output logic              ctag_valid,
  output logic              rsp,
  input  logic              fenb,
  output logic              ffull,
  input  logic              firstin,
  input  logic              lin,
  input  logic              hin,
  input  logic              fircnten,
  output logic              busy
);

  uinstr_t           uir1, uir2;
  logic [SECT_W-1:0] d1, d2;

  logic [WIDTH-1:0]  mask, comp, bl_mask, fifo_cols;
  logic [2:0]        fifo_cfg;
  logic [WORDS-1:0]  ml, tag, wl, fifo_wl;
  logic [NBLK-1:0][WIDTH-1:0] bl;
  logic [NBLK-1:0]   blk_rsp, tok_blk;
  logic              fifo_ld, fifo_xfer, io_active;
  logic [B-1:0]      lo_out, hi_out;
  logic [WIDTH-1:0]  out_reg;
  logic [SECT_W-1:0] rd_data;
  logic              rd_oe, count_done, firsel_done;

  asp_ctl_pipe u_pipe (.clk, .rst_n, .ctl, .dbus_i, .uir1, .d1, .uir2, .d2);

  asp_top_regs u_top (
    .clk, .rst_n, .g1(uir1.g1), .sector(uir1.sector), .d(d1),
    .cfg_ld(uir2.g5 == G5_CONFIFO), .cfg_d(d2[2:0]),
    .io_active, .fifo_ld, .vin,
    .mask, .comp, .bl_mask, .fifo_cols, .fifo_cfg
  );

  asp_fifo_ctrl #(.WORDS(WORDS), .BLK_ROWS(BLK_ROWS), .NBLK(NBLK)) u_fc (
    .clk, .rst_n, .fenb, .ffull, .fifo_ld, .fifo_xfer, .fifo_wl, .tok_blk,
    .io_active, .vout_oe
  );

  // Write word lines: TAG AND write enable. A SETAG or RESETAG issued with
  // the WRITE acts on the word lines of that same write.
  always_comb begin
    if (uir2.g2 == G2_SETAG)        wl = '1;
    else if (uir2.g2 == G2_RESETAG) wl = '0;
    else                            wl = tag;
  end

  asp_matrix #(.WORDS(WORDS), .BLK_ROWS(BLK_ROWS), .NBLK(NBLK)) u_matrix (
    .clk, .comp, .mask(bl_mask), .ml,
    .wr_en(uir2.write), .wl,
    .rd_wl(tag), .bl,
    .fifo_cols(io_active ? fifo_cols : '0), .fifo_wl, .fifo_wr(fifo_xfer),
    .fifo_wdata(comp)
  );

  logic shift_up, shift_dn;
  assign shift_up = (uir2.g3 == G3_SHUP) || (uir2.g3 == G3_LGUP);
  assign shift_dn = (uir2.g3 == G3_SHDN) || (uir2.g3 == G3_LGDN);

  asp_side #(.WORDS(WORDS), .B(B), .BLK_ROWS(BLK_ROWS), .NBLK(NBLK),
             .STAGES(STAGES), .CELLS(CELLS)) u_side (
    .clk, .rst_n, .g2(uir2.g2), .g3(uir2.g3), .compare(uir2.compare),
    .countag(uir2.g5 == G5_COUNTAG), .firsel(uir2.g5 == G5_FIRSEL),
    .fircnten, .firstin, .lin, .hin, .ml,
    .lo_in(shbus_i[B-1:0]), .hi_in(shbus_i[16 +: B]),
    .lo_out, .hi_out, .tag, .rsp, .blk_rsp, .ctag, .ctag_valid,
    .count_done, .firsel_done, .busy
  );

  asp_bottom #(.NBLK(NBLK)) u_bot (
    .clk, .rst_n, .bl, .blk_rsp, .tok_blk, .fifo_cols, .io_active,
    .read(uir2.g5 == G5_READ), .sector(uir2.sector), .fifo_xfer,
    .out_reg, .rd_data, .rd_oe, .vout
  );

  // A chip drives the shared DBUS (and SHBUS) with READ data only if it held
  // a tagged word when the READ executed: after FIRSEL over a chain of chips
  // exactly one chip drives.
  logic rd_hit1, rd_hit2, rd_drive;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hit1 <= 1'b0;
      rd_hit2 <= 1'b0;
    end else begin
      rd_hit1 <= (uir2.g5 == G5_READ) && (|blk_rsp);
      rd_hit2 <= rd_hit1;
    end
  end
  assign rd_drive = rd_oe && rd_hit2;

  // SHBUS I/O buffers and their multiplexers: shift network or read data
  always_comb begin
    shbus_o  = '0;
    shbus_oe = '0;
    if (rd_drive) begin
      shbus_o[SECT_W-1:0]  = rd_data;
      shbus_oe[SECT_W-1:0] = '1;
    end else if (shift_up) begin
      shbus_o[16 +: B]  = hi_out;
      shbus_oe[16 +: B] = '1;
    end else if (shift_dn) begin
      shbus_o[B-1:0]  = lo_out;
      shbus_oe[B-1:0] = '1;
    end
  end

  assign dbus_o  = {8'h00, rd_data};
  assign dbus_oe = rd_drive;

  // A new multi-cycle operation must not start while one is running.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(uir2.g5 inside {G5_COUNTAG, G5_FIRSEL}));

  initial assert (B <= 16) else $error("asp100: far distance exceeds the 16 SHBUS lines per end");

endmodule
