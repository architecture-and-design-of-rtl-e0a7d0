// asp_system - a chain of ASP100 chips working as one long associative array.
//
// NCHIPS chips share the control bus (micro-instruction and DBUS operand),
// VIN, VOUT and DBUS. Chip k+1 continues the word column of chip k: word 0
// of chip k+1 follows word 1023 of chip k. The connections follow the
// system interconnection rules:
//   * SHBUS[15:0] of chip k+1 meets SHBUS[31:16] of chip k, in both
//     directions, so near and far shifts run across chip boundaries.
//   * FENB of chip k+1 is FFUL of chip k, so a frame of NCHIPS x 1024 pixels
//     fills the chips one after another.
//   * FIRSTIN of chip k is the OR of the RSP outputs of chips 0..k-1 (and of
//     the chain's own FIRSTIN input), so FIRSEL keeps one word in the whole
//     system.
//   * The system RSP is the OR of all RSP outputs.
//   * The CTAG outputs are brought out side by side for the system's
//     parallel summation unit, which lies outside this module.
// VOUT and DBUS are shared buses: each is modelled as the OR of the
// outputs of the chips that drive it. Assertions check that at most one
// chip drives each. LIN of chip 0 and HIN of the last chip enable the chain
// ends; the inner chip boundaries are always enabled. The chain-end SHBUS
// halves are brought out as shbus_lo_* (chip 0's SHBUS[15:0]) and
// shbus_hi_* (the last chip's SHBUS[31:16]).
// The assertions are disabled during reset, when the chips' registers are not
// yet defined.
// Timing is that of one chip. The system RSP reaches FIRSTIN of the chips
// above without a register.
// What follows the interconnection rules: the bus sharing, the SHBUS,
// FENB/FFUL and CTAG connections, and NCHIPS = 8, one of the two board
// sizes named. This design's own choices: FIRSTIN as the OR of all lower
// RSP outputs (the rule list connects only the preceding chip's RSP), and
// the LIN/HIN tie-offs at the inner boundaries.
module asp_system
  import asp_pkg::*;
#(
  parameter int unsigned NCHIPS = 8,
  parameter int unsigned WORDS  = WORDS_DEF
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
  input  logic              fenb,
  output logic              ffull,
  input  logic              firstin,
  input  logic              lin,
  input  logic              hin,
  input  logic              fircnten,
  output logic [NCHIPS-1:0] ctag,
  output logic              ctag_valid,
  output logic              rsp,
  output logic              busy,
  input  logic [15:0]       shbus_lo_i,
  output logic [15:0]       shbus_lo_o,
  output logic [15:0]       shbus_lo_oe,
  input  logic [15:0]       shbus_hi_i,
  output logic [15:0]       shbus_hi_o,
  output logic [15:0]       shbus_hi_oe
);

  logic [NCHIPS-1:0][31:0]       sh_i, sh_o, sh_oe, db_o;
  logic [NCHIPS-1:0][SECT_W-1:0] vo;
  logic [NCHIPS-1:0]             db_oe, vo_oe, c_ffull, c_rsp, c_fenb, c_first,
                                 c_lin, c_hin, c_cval, c_busy;

  for (genvar k = 0; k < NCHIPS; k++) begin : g_chip
    // chain wiring between neighbours
    if (k == 0) begin : g_lo_end
      assign sh_i[k][15:0] = shbus_lo_i;
      assign c_fenb[k]     = fenb;
      assign c_first[k]    = firstin;
      assign c_lin[k]      = lin;
    end else begin : g_lo_link
      assign sh_i[k][15:0] = sh_o[k-1][31:16];
      assign c_fenb[k]     = c_ffull[k-1];
      assign c_first[k]    = firstin || (|c_rsp[k-1:0]);
      assign c_lin[k]      = 1'b1;
    end
    if (k == NCHIPS - 1) begin : g_hi_end
      assign sh_i[k][31:16] = shbus_hi_i;
      assign c_hin[k]       = hin;
    end else begin : g_hi_link
      assign sh_i[k][31:16] = sh_o[k+1][15:0];
      assign c_hin[k]       = 1'b1;
    end

    asp100 #(.WORDS(WORDS)) u_chip (
      .clk, .rst_n, .ctl, .dbus_i,
      .dbus_o(db_o[k]), .dbus_oe(db_oe[k]),
      .vin, .vout(vo[k]), .vout_oe(vo_oe[k]),
      .shbus_i(sh_i[k]), .shbus_o(sh_o[k]), .shbus_oe(sh_oe[k]),
      .ctag(ctag[k]), .ctag_valid(c_cval[k]), .rsp(c_rsp[k]),
      .fenb(c_fenb[k]), .ffull(c_ffull[k]), .firstin(c_first[k]),
      .lin(c_lin[k]), .hin(c_hin[k]), .fircnten, .busy(c_busy[k])
    );
  end

  // shared buses: the OR of the driving chips
  always_comb begin
    dbus_o = '0;
    vout   = '0;
    for (int k = 0; k < NCHIPS; k++) begin
      if (db_oe[k]) dbus_o = dbus_o | db_o[k];
      if (vo_oe[k]) vout   = vout | vo[k];
    end
  end
  assign dbus_oe = |db_oe;
  assign vout_oe = |vo_oe;

  assign ffull       = c_ffull[NCHIPS-1];
  assign rsp         = |c_rsp;
  assign ctag_valid  = c_cval[0];
  assign busy        = c_busy[0];
  assign shbus_lo_o  = sh_o[0][15:0];
  assign shbus_lo_oe = sh_oe[0][15:0];
  assign shbus_hi_o  = sh_o[NCHIPS-1][31:16];
  assign shbus_hi_oe = sh_oe[NCHIPS-1][31:16];

  a_one_dbus_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(db_oe));
  a_one_vout_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(vo_oe));

endmodule
