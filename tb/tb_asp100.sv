// tb_asp100 - end-to-end run of the full-size ASP100 chip (1024 words, no
// parameter override).
//
// A frame of pixels {b, a} enters through VIN in IMAGE I/O mode (FENB/FFUL).
// IMAGE IN copies the FIFO bit slices into fields A (sector 0) and B
// (sector 1) with the three-instruction compare/write loop. Bit-serial
// associative addition B = A + B follows, four compare/write pairs per bit in
// the order of the addition table, with a carry column. IMAGE OUT copies the
// sum and the carry back into the FIFO, the FIFO is reconfigured to 16 bits
// (CONFIFO) and a second frame streams the results out on VOUT while the
// array computes a histogram of A (COMPARE + COUNTAG, checking RSP too), far
// and near shifts across the chip ends (SHBUS, LIN/HIN), FIRSEL with FIRSTIN
// and FIRCNTEN, and READ of the first responder. Every result is compared
// with values computed here from the pixel data, and the COUNTAG, FIRSEL and
// READ cycle counts with the instruction set's 31, 23 and 3 cycles. A READ
// on a chip with no tagged word must leave DBUS and SHBUS undriven.
module tb_asp100;
  import asp_pkg::*;
  localparam int unsigned W = WORDS_DEF;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  uinstr_t ctl;
  logic [31:0] dbus_i, dbus_o, shbus_i, shbus_o, shbus_oe;
  logic dbus_oe, vout_oe, ctag, ctag_valid, rsp, fenb, ffull, firstin, lin, hin, fircnten, busy;
  logic [23:0] vin, vout;

  asp100 dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] a [W], b [W], s [W];
  logic       co [W];
  logic [W-1:0] rtag;   // reference TAG
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int m_frame, m_ffull, m_xfer_bits, m_add_pairs, m_hist, m_rsp1, m_rsp0, m_shup, m_shdn,
      m_lgup, m_lgdn, m_firsel, m_firstin, m_read, m_read_idle, m_confifo, m_nopbit, m_fircnt_off, m_setag;

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---- micro-instruction issue ----
  task automatic issue(input uinstr_t u, input logic [23:0] d = '0);
    @(negedge clk); ctl = u; dbus_i = {8'h00, d};
  endtask
  task automatic nop(input int n = 1);
    repeat (n) begin @(negedge clk); ctl = UNOP; dbus_i = '0; end
  endtask
  function automatic uinstr_t g1(input g1_op_e op, input int sct);
    uinstr_t u = UNOP; u.g1 = op; u.sector = 2'(sct); return u;
  endfunction
  // drain: let the last micro-instruction reach execute and settle
  task automatic drain(); nop(3); endtask

  // set mask and comparand of all three sectors
  task automatic set_mc(input logic [71:0] m, input logic [71:0] c);
    for (int k = 0; k < 3; k++) begin
      issue(g1(G1_LM, k), m[k*24 +: 24]);
      issue(g1(G1_LC, k), c[k*24 +: 24]);
    end
  endtask

  // IMAGE IN / OUT bit slice copy, the three-cycle loop of the document
  task automatic copy_slice(input int ss, input int sb, input int ds, input int db);
    uinstr_t u;
    u = g1(G1_LMCCXX, ds); u.g2 = G2_SETAG; u.write = 1; issue(u, 24'(1) << db);
    u = g1(G1_LMC, ss); u.compare = 1;                 issue(u, 24'(1) << sb);
    u = g1(G1_LMC, ds); u.write = 1;                   issue(u, 24'(1) << db);
    m_xfer_bits++;
  endtask

  // COUNTAG: returns the serial count and checks the 31-cycle length
  task automatic countag(output int n);
    uinstr_t u;
    int nb, first, last, c0;
    u = UNOP; u.g5 = G5_COUNTAG; issue(u);
    c0 = cyc;
    nop();
    n = 0; nb = 0; first = -1; last = -1;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      if (ctag_valid) begin n |= int'(ctag) << nb; nb++; last = cyc - c0; if (first < 0) first = last; end
    end
    // issue at cycle 0, execute (count cycle 0) at cycle 2, last bit in count cycle 30
    check(nb == $clog2(W + 1) && last - 2 + 1 <= COUNTAG_CYCLES, $sformatf("COUNTAG length, bits %0d last %0d", nb, last));
  endtask

  // ---- FIFO frame: push pixels, collect VOUT ----
  task automatic frame(input logic [23:0] px [W], output logic [23:0] out [W], output int nout);
    int k, full_seen;
    nout = 0; k = 0; full_seen = 0;
    @(negedge clk); fenb = 1; vin = px[0];
    while (nout < W) begin
      @(posedge clk); #1;
      if (vout_oe) begin out[nout] = vout; nout++; end
      if (ffull) full_seen = 1;
      @(negedge clk);
      k++; vin = (k < W) ? px[k] : 24'h0;
    end
    check(full_seen == 1 && ffull, "FFUL after a frame");
    m_frame++; if (full_seen) m_ffull++;
    @(negedge clk); fenb = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [23:0] px [W], out [W];
    int nout, n;
    uinstr_t u;
    rst_n = 0; ctl = UNOP; dbus_i = '0; shbus_i = '0; vin = '0; fenb = 0;
    firstin = 0; lin = 1; hin = 1; fircnten = 1;
    {m_frame, m_ffull, m_xfer_bits, m_add_pairs, m_hist, m_rsp1, m_rsp0, m_shup, m_shdn,
     m_lgup, m_lgdn, m_firsel, m_firstin, m_read, m_read_idle, m_confifo, m_nopbit, m_fircnt_off, m_setag} = '0;
    for (int j = 0; j < W; j++) begin
      a[j] = 8'($urandom_range(0, 15) * 13);   // few distinct levels
      b[j] = 8'($urandom());
      {co[j], s[j]} = 9'(a[j]) + 9'(b[j]);
      px[j] = {8'h00, b[j], a[j]};
    end
    #23 rst_n = 1;

    // ---- frame 1: image in (24-bit FIFO, the reset configuration) ----
    frame(px, out, nout);
    check(nout == W, "frame 1 VOUT words");

    // ---- IMAGE IN: FIFO sector 2 bits 0..7 -> A (s0 0..7), 8..15 -> B (s1 0..7)
    for (int i = 0; i < 8; i++) copy_slice(2, i, 0, i);
    for (int i = 0; i < 8; i++) copy_slice(2, 8 + i, 1, i);
    // a NOP-bit cycle: this write must not happen
    u = g1(G1_LMCCXX, 0); u.g2 = G2_SETAG; u.write = 1;
    @(negedge clk); ctl = u; dbus_i = 32'h8000_00FF; m_nopbit++;
    drain();

    // ---- carry column (s0 bit 23) := 0 ----
    set_mc(72'h00_0000_000000_800000, 72'h0);
    u = UNOP; u.g2 = G2_SETAG; u.write = 1; issue(u); m_setag++;
    drain();

    // ---- B = A + B, bit serial, four compare/write pairs per bit ----
    for (int i = 0; i < 8; i++) begin
      // (A, C, B) -> (C', S) in the order of the addition table
      logic [2:0] pat [4] = '{3'b010, 3'b011, 3'b101, 3'b100};
      logic [1:0] res [4] = '{2'b01, 2'b10, 2'b10, 2'b01};
      for (int p = 0; p < 4; p++) begin
        logic [71:0] m, c;
        m = '0; c = '0;
        m[i] = 1; m[23] = 1; m[24 + i] = 1;
        c[i] = pat[p][2]; c[23] = pat[p][1]; c[24 + i] = pat[p][0];
        set_mc(m, c);
        u = UNOP; u.compare = 1; issue(u);
        m = '0; c = '0;
        m[23] = 1; m[24 + i] = 1;
        c[23] = res[p][1]; c[24 + i] = res[p][0];
        set_mc(m, c);
        u = UNOP; u.write = 1; issue(u);
        m_add_pairs++;
      end
    end
    drain();

    // ---- IMAGE OUT: sum (s1 0..7) -> FIFO bits 0..7, carry (s0 23) -> FIFO bit 8
    for (int i = 0; i < 8; i++) copy_slice(1, i, 2, i);
    copy_slice(0, 23, 2, 8);
    // clear FIFO bits 9..15 so the 16-bit output is fully known
    for (int i = 9; i < 16; i++) begin
      u = g1(G1_LMCCXX, 2); u.g2 = G2_SETAG; u.write = 1; issue(u, 24'(1) << i);
    end
    // ---- CONFIFO: 16-bit FIFO for the second frame ----
    u = UNOP; u.g5 = G5_CONFIFO; issue(u, 24'b011); m_confifo++;
    drain();

    // ---- frame 2 in parallel with processing on the ARRAY ----
    fork
      begin
        logic [23:0] px2 [W];
        for (int j = 0; j < W; j++) px2[j] = 24'($urandom());
        frame(px2, out, nout);
      end
      begin
        // histogram of A over some levels, checking RSP
        for (int g = 0; g < 16; g += 3) begin
          int e;
          logic [7:0] lv;
          lv = 8'(g * 13);
          e = 0; for (int j = 0; j < W; j++) if (a[j] == lv) e++;
          set_mc(72'h0000FF, {64'h0, lv});
          u = UNOP; u.compare = 1; issue(u);
          nop(3);
          check(rsp == (e > 0), $sformatf("RSP for level %0d", lv));
          if (rsp) m_rsp1++; else m_rsp0++;
          countag(n);
          check(n == e, $sformatf("histogram level %0d: %0d exp %0d", lv, n, e));
          m_hist++;
        end
        // a compare no word can match
        set_mc(72'h0000FF, 72'h0000F1);
        u = UNOP; u.compare = 1; issue(u); nop(3);
        check(rsp == 0, "RSP with no responder"); m_rsp0++;
      end
    join
    for (int j = 0; j < W; j++)
      check(out[j] == {8'h00, 7'h00, co[j], s[j]}, $sformatf("VOUT word %0d = %h exp %h", j, out[j], {co[j], s[j]}));

    // ---- shifts: TAG := A bit 0, then LGUP / SHUP / SHDN / LGDN with SHBUS ----
    set_mc(72'h000001, 72'h000001);
    u = UNOP; u.compare = 1; issue(u);
    for (int j = 0; j < W; j++) rtag[j] = a[j][0];
    drain();
    begin
      logic [15:0] pin;
      pin = 16'($urandom());
      shbus_i = {16'h0, pin}; lin = 1;
      u = UNOP; u.g3 = G3_LGUP; issue(u); nop(2);
      #1 check(shbus_oe[31:16] == 16'hFFFF && shbus_o[31:16] == rtag[W-1 -: 16], "SHBUS high end drives on shift up");
      @(posedge clk);
      rtag = {rtag[W-17:0], pin}; m_lgup++;
      nop(1);
      countag(n); check(n == $countones(rtag), "count after LGUP");
      lin = 1; shbus_i = 32'h1;   // one word enters at the low end: lo_in[15] is 0 here
      shbus_i[15] = 1;
      u = UNOP; u.g3 = G3_SHUP; issue(u); nop(3);
      rtag = {rtag[W-2:0], 1'b1}; m_shup++;
      countag(n); check(n == $countones(rtag), "count after SHUP");
      hin = 0; shbus_i = 32'hFFFF_0000;   // HIN low: zeros enter at the high end
      u = UNOP; u.g3 = G3_SHDN; issue(u); nop(2);
      #1 check(shbus_oe[15:0] == 16'hFFFF && shbus_o[15:0] == rtag[15:0], "SHBUS low end drives on shift down");
      @(posedge clk); nop(1);
      rtag = {1'b0, rtag[W-1:1]}; m_shdn++;
      countag(n); check(n == $countones(rtag), "count after SHDN with HIN low");
      hin = 1;
      u = UNOP; u.g3 = G3_LGDN; issue(u); nop(3);
      rtag = {16'hFFFF, rtag[W-1:16]}; m_lgdn++;
      countag(n); check(n == $countones(rtag), "count after LGDN");
      shbus_i = '0;
    end

    // ---- FIRSEL + READ of the first word with a chosen A ----
    for (int t = 0; t < 4; t++) begin
      int k, jf, c0, c1;
      logic [71:0] m;
      k = $urandom_range(W - 1);
      jf = -1; for (int j = 0; j < W; j++) if (a[j] == a[k] && jf < 0) jf = j;
      set_mc(72'h0000FF, {64'h0, a[k]});
      u = UNOP; u.compare = 1; issue(u);
      firstin = (t == 3);
      u = UNOP; u.g5 = G5_FIRSEL; issue(u); c0 = cyc;
      nop(1);
      for (int w = 0; w < 40 && !dut.firsel_done; w++) @(negedge clk);
      c1 = cyc;
      check(c1 - c0 - 2 + 1 == FIRSEL_CYCLES, $sformatf("FIRSEL length %0d", c1 - c0 - 1));
      nop(1); firstin = 0;
      m_firsel++; if (t == 3) m_firstin++;
      countag(n);
      check(n == ((t == 3) ? 0 : 1), "one responder after FIRSEL");
      if (t < 3) begin
        u = UNOP; u.g5 = G5_READ; u.sector = 2'd1; issue(u); c0 = cyc;
        nop(1);
        for (int w = 0; w < 10 && !dbus_oe; w++) @(negedge clk);
        check(cyc - c0 - 2 + 1 == READ_CYCLES, $sformatf("READ length %0d", cyc - c0 - 1));
        check(dbus_o[7:0] == s[jf] && shbus_o[7:0] == s[jf] && shbus_oe[23:0] == 24'hFFFFFF,
              $sformatf("READ word %0d sum %h exp %h", jf, dbus_o[7:0], s[jf]));
        m_read++;
        nop(2);
      end else begin
        // no tagged word left on this chip: READ must leave DBUS undriven
        int drv;
        u = UNOP; u.g5 = G5_READ; u.sector = 2'd1; issue(u);
        drv = 0;
        repeat (6) begin @(negedge clk); ctl = UNOP; if (dbus_oe || |shbus_oe) drv++; end
        check(drv == 0, "READ without a responder drives no bus");
        m_read_idle++;
      end
    end

    // ---- FIRCNTEN low: the counter does not see TAG ----
    u = UNOP; u.g2 = G2_SETAG; issue(u); drain();
    fircnten = 0; countag(n); fircnten = 1; m_fircnt_off++;
    check(n == 0, "COUNTAG with FIRCNTEN low");
    countag(n); check(n == W, "COUNTAG after SETAG");

    // ---- every mechanism happened ----
    check(m_frame == 2 && m_ffull == 2, "two frames with FFUL");
    check(m_xfer_bits > 0, "image exchange");
    check(m_add_pairs == 32, "associative addition");
    check(m_hist > 0 && m_rsp1 > 0 && m_rsp0 > 0, "histogram and RSP both ways");
    check(m_lgup > 0 && m_shup > 0 && m_shdn > 0 && m_lgdn > 0, "all four shifts");
    check(m_firsel > 0 && m_firstin > 0 && m_read > 0 && m_read_idle > 0, "FIRSEL, FIRSTIN, READ with and without a responder");
    check(m_confifo > 0 && m_nopbit > 0 && m_fircnt_off > 0 && m_setag > 0, "CONFIFO, NOP bit, FIRCNTEN, SETAG");
    $display("frames %0d slices %0d add pairs %0d hist %0d shifts %0d/%0d/%0d/%0d firsel %0d reads %0d",
             m_frame, m_xfer_bits, m_add_pairs, m_hist, m_lgup, m_shup, m_shdn, m_lgdn, m_firsel, m_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
