// tb_asp_system - full-size run of the chip chain: 8 ASP100 chips of 1024
// words (default parameters, no override), 8192 words in all.
//
// 1. A frame of 8192 pixels fills the chips one after another through the
//    FENB/FFUL chain. The test checks the word count on VOUT and FFUL of the
//    last chip.
// 2. On every chip at once, IMAGE IN copies the pixel field into the ARRAY.
// 3. Histogram levels are counted by COMPARE + COUNTAG. The eight CTAG
//    streams are summed here, playing the system's summation unit, and the
//    system RSP is checked.
// 4. Far and near shifts cross the chip boundaries over SHBUS. After each
//    shift, the per-chip counts are checked against the shifted reference
//    TAG.
// 5. FIRSEL over the chain must leave one word in the whole system, in the
//    lowest chip holding a match, and READ must bring it out on the shared
//    DBUS from that chip alone.
// 6. A second frame must return the first frame's pixels on VOUT in order.
// Each of these mechanisms is counted, and a failure is counted for any that
// never occurred.
module tb_asp_system;
  import asp_pkg::*;
  localparam int unsigned NC = 8, W = WORDS_DEF, N = NC * W;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  uinstr_t ctl;
  logic [31:0] dbus_i, dbus_o;
  logic dbus_oe, vout_oe, fenb, ffull, firstin, lin, hin, fircnten, ctag_valid, rsp, busy;
  logic [23:0] vin, vout;
  logic [NC-1:0] ctag;
  logic [15:0] shbus_lo_i, shbus_lo_o, shbus_lo_oe, shbus_hi_i, shbus_hi_o, shbus_hi_oe;

  asp_system dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] px [N];
  logic [N-1:0] rtag;
  int m_frame, m_hist, m_rsp0, m_rsp1, m_lgup, m_shup, m_shdn, m_firsel, m_read;

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic issue(input uinstr_t u, input logic [23:0] d = '0);
    @(negedge clk); ctl = u; dbus_i = {8'h00, d};
  endtask
  task automatic nop(input int n = 1);
    repeat (n) begin @(negedge clk); ctl = UNOP; dbus_i = '0; end
  endtask
  function automatic uinstr_t g1(input g1_op_e op, input int sct);
    uinstr_t u = UNOP; u.g1 = op; u.sector = 2'(sct); return u;
  endfunction
  task automatic set_mc(input logic [71:0] m, input logic [71:0] c);
    for (int k = 0; k < 3; k++) begin
      issue(g1(G1_LM, k), m[k*24 +: 24]);
      issue(g1(G1_LC, k), c[k*24 +: 24]);
    end
  endtask
  task automatic compare();
    uinstr_t u = UNOP; u.compare = 1; issue(u); nop(3);
  endtask
  task automatic copy_slice(input int ss, input int sb, input int ds, input int db);
    uinstr_t u;
    u = g1(G1_LMCCXX, ds); u.g2 = G2_SETAG; u.write = 1; issue(u, 24'(1) << db);
    u = g1(G1_LMC, ss); u.compare = 1;                 issue(u, 24'(1) << sb);
    u = g1(G1_LMC, ds); u.write = 1;                   issue(u, 24'(1) << db);
  endtask
  // COUNTAG on every chip; per-chip counts
  task automatic countag(output int n [NC]);
    uinstr_t u;
    int nb;
    u = UNOP; u.g5 = G5_COUNTAG; issue(u); nop();
    for (int k = 0; k < NC; k++) n[k] = 0;
    nb = 0;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); #1;
      if (ctag_valid) begin
        for (int k = 0; k < NC; k++) n[k] |= int'(ctag[k]) << nb;
        nb++;
      end
    end
    check(nb == $clog2(W + 1), "CTAG bit count");
  endtask
  function automatic int chunk_ones(input logic [N-1:0] t, input int k);
    int c = 0;
    for (int j = 0; j < W; j++) c += int'(t[k*W + j]);
    return c;
  endfunction
  task automatic check_counts(input string what);
    int n [NC];
    countag(n);
    for (int k = 0; k < NC; k++)
      check(n[k] == chunk_ones(rtag, k), $sformatf("%s chip %0d: %0d exp %0d", what, k, n[k], chunk_ones(rtag, k)));
  endtask
  task automatic frame(input logic [23:0] in [N], output logic [23:0] out [N]);
    int k, nout;
    k = 0; nout = 0;
    @(negedge clk); fenb = 1; vin = in[0];
    while (nout < N) begin
      @(posedge clk); #1;
      if (vout_oe) begin out[nout] = vout; nout++; end
      @(negedge clk); k++; vin = (k < N) ? in[k] : '0;
    end
    nop(1);
    check(ffull, "FFUL of the last chip after a system frame");
    m_frame++;
    @(negedge clk); fenb = 0;
    repeat (NC + 2) @(negedge clk);   // FFUL resets ripple down the chain
    check(!ffull, "FFUL cleared after FENB falls");
  endtask

  initial begin
    logic [23:0] out [N], px2 [N];
    uinstr_t u;
    int n [NC];
    rst_n = 0; ctl = UNOP; dbus_i = '0; vin = '0; fenb = 0; firstin = 0;
    lin = 1; hin = 1; fircnten = 1; shbus_lo_i = '0; shbus_hi_i = '0;
    {m_frame, m_hist, m_rsp0, m_rsp1, m_lgup, m_shup, m_shdn, m_firsel, m_read} = '0;
    for (int j = 0; j < N; j++) px[j] = {8'h00, 8'($urandom()), 8'($urandom_range(0, 31) * 8)};
    // a level found only in the top chip, to make FIRSEL cross the chain
    px[N - 5][7:0] = 8'd3;
    #23 rst_n = 1;

    frame(px, out);                   // frame 1: contents before were random

    for (int i = 0; i < 8; i++) copy_slice(2, i, 0, i);
    nop(3);

    // histogram over some levels, summed over all chips
    for (int lv = 0; lv < 256; lv += 20) begin
      int e, tot;
      e = 0; for (int j = 0; j < N; j++) if (px[j][7:0] == 8'(lv)) e++;
      set_mc(72'h0000FF, 72'(lv));
      compare();
      check(rsp == (e > 0), $sformatf("system RSP level %0d", lv));
      if (rsp) m_rsp1++; else m_rsp0++;
      countag(n);
      tot = 0; for (int k = 0; k < NC; k++) tot += n[k];
      check(tot == e, $sformatf("system histogram level %0d: %0d exp %0d", lv, tot, e));
      m_hist++;
    end

    // shifts across chip boundaries
    set_mc(72'h000008, 72'h000008);
    compare();
    for (int j = 0; j < N; j++) rtag[j] = px[j][3];
    check_counts("after COMPARE");
    u = UNOP; u.g3 = G3_LGUP; issue(u); nop(3);
    rtag = {rtag[N-17:0], 16'h0000}; m_lgup++;
    check_counts("after LGUP");
    u = UNOP; u.g3 = G3_SHUP; issue(u); nop(3);
    rtag = {rtag[N-2:0], 1'b0}; m_shup++;
    check_counts("after SHUP");
    hin = 0; shbus_hi_i = '1;
    u = UNOP; u.g3 = G3_SHDN; issue(u); nop(3);
    rtag = {1'b0, rtag[N-1:1]}; m_shdn++; hin = 1; shbus_hi_i = '0;
    check_counts("after SHDN");

    // FIRSEL over the chain, then READ from the one chip left
    foreach (px[t]) if (t < 2) begin
      logic [7:0] lv;
      int jf;
      lv = (t == 0) ? px[777][7:0] : 8'd3;
      jf = -1; for (int j = 0; j < N; j++) if (px[j][7:0] == lv && jf < 0) jf = j;
      set_mc(72'h0000FF, 72'(lv));
      compare();
      u = UNOP; u.g5 = G5_FIRSEL; issue(u); nop(3);
      for (int w = 0; w < 40 && busy; w++) @(negedge clk);
      nop(2);
      rtag = '0; rtag[jf] = 1'b1; m_firsel++;
      check_counts($sformatf("after FIRSEL (word %0d)", jf));
      u = UNOP; u.g5 = G5_READ; u.sector = 2'd0; issue(u); nop(1);
      for (int w = 0; w < 10 && !dbus_oe; w++) @(negedge clk);
      check(dbus_o[7:0] == lv && $onehot(dut.db_oe) && dut.db_oe[jf / W],
            $sformatf("READ of word %0d on DBUS from chip %0d", jf, jf / W));
      m_read++;
      nop(3);
    end

    // frame 2 returns frame 1
    for (int j = 0; j < N; j++) px2[j] = 24'($urandom());
    frame(px2, out);
    begin
      int bad = 0;
      for (int j = 0; j < N; j++) if (out[j] != px[j]) bad++;
      check(bad == 0, $sformatf("frame 2 VOUT returns frame 1 (%0d words differ)", bad));
    end

    check(m_frame == 2, "two system frames");
    check(m_hist > 0 && m_rsp0 > 0 && m_rsp1 > 0, "histogram with RSP both ways");
    check(m_lgup > 0 && m_shup > 0 && m_shdn > 0, "shifts across chips");
    check(m_firsel == 2 && m_read == 2, "FIRSEL and READ over the chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
