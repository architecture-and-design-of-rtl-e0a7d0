// tb_asp_side - SIDE block at reduced size: random sequences of COMPARE,
// shifts (with LIN/HIN gating of the words entering at the ends), SETAG,
// RESETAG, COUNTAG (serial CTAG result) and FIRSEL (first responder kept,
// FIRSTIN and FIRCNTEN honoured), each checked against a reference TAG.
module tb_asp_side;
  import asp_pkg::*;
  localparam int unsigned W = 48, B = 4, BR = 16, NB = 3, ST = 2, CE = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, compare, countag, firsel, fircnten, firstin, lin, hin;
  g2_op_e g2; g3_op_e g3;
  logic [W-1:0] ml, tag;
  logic [B-1:0] lo_in, hi_in, lo_out, hi_out;
  logic rsp, ctag, ctag_valid, count_done, firsel_done, busy;
  logic [NB-1:0] blk_rsp;

  asp_side #(.WORDS(W), .B(B), .BLK_ROWS(BR), .NBLK(NB), .STAGES(ST), .CELLS(CE)) dut (.*);

  int checks = 0, failures = 0;
  int n_cmp = 0, n_sh = 0, n_cnt = 0, n_sf = 0, n_set = 0;
  logic [W-1:0] r;
  logic rr;

  initial begin
    #500000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic idle();
    g2 = G2_NONE; g3 = G3_NONE; compare = 0; countag = 0; firsel = 0;
  endtask

  task automatic chk(input string what);
    checks++;
    if (tag !== r || rsp !== rr) begin
      failures++; $display("%s: tag %h exp %h rsp %b exp %b", what, tag, r, rsp, rr);
    end
  endtask

  initial begin
    rst_n = 0; idle(); fircnten = 1; firstin = 0; lin = 1; hin = 1;
    ml = '0; lo_in = '0; hi_in = '0; r = '0; rr = 0;
    #12 rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int op;
      @(negedge clk);
      idle();
      op = $urandom_range(7);
      ml = {$urandom(), $urandom()};
      lo_in = B'($urandom()); hi_in = B'($urandom());
      lin = $urandom_range(3) != 0; hin = $urandom_range(3) != 0;
      case (op)
        0, 1: begin
          compare = 1; n_cmp++;
          if ($urandom_range(1)) g2 = G2_SETAG;  // horizontal: compare wins
          @(posedge clk); r = ml; rr = |ml;
        end
        2: begin
          g3 = g3_op_e'($urandom_range(1, 4)); n_sh++;
          @(posedge clk);
          begin
            logic [W-1:0] n;
            logic [B-1:0] li, hi;
            li = lo_in & {B{lin}}; hi = hi_in & {B{hin}};
            for (int j = 0; j < W; j++)
              case (g3)
                G3_SHUP: n[j] = (j >= 1) ? r[j-1] : li[B-1];
                G3_SHDN: n[j] = (j + 1 < W) ? r[j+1] : hi[0];
                G3_LGUP: n[j] = (j >= B) ? r[j-B] : li[j];
                default: n[j] = (j + B < W) ? r[j+B] : hi[j+B-W];
              endcase
            r = n;
          end
        end
        3: begin g2 = G2_SETAG; n_set++; @(posedge clk); r = '1; end
        4: begin g2 = G2_RESETAG; @(posedge clk); r = '0; end
        5: begin
          int got, nb;
          countag = 1; n_cnt++;
          fircnten = $urandom_range(5) != 0;
          @(negedge clk); idle();
          got = 0; nb = 0;
          while (busy) begin
            if (ctag_valid) begin got |= int'(ctag) << nb; nb++; end
            @(negedge clk);
          end
          if (ctag_valid) begin got |= int'(ctag) << nb; nb++; end
          checks++;
          if (got != (fircnten ? $countones(r) : 0)) begin
            failures++; $display("count %0d exp %0d", got, $countones(r));
          end
          fircnten = 1;
        end
        6, 7: begin
          logic [W-1:0] e;
          firsel = 1; n_sf++;
          firstin = ($urandom_range(4) == 0);
          fircnten = $urandom_range(7) != 0;
          e = '0;
          if (!firstin && fircnten) for (int j = 0; j < W; j++) if (r[j]) begin e[j] = 1; break; end
          @(negedge clk); idle(); firstin = 0;
          while (!firsel_done) @(negedge clk);
          @(posedge clk); r = e;
          fircnten = 1;
        end
        default: ;
      endcase
      #1 chk($sformatf("op %0d", op));
      // make some compares hit nothing
      if (it % 11 == 0) begin
        @(negedge clk); idle(); ml = '0; compare = 1; @(posedge clk); r = '0; rr = 0; #1 chk("empty compare");
      end
    end
    checks++;
    if (n_cmp == 0 || n_sh == 0 || n_cnt == 0 || n_sf == 0 || n_set == 0) begin
      failures++; $display("an operation was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
