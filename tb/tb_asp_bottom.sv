// tb_asp_bottom - resolver (lowest responding block for ARRAY columns,
// token block for FIFO columns), Output Register loads, the three-cycle READ
// to the read bus in the right sector, and VOUT.
module tb_asp_bottom;
  import asp_pkg::*;
  localparam int unsigned NB = 3;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, io_active, read, fifo_xfer, rd_oe;
  logic [NB-1:0][WIDTH-1:0] bl;
  logic [NB-1:0] blk_rsp, tok_blk;
  logic [WIDTH-1:0] fifo_cols, out_reg;
  logic [1:0] sector;
  logic [SECT_W-1:0] rd_data, vout;

  asp_bottom #(.NBLK(NB)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ro;
  logic [SECT_W-1:0] exp_rd [$];
  logic pend [$];

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; io_active = 0; read = 0; fifo_xfer = 0; bl = '0; blk_rsp = '0; tok_blk = 1;
    fifo_cols = '0; sector = 0; ro = '0;
    #12 rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      logic [WIDTH-1:0] asel, fsel, ld;
      @(negedge clk);
      for (int b = 0; b < NB; b++) bl[b] = {$urandom(), $urandom(), $urandom()};
      blk_rsp = NB'($urandom());
      tok_blk = NB'(1) << $urandom_range(NB-1);
      fifo_cols = fifo_col_mask(3'($urandom()));
      io_active = $urandom_range(1);
      read = ($urandom_range(2) == 0);
      fifo_xfer = io_active && $urandom_range(1);
      sector = 2'($urandom_range(2));
      asel = '1; fsel = '1;
      for (int b = 0; b < NB; b++) if (blk_rsp[b]) begin asel = bl[b]; break; end
      for (int b = 0; b < NB; b++) if (tok_blk[b]) fsel = bl[b];
      ld = read ? (io_active ? ~fifo_cols : '1) : '0;
      if (fifo_xfer) ld &= ~fifo_cols;
      @(posedge clk);
      ro = (ro & ~ld) | (asel & ld);
      if (fifo_xfer) ro = (ro & ~fifo_cols) | (fsel & fifo_cols);
      pend.push_back(read);
      exp_rd.push_back(ro[sector*24 +: 24]);
      #1; checks++;
      if (out_reg !== ro) begin failures++; $display("it %0d out_reg %h exp %h", it, out_reg, ro); end
      checks++;
      if (vout !== (ro[71:48] & fifo_cols[71:48])) begin failures++; $display("vout"); end
      if (pend.size() >= 2) begin
        logic p; logic [23:0] e;
        p = pend.pop_front(); e = exp_rd.pop_front();
        checks++;
        if (rd_oe !== p || (p && rd_data !== e)) begin
          failures++; $display("it %0d read out oe %b/%b data %h/%h", it, rd_oe, p, rd_data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
