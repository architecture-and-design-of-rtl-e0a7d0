// tb_asp_fifo_ctrl - one frame per FENB: exactly WORDS VIN samples, each
// transferred one cycle later to the next word of the sequential address
// generator, VOUT enabled the cycle after, FFUL after the last sample and
// cleared when FENB falls; two frames, the second after a pause.
module tb_asp_fifo_ctrl;
  import asp_pkg::*;
  localparam int unsigned W = 20, BR = 7, NB = 3;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, fenb, ffull, fifo_ld, fifo_xfer, io_active, vout_oe;
  logic [W-1:0] fifo_wl;
  logic [NB-1:0] tok_blk;

  asp_fifo_ctrl #(.WORDS(W), .BLK_ROWS(BR), .NBLK(NB)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame();
    int nld, nx, noe, full_at, c;
    nld = 0; nx = 0; noe = 0; full_at = -1;
    @(negedge clk); fenb = 1;
    for (c = 0; c < W + 6; c++) begin
      #1;
      if (fifo_ld) nld++;
      if (vout_oe) noe++;
      if (fifo_xfer) begin
        checks++;
        if (fifo_wl !== (W'(1) << nx) || tok_blk !== (NB'(1) << (nx / BR))) begin
          failures++; $display("transfer %0d wrong word line", nx);
        end
        nx++;
      end
      checks++;
      if (io_active !== 1'b1) begin failures++; $display("io_active low in frame"); end
      if (ffull && full_at < 0) full_at = c;
      @(negedge clk);
    end
    checks++;
    if (nld != W || nx != W || noe != W || full_at != W) begin
      failures++; $display("ld %0d xfer %0d oe %0d full at %0d", nld, nx, noe, full_at);
    end
    fenb = 0;
    @(negedge clk); #1;
    checks++;
    if (ffull || io_active || fifo_ld) begin failures++; $display("not idle after FENB fell"); end
  endtask

  initial begin
    rst_n = 0; fenb = 0;
    #12 rst_n = 1;
    frame();
    repeat (5) @(negedge clk);
    frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
