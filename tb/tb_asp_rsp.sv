// tb_asp_rsp - the registered some/none response follows the compare result
// and holds between compares; the per-block responses follow TAG.
module tb_asp_rsp;
  import asp_pkg::*;
  localparam int unsigned W = 30, BR = 10, NB = 3;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, capture, rsp;
  logic [W-1:0] resp, tag;
  logic [NB-1:0] blk_rsp;

  asp_rsp #(.WORDS(W), .BLK_ROWS(BR), .NBLK(NB)) dut (.*);

  int checks = 0, failures = 0;
  logic r;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; capture = 0; resp = '0; tag = '0; r = 0;
    #12 rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      capture = $urandom_range(1);
      resp = ($urandom_range(2) == 0) ? '0 : (W'(1) << $urandom_range(W-1));
      tag = ($urandom_range(1)) ? W'($urandom()) : (W'(1) << $urandom_range(W-1));
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (blk_rsp[b] !== (|tag[b*BR +: BR])) begin failures++; $display("blk_rsp %0d", b); end
      end
      @(posedge clk); if (capture) r = |resp;
      #1; checks++;
      if (rsp !== r) begin failures++; $display("rsp got %b exp %b", rsp, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
