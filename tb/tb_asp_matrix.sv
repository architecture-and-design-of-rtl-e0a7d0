// tb_asp_matrix - random test of the CAM matrix against a reference model:
// masked tag-selected writes, FIFO word writes on the FIFO columns, the
// match lines of masked compares and the per-block read bit lines.
module tb_asp_matrix;
  import asp_pkg::*;
  localparam int unsigned W = 16, BR = 6, NB = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [WIDTH-1:0] comp, mask, fifo_cols, fifo_wdata;
  logic [W-1:0]     ml, wl, rd_wl, fifo_wl;
  logic             wr_en, fifo_wr;
  logic [NB-1:0][WIDTH-1:0] bl;

  asp_matrix #(.WORDS(W), .BLK_ROWS(BR), .NBLK(NB)) dut (.*);

  logic [WIDTH-1:0] ref_mem [W];
  int checks = 0, failures = 0;

  function automatic logic [WIDTH-1:0] rnd72();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check_outputs();
    logic [NB-1:0][WIDTH-1:0] eb;
    for (int j = 0; j < W; j++) begin
      logic e;
      e = ((ref_mem[j] ^ comp) & mask) == '0;
      checks++;
      if (ml[j] !== e) begin failures++; $display("ml[%0d] got %b exp %b", j, ml[j], e); end
    end
    for (int b = 0; b < NB; b++) eb[b] = '1;
    for (int j = 0; j < W; j++)
      for (int i = 0; i < WIDTH; i++)
        if ((fifo_cols[i] ? fifo_wl[j] : rd_wl[j]) && !ref_mem[j][i]) eb[j / BR][i] = 1'b0;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (bl[b] !== eb[b]) begin failures++; $display("bl[%0d] got %h exp %h", b, bl[b], eb[b]); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; fifo_wr = 0; wl = '0; rd_wl = '0; fifo_wl = '0;
    comp = '0; mask = '0; fifo_cols = '0; fifo_wdata = '0;
    // initialise every word with all columns
    for (int j = 0; j < W; j++) begin
      @(negedge clk);
      comp = rnd72(); mask = '1; wl = W'(1) << j; wr_en = 1;
      @(posedge clk); ref_mem[j] = comp;
    end
    @(negedge clk); wr_en = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      comp = rnd72();
      mask = rnd72() & rnd72();
      if (it % 7 == 0) begin
        // make a word match under the mask
        comp = ref_mem[$urandom_range(W-1)];
      end
      wl = W'($urandom()) & W'($urandom());
      rd_wl = W'(1) << $urandom_range(W-1);
      if ($urandom_range(3) == 0) rd_wl = rd_wl | W'($urandom());
      fifo_cols = fifo_col_mask(3'($urandom()));
      fifo_wl = W'(1) << $urandom_range(W-1);
      fifo_wdata = rnd72();
      wr_en = $urandom_range(1);
      fifo_wr = $urandom_range(1);
      #1 check_outputs();
      @(posedge clk);
      for (int j = 0; j < W; j++) begin
        logic [WIDTH-1:0] fs, as;
        fs = (fifo_wr && fifo_wl[j]) ? fifo_cols : '0;
        as = (wr_en && wl[j]) ? (mask & ~fs) : '0;
        ref_mem[j] = (ref_mem[j] & ~(fs | as)) | (comp & as) | (fifo_wdata & fs);
      end
    end
    @(negedge clk); #1 check_outputs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
