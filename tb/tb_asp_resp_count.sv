// tb_asp_resp_count - full-size response counter (1024 tags, three arrays of
// 18 stages x 19 cells): the serial CTAG result must equal the number of ones
// for random, empty and full tag vectors, with the last bit out within the
// 31 cycles of COUNTAG (the first bit in cycle 20, the start being cycle 0).
module tb_asp_resp_count;
  import asp_pkg::*;
  localparam int unsigned W = 1024;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, ctag, ctag_valid, busy, done;
  logic [W-1:0] respin;

  asp_resp_count #(.WORDS(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_count(input logic [W-1:0] v);
    int exp, got, nbits, cyc, first, last;
    exp = $countones(v);
    @(negedge clk); respin = v; start = 1;
    @(negedge clk); start = 0; respin = '0;
    got = 0; nbits = 0; cyc = 1; first = -1; last = -1;
    while (cyc < 40) begin
      if (ctag_valid) begin
        if (first < 0) first = cyc;
        got = got | (int'(ctag) << nbits);
        nbits++;
      end
      if (done) last = cyc;
      @(negedge clk); cyc++;
    end
    checks++;
    if (got != exp || nbits != 11) begin
      failures++; $display("count got %0d (%0d bits) exp %0d", got, nbits, exp);
    end
    checks++;
    if (first != 20 || last != 30 || last + 1 > COUNTAG_CYCLES) begin
      failures++; $display("timing first %0d last %0d", first, last);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; respin = '0;
    #12 rst_n = 1;
    run_count('0);
    run_count('1);
    run_count(W'(1));
    run_count(W'(1) << (W-1));
    for (int it = 0; it < 30; it++) begin
      logic [W-1:0] v;
      for (int k = 0; k < W/32; k++) v[k*32 +: 32] = $urandom();
      if (it % 3 == 1) for (int k = 0; k < W/32; k++) v[k*32 +: 32] &= $urandom() & $urandom();
      if (it % 3 == 2) for (int k = 0; k < W/32; k++) v[k*32 +: 32] |= $urandom() | $urandom();
      run_count(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
