// tb_asp_select_first - full-size select first chain: only the lowest tagged
// word survives when firstin is 0, none when firstin is 1; done must come in
// cycle 22 after the start (cycle 0), so FIRSEL takes 23 cycles.
module tb_asp_select_first;
  import asp_pkg::*;
  localparam int unsigned W = 1024;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, firstin, firout, busy, done;
  logic [W-1:0] tagin, selfir;

  asp_select_first #(.WORDS(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_sf(input logic [W-1:0] v, input logic fi);
    logic [W-1:0] e;
    int cyc;
    e = '0;
    if (!fi) for (int j = 0; j < W; j++) if (v[j]) begin e[j] = 1'b1; break; end
    @(negedge clk); tagin = v; firstin = fi; start = 1;
    @(negedge clk); start = 0; tagin = '0; firstin = 0; cyc = 1;
    while (!done && cyc < 60) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != FIRSEL_CYCLES - 1) begin failures++; $display("done in cycle %0d", cyc); end
    checks++;
    if (selfir !== e) begin failures++; $display("selfir wrong, fi=%0b", fi); end
    checks++;
    if (firout !== (fi | (|v))) begin failures++; $display("firout wrong"); end
  endtask

  initial begin
    rst_n = 0; start = 0; firstin = 0; tagin = '0;
    #12 rst_n = 1;
    run_sf('0, 0);
    run_sf('1, 0);
    run_sf('1, 1);
    run_sf(W'(1) << (W-1), 0);
    for (int it = 0; it < 40; it++) begin
      logic [W-1:0] v;
      v = '0;
      v[$urandom_range(W-1)] = 1'b1;
      v[$urandom_range(W-1)] = 1'b1;
      if (it % 2) for (int k = 0; k < W/32; k++) v[k*32 +: 32] |= $urandom() & $urandom() & $urandom();
      run_sf(v, (it % 5) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
