// tb_asp_top_regs - every group 1 instruction on random sectors and operands
// against a table of what each one does to MASK and COMPARAND, CONFIFO, and
// the FIFO input register section while image I/O is active.
module tb_asp_top_regs;
  import asp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cfg_ld, io_active, fifo_ld;
  g1_op_e g1;
  logic [1:0] sector;
  logic [SECT_W-1:0] d, vin;
  logic [2:0] cfg_d, fifo_cfg;
  logic [WIDTH-1:0] mask, comp, bl_mask, fifo_cols;

  asp_top_regs dut (.*);

  int checks = 0, failures = 0;
  int seen [16];
  logic [SECT_W-1:0] rm [3], rc [3];
  logic [2:0] rcfg;

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [WIDTH-1:0] fcols(input logic [2:0] c);
    logic [WIDTH-1:0] m = '0;
    if (c[0]) m[55:48] = '1;
    if (c[1]) m[63:56] = '1;
    if (c[2]) m[71:64] = '1;
    return m;
  endfunction

  initial begin
    rst_n = 0; g1 = G1_NONE; sector = 0; d = '0; cfg_ld = 0; cfg_d = 0;
    io_active = 0; fifo_ld = 0; vin = '0;
    for (int s = 0; s < 3; s++) begin rm[s] = '0; rc[s] = '0; end
    rcfg = 3'b111;
    #12 rst_n = 1;
    for (int it = 0; it < 800; it++) begin
      logic [WIDTH-1:0] em, ec, own, cold;
      @(negedge clk);
      g1 = g1_op_e'($urandom_range(11));
      sector = 2'($urandom_range(2));
      d = 24'($urandom());
      cfg_ld = ($urandom_range(9) == 0);
      cfg_d = 3'($urandom());
      io_active = (it > 400) && $urandom_range(1);
      fifo_ld = io_active && $urandom_range(1);
      vin = 24'($urandom());
      seen[g1]++;
      cold = {rc[2], rc[1], rc[0]};
      own = io_active ? fcols(rcfg) : '0;
      #1; checks++;
      if (bl_mask !== ({rm[2], rm[1], rm[0]} & ~own)) begin failures++; $display("bl_mask"); end
      @(posedge clk);
      for (int s = 0; s < 3; s++) begin
        logic hit;
        hit = (s == sector);
        case (g1)
          G1_LM:     if (hit) rm[s] = d;
          G1_LC:     if (hit) rc[s] = d;
          G1_LMC:    if (hit) begin rm[s] = d; rc[s] = d; end
          G1_LMCC:   if (hit) begin rm[s] = d; rc[s] = '0; end
          G1_LMCCXX: if (hit) begin rm[s] = d; rc[s] = '0; end else begin rm[s] = '0; rc[s] = '0; end
          G1_LCSM:   if (hit) begin rc[s] = d; rm[s] = '1; end
          G1_LMX:    if (hit) rm[s] = d; else rm[s] = '0;
          G1_LCX:    if (hit) rc[s] = d; else rc[s] = '0;
          G1_LMSC:   if (hit) begin rm[s] = d; rc[s] = '1; end
          G1_SMX:    if (hit) rm[s] = '1; else rm[s] = '0;
          G1_SCX:    if (hit) rc[s] = '1; else rc[s] = '0;
          default: ;
        endcase
      end
      ec = {rc[2], rc[1], rc[0]};
      ec = (ec & ~own) | (cold & own);
      if (fifo_ld) ec = (ec & ~own) | ({vin, 48'h0} & own);
      rc[0] = ec[23:0]; rc[1] = ec[47:24]; rc[2] = ec[71:48];
      if (cfg_ld) rcfg = cfg_d;
      em = {rm[2], rm[1], rm[0]};
      #1; checks++;
      if (mask !== em || comp !== ec || fifo_cfg !== rcfg || fifo_cols !== fcols(rcfg)) begin
        failures++; $display("it %0d op %s: mask %h/%h comp %h/%h", it, g1.name(), mask, em, comp, ec);
      end
    end
    for (int k = 1; k < 12; k++) begin
      checks++; if (seen[k] == 0) begin failures++; $display("op %0d never issued", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
