// asp_top_regs - the TOP block: MASK and COMPARAND registers with their
// group 1 logic, the FIFO configuration register and the bit line drive.
//
// Both registers are 72 bits, three sectors of 24. A group 1 instruction
// writes one sector s with the 24-bit operand d (or all ones / zeros); the
// exclusive forms also clear the same register in the two other sectors:
//   LM   mask=d            LC   comp=d            LMC  mask=d, comp=d
//   LMCC mask=d, comp=0    LMCCXX  LMCC, both registers exclusive
//   LCSM comp=d, mask=1s   LMX  mask=d, excl.     LCX  comp=d, excl.
//   LMSC mask=d, comp=1s   SMX  mask=1s, excl.    SCX  comp=1s, excl.
// (The document names the instructions and says what the exclusive ones
// clear; the per-instruction effects above are this design's reading of the
// names.) Group 1 runs in the Comparand stage of the pipeline, one cycle
// before the same micro-instruction executes in the array, so a load and a
// COMPARE or WRITE issued together use the new value.
// The FIFO section of the comparand doubles as the FIFO input register:
// while image I/O is active (io_active) a group 1 write leaves those bits
// alone, fifo_ld loads them from VIN, and the FIFO columns are dropped from
// the array mask (bl_mask) so the array neither compares nor writes them.
// CONFIFO (executed at cfg_ld) sets which 8-bit granules of sector 2 belong
// to the FIFO: cfg = 3'b111, 3'b011, 3'b001 give the 24, 16 and 8 bit FIFO.
// Reset (this design's choice): mask and comparand 0, 24-bit FIFO.
module asp_top_regs
  import asp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  g1_op_e            g1,
  input  logic [1:0]        sector,
  input  logic [SECT_W-1:0] d,
  input  logic              cfg_ld,
  input  logic [2:0]        cfg_d,
  input  logic              io_active,
  input  logic              fifo_ld,
  input  logic [SECT_W-1:0] vin,
  output logic [WIDTH-1:0]  mask,
  output logic [WIDTH-1:0]  comp,
  output logic [WIDTH-1:0]  bl_mask,
  output logic [WIDTH-1:0]  fifo_cols,
  output logic [2:0]        fifo_cfg
);

  logic [WIDTH-1:0] mask_n, comp_n, own;

  assign fifo_cols = fifo_col_mask(fifo_cfg);
  assign bl_mask   = io_active ? (mask & ~fifo_cols) : mask;

  always_comb begin
    logic [SECT_W-1:0] mv, cv;
    logic              wm, wc, xm, xc;
    mv = d; cv = d; wm = 1'b0; wc = 1'b0; xm = 1'b0; xc = 1'b0;
    unique case (g1)
      G1_LM:     begin wm = 1; end
      G1_LC:     begin wc = 1; end
      G1_LMC:    begin wm = 1; wc = 1; end
      G1_LMCC:   begin wm = 1; wc = 1; cv = '0; end
      G1_LMCCXX: begin wm = 1; wc = 1; cv = '0; xm = 1; xc = 1; end
      G1_LCSM:   begin wm = 1; wc = 1; mv = '1; end
      G1_LMX:    begin wm = 1; xm = 1; end
      G1_LCX:    begin wc = 1; xc = 1; end
      G1_LMSC:   begin wm = 1; wc = 1; cv = '1; end
      G1_SMX:    begin wm = 1; mv = '1; xm = 1; end
      G1_SCX:    begin wc = 1; cv = '1; xc = 1; end
      default:   ;
    endcase
    mask_n = mask;
    comp_n = comp;
    for (int s = 0; s < NSECT; s++) begin
      if (s == int'(sector)) begin
        if (wm) mask_n[s*SECT_W +: SECT_W] = mv;
        if (wc) comp_n[s*SECT_W +: SECT_W] = cv;
      end else begin
        if (xm) mask_n[s*SECT_W +: SECT_W] = '0;
        if (xc) comp_n[s*SECT_W +: SECT_W] = '0;
      end
    end
    // The FIFO input register part of the comparand belongs to image I/O
    own = io_active ? fifo_cols : '0;
    comp_n = (comp_n & ~own) | (comp & own);
    if (fifo_ld) comp_n = (comp_n & ~own) | ({vin, {2*SECT_W{1'b0}}} & own);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      comp <= '0;
      fifo_cfg <= 3'b111;
    end else begin
      mask <= mask_n;
      comp <= comp_n;
      if (cfg_ld) fifo_cfg <= cfg_d;
    end
  end

endmodule
