// asp_resp_count - response count circuit: counts the TAG cells holding 1
// and sends the count out bit-serially, least significant bit first (CTAG).
//
// As in the document the counter is three iterative logic arrays, one per
// physical row block, each of STAGES pipeline stages of CELLS cells, and a
// final summation stage that adds the three serial results. Stage s of a
// block covers the CELLS tag bits starting at word (block*STAGES+s)*CELLS.
// Every stage has a multiplexer (respin or its own flip-flops), an adder
// section and flip-flops for the carries:
//   * initial phase (the load cycle, "InAddr"): the stage flip-flops take the
//     number of ones among the stage's tag inputs;
//   * iterative phase: each cycle the stage adds the serial bit coming from
//     the stage above to its flip-flops, passes the sum bit down and keeps the
//     carries. The stages start one after the other from the top, so the bit
//     stream leaving stage s is the count of stages 0..s.
// The final summation stage adds the three block streams and its own carry.
// Timing: start is high in cycle 0 and the stages load at its end. CTAG
// bit i is valid (ctag_valid high) in cycle STAGES+2+i; with 18 stages and
// an 11-bit count the last bit is out in cycle 30, where done is high too,
// so a count takes exactly the 31 cycles the instruction set gives COUNTAG.
// Inputs are read only in the load cycle. The adder-section internals and
// the exact start schedule are this design's reading of the document's block diagram.
module asp_resp_count
  import asp_pkg::*;
#(
  parameter int unsigned WORDS  = WORDS_DEF,
  parameter int unsigned NBLK   = 3,
  parameter int unsigned STAGES = 18,
  parameter int unsigned CELLS  = 19,
  parameter int unsigned CNT_BITS = $clog2(WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,   // InAddr: initial phase
  input  logic [WORDS-1:0] respin,  // TAG outputs (already gated by FIRCNTEN)
  output logic             ctag,    // serial count, LSB first
  output logic             ctag_valid,
  output logic             busy,
  output logic             done
);

  localparam int unsigned CW   = $clog2(CELLS + 2) + 1;  // stage carry width
  localparam int unsigned TOT  = NBLK * STAGES * CELLS;
  localparam int unsigned LAST = STAGES + CNT_BITS - 1;   // last cycle index
  localparam int unsigned CYW  = $clog2(LAST + 2);

  logic [TOT-1:0] resp_ext;
  always_comb begin
    resp_ext = '0;
    resp_ext[WORDS-1:0] = respin;
  end

  logic [CYW-1:0] cyc;
  logic           run;
  logic [CW-1:0]  acc  [NBLK][STAGES];
  logic           sbit [NBLK][STAGES];   // registered sum bit of each stage
  logic [2:0]     fcar;                   // final summation carry (<= 2 for 3 inputs)

  function automatic logic [CW-1:0] ones(input logic [CELLS-1:0] v);
    logic [CW-1:0] n;
    n = '0;
    for (int i = 0; i < CELLS; i++) n = n + CW'(v[i]);
    return n;
  endfunction

  // Adder sections: stage flip-flops plus the bit from the stage above, and
  // the final summation of the three block streams plus its carry.
  logic [CW-1:0] t_sum [NBLK][STAGES];
  logic [3:0]    f_sum;
  always_comb begin
    for (int b = 0; b < NBLK; b++)
      for (int s = 0; s < STAGES; s++)
        t_sum[b][s] = acc[b][s] + ((s == 0) ? CW'(0) : CW'(sbit[b][s-1]));
    f_sum = 4'(fcar);
    for (int b = 0; b < NBLK; b++) f_sum = f_sum + 4'(sbit[b][STAGES-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cyc <= '0;
      done <= 1'b0;
      ctag <= 1'b0;
      ctag_valid <= 1'b0;
      fcar <= '0;
      for (int b = 0; b < NBLK; b++)
        for (int s = 0; s < STAGES; s++) begin
          acc[b][s]  <= '0;
          sbit[b][s] <= 1'b0;
        end
    end else begin
      done <= 1'b0;
      if (start) begin
        // Initial phase: respin through the multiplexer
        run <= 1'b1;
        cyc <= '0;
        fcar <= '0;
        ctag <= 1'b0;
        ctag_valid <= 1'b0;
        for (int b = 0; b < NBLK; b++)
          for (int s = 0; s < STAGES; s++) begin
            acc[b][s]  <= ones(resp_ext[(b*STAGES+s)*CELLS +: CELLS]);
            sbit[b][s] <= 1'b0;
          end
      end else if (run) begin
        // Iterative phase: stage s works from cycle s on
        cyc <= cyc + 1'b1;
        for (int b = 0; b < NBLK; b++)
          for (int s = 0; s < STAGES; s++)
            if (32'(cyc) >= s) begin
              sbit[b][s] <= t_sum[b][s][0];
              acc[b][s]  <= t_sum[b][s] >> 1;
            end
        if (32'(cyc) >= STAGES) begin
          ctag <= f_sum[0];
          fcar <= f_sum[3:1];
          ctag_valid <= 1'b1;
        end
        if (32'(cyc) == LAST) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        ctag_valid <= 1'b0;
      end
    end
  end

  assign busy = run;

  initial assert (TOT >= WORDS) else $error("asp_resp_count: arrays do not cover WORDS");

endmodule
