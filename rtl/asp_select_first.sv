// asp_select_first - select first circuit: keeps the first TAG cell that
// holds 1 and clears all others.
//
// Each cell is the document's two-gate cell: TagOut = TagIn AND NOT FirIn,
// FirOut = TagIn OR FirIn, with FirOut feeding the FirIn of the next word.
// The chain starts at word 0 with the firstin pin, which in a multi-chip
// system carries the OR of the responses of all lower-numbered chips: when
// it is 1 a responder exists before this chip and every cell is cleared.
// The document gives the FIRSEL instruction 23 cycles, the settling time of
// the 1024-cell ripple chain. This design cuts the chain into CYCLES-2
// segments with a flip-flop between segments, so one segment settles per
// clock: start is high in cycle 0 and samples tagin and firstin at its end,
// segments are resolved at the ends of cycles 1..CYCLES-2, and in cycle
// CYCLES-1 (22) done is high and selfir holds the result, which TAG loads at
// the end of that cycle: 23 cycles in all. firout is the chain's output (1
// if firstin or any tag was 1), valid with done.
module asp_select_first
  import asp_pkg::*;
#(
  parameter int unsigned WORDS  = WORDS_DEF,
  parameter int unsigned CYCLES = FIRSEL_CYCLES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             firstin,
  input  logic [WORDS-1:0] tagin,
  output logic [WORDS-1:0] selfir,
  output logic             firout,
  output logic             busy,
  output logic             done
);

  localparam int unsigned NSEG   = CYCLES - 2;
  localparam int unsigned SEGLEN = (WORDS + NSEG - 1) / NSEG;
  localparam int unsigned SW     = $clog2(NSEG + 1);

  logic [WORDS-1:0] snap;
  logic             car;     // FirIn of the next segment
  logic [SW-1:0]    seg;
  logic             run;

  // Every segment is evaluated with car as its FirIn; only the one whose
  // turn it is (seg) is committed.
  logic [WORDS-1:0] seg_out;
  logic [NSEG-1:0]  seg_fout;
  always_comb begin
    for (int g = 0; g < NSEG; g++) begin
      logic f;
      f = car;
      for (int k = 0; k < SEGLEN; k++) begin
        if (g * SEGLEN + k < WORDS) begin
          seg_out[g*SEGLEN+k] = snap[g*SEGLEN+k] & ~f;
          f = f | snap[g*SEGLEN+k];
        end
      end
      seg_fout[g] = f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap <= '0; selfir <= '0; car <= 1'b0; seg <= '0; run <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        snap <= tagin;
        car  <= firstin;
        seg  <= '0;
        run  <= 1'b1;
      end else if (run) begin
        for (int g = 0; g < NSEG; g++)
          if (32'(seg) == g) begin
            for (int k = 0; k < SEGLEN; k++)
              if (g * SEGLEN + k < WORDS) selfir[g*SEGLEN+k] <= seg_out[g*SEGLEN+k];
            car <= seg_fout[g];
          end
        seg <= seg + 1'b1;
        if (32'(seg) == NSEG - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign firout = car;
  assign busy   = run;

endmodule
