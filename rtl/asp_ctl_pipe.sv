// asp_ctl_pipe - the on-chip stages of the ASP100 instruction pipeline.
//
// The full pipeline has five stages: Fetch and Decode happen in the external
// controller, whose microROM produces one decoded horizontal micro-
// instruction per cycle. On chip:
//   microFetch: the control pins and the operand on DBUS[23:0] are captured
//               in IntMicroIR (uir1 / d1) at the rising clock edge;
//   Comparand:  group 1 acts on MASK / COMPARAND from uir1 / d1, and the
//               micro-instruction moves on to IntMicroIR2 (uir2 / d2);
//   Execute:    the array, SIDE and BOTTOM act on uir2 / d2.
// DBUS[31] is the NOP bit of the 32-bit instruction word: when it is 1 the
// cycle's micro-instruction is replaced by a NOP. DBUS[30:24] (the opcode
// field) is decoded off chip and not used here. A micro-instruction on the
// pins in cycle t changes MASK/COMPARAND at the end of cycle t+1 and TAG or
// the array at the end of cycle t+2. Reset to NOP is this design's choice.
module asp_ctl_pipe
  import asp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  uinstr_t           ctl,
  input  logic [31:0]       dbus_i,
  output uinstr_t           uir1,
  output logic [SECT_W-1:0] d1,
  output uinstr_t           uir2,
  output logic [SECT_W-1:0] d2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uir1 <= UNOP; uir2 <= UNOP; d1 <= '0; d2 <= '0;
    end else begin
      uir1 <= dbus_i[INSTR_NOP_BIT] ? UNOP : ctl;
      d1   <= dbus_i[SECT_W-1:0];
      uir2 <= uir1;
      d2   <= d1;
    end
  end

endmodule
