// asp_pkg - shared sizes, instruction encodings and the decoded control word
// of the ASP100 associative processor.
//
// The chip is driven by an external microcoded controller that hands it
// decoded control lines, one horizontal micro-instruction per clock. The
// micro-instruction below carries one field per instruction group of the
// instruction set (group 1: mask/comparand loads, group 2: tag set/reset,
// group 3: tag shifts, group 4: compare/write, group 5: read, count, select
// first, FIFO configuration), so that groups 1+3 or 1+2+4 can be issued in
// the same cycle as the instruction set allows. The group membership, the
// mnemonics and the sizes (1024 words, 72 bits in three 24-bit sectors, far
// shift distance 16, counter made of three 18-stage arrays of 19 cells) are
// the document's; the numeric encodings of the enums are this design's own.
package asp_pkg;

  // Array geometry
  localparam int unsigned WORDS_DEF  = 1024; // CAM lines (processing elements)
  localparam int unsigned SECT_W     = 24;   // bits per sector
  localparam int unsigned NSECT      = 3;    // sectors 0..2
  localparam int unsigned WIDTH      = SECT_W * NSECT; // 72
  localparam int unsigned FIFO_GRAN  = 8;    // FIFO width granule inside sector 2
  localparam int unsigned FIFO_BASE  = 2 * SECT_W;   // first matrix column of sector 2
  localparam int unsigned FAR_B_DEF  = 16;   // far neighbour distance b

  // Peripheral circuit timing (instruction lengths from the instruction set)
  localparam int unsigned READ_CYCLES    = 3;
  localparam int unsigned COUNTAG_CYCLES = 31;
  localparam int unsigned FIRSEL_CYCLES  = 23;

  // Group 1: load mask / comparand of one sector (s) with operand d
  typedef enum logic [3:0] {
    G1_NONE   = 4'd0,
    G1_LM     = 4'd1,   // mask[s] = d
    G1_LC     = 4'd2,   // comp[s] = d
    G1_LMC    = 4'd3,   // mask[s] = d, comp[s] = d
    G1_LMCC   = 4'd4,   // mask[s] = d, comp[s] = 0
    G1_LMCCXX = 4'd5,   // as LMCC, other sectors' mask and comp cleared
    G1_LCSM   = 4'd6,   // comp[s] = d, mask[s] = all ones
    G1_LMX    = 4'd7,   // mask[s] = d, other sectors' mask cleared
    G1_LCX    = 4'd8,   // comp[s] = d, other sectors' comp cleared
    G1_LMSC   = 4'd9,   // mask[s] = d, comp[s] = all ones
    G1_SMX    = 4'd10,  // mask[s] = all ones, other sectors' mask cleared
    G1_SCX    = 4'd11   // comp[s] = all ones, other sectors' comp cleared
  } g1_op_e;

  // Group 2: TAG set / reset
  typedef enum logic [1:0] {
    G2_NONE    = 2'd0,
    G2_RESETAG = 2'd1,
    G2_SETAG   = 2'd2
  } g2_op_e;

  // Group 3: TAG shifts (near = 1 word, far = b words)
  typedef enum logic [2:0] {
    G3_NONE = 3'd0,
    G3_SHUP = 3'd1,   // tag[j] <= tag[j-1]
    G3_SHDN = 3'd2,   // tag[j] <= tag[j+1]
    G3_LGUP = 3'd3,   // tag[j] <= tag[j-b]
    G3_LGDN = 3'd4    // tag[j] <= tag[j+b]
  } g3_op_e;

  // Group 5: multi-cycle peripheral operations and FIFO configuration
  typedef enum logic [2:0] {
    G5_NONE    = 3'd0,
    G5_READ    = 3'd1,
    G5_COUNTAG = 3'd2,
    G5_FIRSEL  = 3'd3,
    G5_CONFIFO = 3'd4
  } g5_op_e;

  // One horizontal micro-instruction, as presented on the control pins.
  typedef struct packed {
    logic [1:0] sector;   // s(2) operand of group 1 and READ
    g1_op_e     g1;
    g2_op_e     g2;       // SETAG also has a pin of its own in the pin list
    g3_op_e     g3;
    logic       compare;  // group 4 COMPARE
    logic       write;    // group 4 WRITE (the WE pin)
    g5_op_e     g5;
  } uinstr_t;

  localparam uinstr_t UNOP = '{sector: 2'd0, g1: G1_NONE, g2: G2_NONE,
                               g3: G3_NONE, compare: 1'b0, write: 1'b0,
                               g5: G5_NONE};

  // Input select of the 8:1 multiplexer in front of every TAG flip-flop
  typedef enum logic [2:0] {
    TAG_HOLD   = 3'd0,  // TAG feedback loop
    TAG_GND    = 3'd1,  // tag reset
    TAG_ML     = 3'd2,  // match line, through its sense amplifier
    TAG_NN     = 3'd3,  // near north: tag[j+1]
    TAG_NS     = 3'd4,  // near south: tag[j-1]
    TAG_FN     = 3'd5,  // far north:  tag[j+b]
    TAG_FS     = 3'd6,  // far south:  tag[j-b]
    TAG_SELFIR = 3'd7   // select first circuit output
  } tag_src_e;

  // Instruction word on DBUS (32 bits): NOP bit, 7-bit opcode, 24-bit operand
  localparam int unsigned INSTR_NOP_BIT = 31;

  // Column mask of the FIFO part of the matrix for a CONFIFO granule mask
  function automatic logic [WIDTH-1:0] fifo_col_mask(input logic [2:0] cfg);
    logic [WIDTH-1:0] m;
    m = '0;
    for (int g = 0; g < 3; g++)
      if (cfg[g]) m[FIFO_BASE + g*FIFO_GRAN +: FIFO_GRAN] = '1;
    return m;
  endfunction

endpackage
