// vsoc_pkg: types and constants shared by the column-parallel vision SoC.
//
// Holds the 32-bit broadcast instruction of the SIMD processing elements
// (PEs), its operand encodings, the per-column analog settings bundle and the
// ASIP opcodes. The register set (8 x 8-bit registers, 8 flags, neighbour
// access, ADC result, calibration registers, selector, LUT result) follows the
// processor element described for the chip; every bit-level encoding here is
// this design's own choice, since no instruction format was published.
package vsoc_pkg;

  // ---------------------------------------------------------------- PE ----
  localparam int unsigned NREGS    = 8;   // working registers per PE
  localparam int unsigned NFLAGS   = 8;   // working flags per PE
  localparam int unsigned PMEM_AW  = 7;   // 128 x 8 bit PE memory
  localparam int unsigned ADC_BITS = 12;  // ADC resolution up to 12 bit

  typedef logic [7:0] byte_t;

  // Instruction classes (instr[31:28]).
  typedef enum logic [3:0] {
    C_NOP    = 4'd0,
    C_ALU    = 4'd1,   // 8-bit ALU
    C_ALU_CS = 4'd2,   // 8-bit ALU with complement selection
    C_FLAG   = 4'd3,   // 1-bit flag ALU
    C_MEM    = 4'd4,   // load / store to PE memory
    C_CTRL   = 4'd5,   // flag stack and activity multiplexer
    C_ADC    = 4'd6,   // ADC counter control
    C_SPW    = 4'd7,   // write special register
    C_LUT    = 4'd8,   // neighbour flag look-up table
    C_SCAT   = 4'd9,   // scatter unit configuration
    C_OUT    = 4'd10   // output pipeline
  } pe_class_e;

  // 8-bit ALU operations. Bit 0 selects the inverse of a pair, which is what
  // complement selection toggles.
  typedef enum logic [3:0] {
    A_ADD = 4'd0,  A_SUB  = 4'd1,
    A_AND = 4'd2,  A_NAND = 4'd3,
    A_OR  = 4'd4,  A_NOR  = 4'd5,
    A_XOR = 4'd6,  A_XNOR = 4'd7,
    A_SHL = 4'd8,  A_SHR  = 4'd9,
    A_MOV = 4'd10, A_NOT  = 4'd11,
    A_MIN = 4'd12, A_MAX  = 4'd13,
    A_ADC = 4'd14, A_SBC  = 4'd15
  } alu_op_e;

  // Flag ALU operations (low 3 bits of the op field).
  typedef enum logic [2:0] {
    F_AND = 3'd0, F_NAND = 3'd1, F_OR  = 3'd2, F_NOR = 3'd3,
    F_XOR = 3'd4, F_XNOR = 3'd5, F_MOV = 3'd6, F_NOT = 3'd7
  } flag_op_e;

  // 5-bit operand: {side, index}. side 0 own, 1 left, 2 right, 3 special.
  typedef enum logic [1:0] { S_OWN = 2'd0, S_LEFT = 2'd1, S_RIGHT = 2'd2, S_SPEC = 2'd3 } side_e;
  typedef struct packed { side_e side; logic [2:0] idx; } opnd_t;

  // Special byte operands (side S_SPEC).
  localparam logic [2:0] SB_IMM = 3'd0, SB_ADCL = 3'd1, SB_ADCH = 3'd2, SB_SCAT = 3'd3,
                         SB_LUT = 3'd4, SB_COLL = 3'd5, SB_COLH = 3'd6, SB_FLAGS = 3'd7;
  // Special flag operands (side S_SPEC).
  localparam logic [2:0] SF_C = 3'd0, SF_Z = 3'd1, SF_N = 3'd2, SF_LUT = 3'd3,
                         SF_COMP = 3'd4, SF_OVF = 3'd5, SF_SEL = 3'd6, SF_ONE = 3'd7;

  // Sub-operations.
  localparam logic [3:0] M_LD = 4'd0, M_ST = 4'd1;
  localparam logic [3:0] K_IF = 4'd0, K_ELSE = 4'd1, K_ENDIF = 4'd2, K_SETACT = 4'd3, K_RESET = 4'd4;
  localparam logic [3:0] D_CLR = 4'd0, D_STEP = 4'd1;
  localparam logic [3:0] W_SRC0 = 4'd0, W_SRC1 = 4'd1, W_AMPP = 4'd2, W_AMPN = 4'd3,
                         W_PIXM = 4'd4, W_SEL = 4'd5, W_ADCL = 4'd6, W_ADCH = 4'd7;
  localparam logic [3:0] G_MODE = 4'd0, G_SRC = 4'd1;   // scatter
  localparam logic [3:0] O_MODE = 4'd0, O_PUSH = 4'd1;  // output

  // Instruction word. Fields are shared between classes:
  //   ALU : op dst a b csf imm      (dst = a op b, op inverted if csf flag set for C_ALU_CS)
  //   FLAG: op dst a b              (f[dst] = a op b on flag operands)
  //   MEM : op dst(reg) ind=a.side[0] a.idx=index reg, imm[6:0] address
  //   CTRL: op, a = flag operand, inv = csf[0]
  //   SPW : op = target, a = byte operand
  //   LUT : a.idx = flag index, imm = truth table
  //   SCAT: MODE imm[1:0]; SRC dst = source register
  //   OUT : MODE imm[1:0]; PUSH dst = first register
  typedef struct packed {
    pe_class_e  cls;   // [31:28]
    logic [3:0] op;    // [27:24]
    logic [2:0] dst;   // [23:21]
    opnd_t      a;     // [20:16]
    opnd_t      b;     // [15:11]
    logic [2:0] csf;   // [10:8]
    byte_t      imm;   // [7:0]
  } pe_instr_t;

  // Instruction builders, used by programs that drive the array.
  function automatic opnd_t own(int unsigned i); return '{side: S_OWN,   idx: 3'(i)}; endfunction
  function automatic opnd_t lft(int unsigned i); return '{side: S_LEFT,  idx: 3'(i)}; endfunction
  function automatic opnd_t rgt(int unsigned i); return '{side: S_RIGHT, idx: 3'(i)}; endfunction
  function automatic opnd_t spc(int unsigned i); return '{side: S_SPEC,  idx: 3'(i)}; endfunction

  function automatic pe_instr_t pe_i(pe_class_e c, logic [3:0] op, logic [2:0] dst = 3'd0,
                                     opnd_t a = '0, opnd_t b = '0, logic [2:0] csf = 3'd0,
                                     byte_t imm = 8'd0);
    return '{cls: c, op: op, dst: dst, a: a, b: b, csf: csf, imm: imm};
  endfunction

  // Per-column settings of the analog readout path and analog memory.
  typedef struct packed {
    byte_t      src0;
    byte_t      src1;
    byte_t      ampp;
    byte_t      ampn;
    logic [4:0] pixm;
  } col_analog_t;

  // --------------------------------------------------------------- ASIP ---
  // 16-bit instruction: [15:12] opcode, [11:0] argument.
  typedef enum logic [3:0] {
    I_MISC  = 4'h0,  // stack / ALU / memory operation in [4:0]
    I_PUSH  = 4'h1,  // push zero-extended 12-bit immediate
    I_LUI   = 4'h2,  // tos[15:12] = imm[3:0]
    I_JMP   = 4'h3,
    I_JZ    = 4'h4,  // pop, jump if zero
    I_JNZ   = 4'h5,  // pop, jump if not zero
    I_EXT   = 4'h6,  // send the next two program words as a 32-bit command
    I_SIG   = 4'h7,  // raise events to the ASIPs in mask imm[2:0]
    I_WAIT  = 4'h8,  // wait for (and consume) the event from ASIP imm[1:0]
    I_DELAY = 4'h9,  // idle imm cycles
    I_HALT  = 4'hF
  } asip_op_e;

  typedef enum logic [4:0] {
    X_NOP = 5'd0, X_DUP = 5'd1, X_DROP = 5'd2, X_SWAP = 5'd3, X_OVER = 5'd4,
    X_ADD = 5'd5, X_SUB = 5'd6, X_AND = 5'd7, X_OR = 5'd8, X_XOR = 5'd9,
    X_NOT = 5'd10, X_SHL = 5'd11, X_SHR = 5'd12, X_INC = 5'd13, X_DEC = 5'd14,
    X_LD = 5'd15, X_ST = 5'd16, X_IN = 5'd17, X_EXTS = 5'd18
  } asip_misc_e;

  // Line-control command (LCTRL ASIP to the pixel matrix): [31:28] op, [9:0] row.
  localparam logic [3:0] L_RESET = 4'd1, L_ADDP = 4'd2, L_ADDN = 4'd3;

endpackage
