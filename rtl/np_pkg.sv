// np_pkg: shared types, instruction encodings and assembler helpers for the
// 2-D neighborhood processor array.
//
// Instruction word (16 bits):
//   [15:14] condition    [13:9] opcode    [8:0] type-specific field
// Five instruction types share the first seven bits:
//   Type I   ALU op on ACCA/ACCB with immediate or register operand
//            opcode[4] selects ACCB (1) or ACCA (0), opcode[3:0] the operation
//   Type II  shift of ACCA (00111) or ACCB (10111); [8:5] shift, [4] SR update
//   Type III jump (11110); {[15:14],[8]} jump condition, [7:0] target address
//   Type IV  indirect addressing through ACCB (01110); [8:5] op, [4] SR update,
//            [3] write (MOV) / read
//   Type V   special functions (01111); [8:0] function field
// The 9-bit operand field of Type I: bit 8 = 1 means immediate [7:0];
// bit 8 = 0 means a register address {bank[1:0], column[2:0], row[2:0]}.
// Bank 11 with column 000 addresses the special registers (SR, ACCA, ACCB,
// Row Column Register, four NRs) when nibble mode is off and nibble CH of the
// pixel when it is on.
//
// The encodings are the instruction set's own. The helper functions at the end
// are a small assembler used by the testbenches; they are synthesizable but no
// hardware uses them.
package np_pkg;

  // Condition field for Types I, II, IV and V (bits 15:14)
  typedef enum logic [1:0] {
    COND_Z = 2'b00,   // execute if Zero set
    COND_C = 2'b01,   // execute if Carry set
    COND_N = 2'b10,   // execute if Negative set
    COND_U = 2'b11    // unconditional
  } cond_e;

  // Operation codes in opcode[3:0] (Type I) and bits 8:5 (Types II and IV)
  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_ADC  = 4'b0001,
    OP_SUB  = 4'b0010,
    OP_SBB  = 4'b0011,
    OP_AND  = 4'b0100,
    OP_OR   = 4'b0101,
    OP_XOR  = 4'b0110,
    OP_ASR  = 4'b0111,
    OP_SR   = 4'b1000,
    OP_SRC  = 4'b1001,
    OP_SL   = 4'b1010,
    OP_SLC  = 4'b1011,
    OP_LOAD = 4'b1100,
    OP_MOV  = 4'b1101
  } aluop_e;

  // Full 5-bit opcodes that are not Type I
  localparam logic [4:0] OPC_SHIFT_A = 5'b00111;
  localparam logic [4:0] OPC_SHIFT_B = 5'b10111;
  localparam logic [4:0] OPC_JUMP    = 5'b11110;
  localparam logic [4:0] OPC_IRAM    = 5'b01110;
  localparam logic [4:0] OPC_SPL     = 5'b01111;

  // Type V function field, decoded in three groups
  localparam logic [2:0] SPL_FOPN  = 3'b100;   // bits 8:6
  localparam logic [2:0] SPL_RST   = 3'b110;
  localparam logic [2:0] SPL_SROUT = 3'b111;
  localparam logic [2:0] SPL_NOP   = 3'b010;
  localparam logic [2:0] SPL_END   = 3'b001;
  localparam logic [1:0] SPL_OUTA  = 2'b10;    // bits 5:4
  localparam logic [1:0] SPL_OUTB  = 2'b11;
  localparam logic [1:0] SPL_NBDS  = 2'b10;    // bits 3:2
  localparam logic [1:0] SPL_NBEN  = 2'b11;
  localparam logic [1:0] SPL_CLRA  = 2'b10;    // bits 1:0
  localparam logic [1:0] SPL_CLRB  = 2'b11;

  // Status register bit positions
  localparam int SR_C    = 0;
  localparam int SR_O    = 1;
  localparam int SR_N    = 2;
  localparam int SR_Z    = 3;
  localparam int SR_U    = 4;
  localparam int SR_SRU  = 5;
  localparam int SR_NPON = 6;
  localparam int SR_FREE = 7;
  // Value after reset and after the RST instruction: NP ON and SRU set
  localparam logic [7:0] SR_RESET = 8'h60;

  // Register banks (address bits 7:6)
  typedef enum logic [1:0] {
    BANK_A   = 2'b00,
    BANK_B   = 2'b01,
    BANK_C   = 2'b10,   // CL in nibble mode
    BANK_SPL = 2'b11    // special registers, CH in nibble mode
  } bank_e;

  // Special register numbers (address bits 2:0 with bank 11, column 000)
  localparam logic [2:0] SPR_SR   = 3'd0;
  localparam logic [2:0] SPR_ACCA = 3'd1;
  localparam logic [2:0] SPR_ACCB = 3'd2;
  localparam logic [2:0] SPR_RC   = 3'd3;
  localparam logic [2:0] SPR_NRTL = 3'd4;
  localparam logic [2:0] SPR_NRTR = 3'd5;
  localparam logic [2:0] SPR_NRBL = 3'd6;
  localparam logic [2:0] SPR_NRBR = 3'd7;

  // Flags produced by the ALU
  typedef struct packed {
    logic u;
    logic z;
    logic n;
    logic o;
    logic c;
  } flags_t;

  // ---------------------------------------------------------------------
  // Assembler helpers
  // ---------------------------------------------------------------------
  function automatic logic [8:0] a_imm(input logic [7:0] v);
    return {1'b1, v};
  endfunction

  // pixel register address: bank, column (0..7), row (0..7)
  function automatic logic [8:0] a_pix(input logic [1:0] bank, input int col, input int row);
    return {1'b0, bank, 3'(col), 3'(row)};
  endfunction

  function automatic logic [8:0] a_spr(input logic [2:0] n);
    return {1'b0, 2'b11, 3'b000, n};
  endfunction

  // Type I: acc_b selects ACCB
  function automatic logic [15:0] i_type1(input cond_e c, input logic acc_b,
                                          input aluop_e op, input logic [8:0] opnd);
    return {c, acc_b, op, opnd};
  endfunction

  // Type II shift
  function automatic logic [15:0] i_shift(input cond_e c, input logic acc_b,
                                          input aluop_e op, input logic sru);
    return {c, (acc_b ? OPC_SHIFT_B : OPC_SHIFT_A), op, sru, 4'b0000};
  endfunction

  // Type III jump: jc = {cond, toggle}
  function automatic logic [15:0] i_jump(input logic [2:0] jc, input logic [7:0] target);
    return {jc[2:1], OPC_JUMP, jc[0], target};
  endfunction

  // Type IV indirect: op, SR update, write
  function automatic logic [15:0] i_iram(input cond_e c, input aluop_e op,
                                         input logic sru, input logic wr);
    return {c, OPC_IRAM, (wr ? OP_LOAD : op), sru, wr, 3'b000};
  endfunction

  // Type V special, raw 9-bit function field
  function automatic logic [15:0] i_spl(input cond_e c, input logic [8:0] fn);
    return {c, OPC_SPL, fn};
  endfunction

  localparam logic [8:0] FN_FOPN  = 9'b100000000;
  localparam logic [8:0] FN_RST   = 9'b110000000;
  localparam logic [8:0] FN_SROUT = 9'b111000000;
  localparam logic [8:0] FN_NOP   = 9'b010000000;
  localparam logic [8:0] FN_END   = 9'b001000000;
  localparam logic [8:0] FN_OUTA  = 9'b000100000;
  localparam logic [8:0] FN_OUTB  = 9'b000110000;
  localparam logic [8:0] FN_NBDS  = 9'b000001000;
  localparam logic [8:0] FN_NBEN  = 9'b000001100;
  localparam logic [8:0] FN_CLRA  = 9'b000000010;
  localparam logic [8:0] FN_CLRB  = 9'b000000011;

  // Jump conditions {bits 15:14, bit 8}
  localparam logic [2:0] J_Z    = 3'b000;
  localparam logic [2:0] J_NZ   = 3'b001;
  localparam logic [2:0] J_C    = 3'b010;
  localparam logic [2:0] J_NC   = 3'b011;
  localparam logic [2:0] J_N    = 3'b100;
  localparam logic [2:0] J_NN   = 3'b101;
  localparam logic [2:0] J_O    = 3'b110;
  localparam logic [2:0] J_ALW  = 3'b111;

  // Evaluate a jump condition against a status register
  function automatic logic jump_cond_true(input logic [2:0] jc, input logic [7:0] sr);
    case (jc)
      J_Z:     return sr[SR_Z];
      J_NZ:    return !sr[SR_Z];
      J_C:     return sr[SR_C];
      J_NC:    return !sr[SR_C];
      J_N:     return sr[SR_N];
      J_NN:    return !sr[SR_N];
      J_O:     return sr[SR_O];
      default: return 1'b1;
    endcase
  endfunction

  function automatic logic is_jump(input logic [15:0] ir);
    return ir[13:9] == OPC_JUMP;
  endfunction

  function automatic logic is_end(input logic [15:0] ir);
    return (ir[13:9] == OPC_SPL) && (ir[8:6] == SPL_END);
  endfunction

endpackage
