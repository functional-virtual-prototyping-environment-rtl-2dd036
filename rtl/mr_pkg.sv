// mr_pkg: shared types and constants of the map-reduce accelerator.
//
// The engine is a SIMD machine: a Controller fetches one instruction pair per
// cycle from its program memory, executes the controller half itself and
// broadcasts the array half (with a scalar operand) through the Distr tree to
// a linear array of P cells. Each cell holds an accumulator, a local memory,
// an address register, an activity counter and one element of a global shift
// register. A pipelined Reduce tree folds the accumulators of the active cells.
//
// The opcode names follow the mnemonics of the source architecture where they
// exist (RLOAD, RILOAD, MULT, CADDRLD, SRLOAD, cLOAD, cVSUB, cSEND, cCPUSHL,
// cBRNZDEC, ...); the binary encoding, the field widths and the exact operand
// rules are this implementation's own choice.
package mr_pkg;

  // ---------------- sizes (defaults) ----------------
  parameter int unsigned DATA_W  = 32;    // eng(0) is a 16- or 32-bit unit; 32 chosen
  parameter int unsigned IMM_W   = 16;    // immediate field of both instruction halves
  parameter int unsigned ACT_W   = 8;     // activity counter width (nesting depth of WHERE)

  // ---------------- array (cell) instruction ----------------
  typedef enum logic [4:0] {
    A_NOP       = 5'd0,
    A_LOAD      = 5'd1,   // acc <= operand            (RLOAD / VLOAD)
    A_ADD       = 5'd2,   // acc <= acc + operand
    A_SUB       = 5'd3,   // acc <= acc - operand
    A_MULT      = 5'd4,   // acc <= acc * operand (low DATA_W bits)
    A_AND       = 5'd5,
    A_OR        = 5'd6,
    A_XOR       = 5'd7,
    A_EQ        = 5'd8,   // acc <= (acc == operand)
    A_LT        = 5'd9,   // acc <= (acc <  operand), signed
    A_LEQ       = 5'd10,  // acc <= (acc <= operand), signed
    A_ZERO      = 5'd11,  // acc <= (acc == 0)
    A_STORE     = 5'd12,  // mem[imm] <= acc
    A_ILOAD     = 5'd13,  // acc <= mem[addr+imm]; addr <= addr+1   (RILOAD)
    A_ISTORE    = 5'd14,  // mem[addr+imm] <= acc; addr <= addr+1
    A_ADDRLD    = 5'd15,  // addr <= operand                        (CADDRLD)
    A_IXLOAD    = 5'd16,  // acc <= cell index
    A_SRLOAD    = 5'd17,  // acc <= global shift register element
    A_RESETACT  = 5'd18,  // active <= 0 in every cell
    A_SETACT    = 5'd19,  // active <= (acc != 0) in every cell
    A_WHERE     = 5'd20,  // keep 0 where active and acc!=0, else increment
    A_ELSEWHERE = 5'd21,  // swap 0 and 1
    A_ENDWHERE  = 5'd22,  // decrement where > 0
    A_FIRST     = 5'd23,  // increment except the first cell with active==0
    A_SHL       = 5'd24,  // acc[i] <= acc[i+1], last cell <= scalar
    A_SHR       = 5'd25,  // acc[i] <= acc[i-1], cell 0 <= scalar
    A_ROTL      = 5'd26,  // acc[i] <= acc[i+1], last cell <= acc[0]
    A_ROTR      = 5'd27   // acc[i] <= acc[i-1], cell 0 <= acc[P-1]
  } a_op_e;

  // operand source of an array instruction
  typedef enum logic [1:0] {
    SRC_MEM    = 2'd0,    // mem[imm]
    SRC_IMM    = 2'd1,    // sign-extended imm
    SRC_SCALAR = 2'd2     // scalar broadcast by the controller
  } a_src_e;

  typedef struct packed {
    a_op_e              op;
    a_src_e             src;
    logic [IMM_W-1:0]   imm;
  } a_instr_t;

  // ---------------- reduction ----------------
  typedef enum logic [1:0] {
    R_ADD = 2'd0,
    R_MAX = 2'd1,
    R_MIN = 2'd2
  } r_op_e;

  typedef struct packed {
    logic   valid;
    r_op_e  op;
    logic   push;         // 1: push result into global shift register, 0: to controller
  } red_cmd_t;

  // what travels down the Distr tree every cycle
  typedef struct packed {
    a_instr_t            instr;
    logic [DATA_W-1:0]   scalar;
    red_cmd_t            red;
  } bcast_t;

  // ---------------- controller instruction ----------------
  typedef enum logic [4:0] {
    C_NOP     = 5'd0,
    C_HALT    = 5'd1,   // stop; controller returns to idle
    C_VLOAD   = 5'd2,   // acc <= imm (sign-extended)
    C_LOAD    = 5'd3,   // acc <= dmem[imm]
    C_STORE   = 5'd4,   // dmem[imm] <= acc
    C_VADD    = 5'd5,   // acc <= acc + imm
    C_ADD     = 5'd6,   // acc <= acc + dmem[imm]
    C_VSUB    = 5'd7,   // acc <= acc - imm
    C_SUB     = 5'd8,   // acc <= acc - dmem[imm]
    C_SEND    = 5'd9,   // broadcast scalar of this cycle <= imm (acc unchanged)
    C_JMP     = 5'd10,  // pc <= imm
    C_BRZ     = 5'd11,  // if acc == 0 pc <= imm
    C_BRNZ    = 5'd12,  // if acc != 0 pc <= imm
    C_BRNZDEC = 5'd13,  // if acc != 0 {pc <= imm; acc <= acc-1}
    C_CPUSHL  = 5'd14,  // reduce (op = imm[1:0]) and push the result into the shift register
    C_CRED    = 5'd15,  // reduce (op = imm[1:0]) into the controller's reduction register
    C_RLOAD   = 5'd16,  // acc <= reduction register
    C_FIRSTIX = 5'd17   // acc <= index of the first active cell (Scan), -1 if none
  } c_op_e;

  typedef struct packed {
    c_op_e             op;
    logic [IMM_W-1:0]  imm;
  } c_instr_t;

  typedef struct packed {
    c_instr_t  c;
    a_instr_t  a;
  } prog_word_t;


endpackage
