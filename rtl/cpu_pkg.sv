// cpu_pkg: widths, instruction fields and control encodings shared by the
// 16-bit multi-cycle CPU.
//
// Instruction word (16 bits):  [15:12] opcode  [11:10] rd  [9:8] rs  [7:0] imm
// The field widths follow the control unit (opcode[3:0], rd[1:0]) and
// datapath (rs[1:0], offset[7:0]) ports of the design. The bit positions of
// the fields were read from worked instructions such as 0x2401 (rd = R1,
// imm = 1) and 0x5102 (rd = R0, rs = R1).
//
// Opcodes 0x0 (load immediate), 0x2 (add immediate), 0x5 (subtract
// register), 0x9 (OR register) and 0xA (conditional jump) and the ALU codes
// 0 (pass B), 1 (add), 2 (subtract) and 4 (OR) follow those worked examples.
// The remaining opcodes, ALU code 3 (AND), the pc_ctrl encoding and the
// jump condition (jump when the last ALU result was not zero) are this
// design's own choices.
package cpu_pkg;

  localparam int unsigned DATA_W   = 16;  // 16-bit CPU
  localparam int unsigned NREGS    = 4;   // R0..R3
  localparam int unsigned RADDR_W  = 2;   // rd / rs select width
  localparam int unsigned IMM_W    = 8;   // imm / offset field
  localparam int unsigned OPC_W    = 4;   // opcode field
  localparam int unsigned PC_W     = 16;  // pc_out width
  localparam int unsigned INSTR_W  = 16;

  typedef enum logic [OPC_W-1:0] {
    OP_LDI  = 4'h0,  // rd <= imm
    OP_ADD  = 4'h1,  // rd <= rd + rs
    OP_ADDI = 4'h2,  // rd <= rd + imm
    OP_AND  = 4'h3,  // rd <= rd & rs
    OP_ANDI = 4'h4,  // rd <= rd & imm
    OP_SUB  = 4'h5,  // rd <= rd - rs
    OP_SUBI = 4'h6,  // rd <= rd - imm
    OP_ORI  = 4'h8,  // rd <= rd | imm
    OP_OR   = 4'h9,  // rd <= rd | rs
    OP_JNZ  = 4'hA   // if last ALU result != 0: pc <= imm
  } opcode_e;        // 0x7 and 0xB..0xF execute as no-operation

  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,  // out = b
    ALU_ADD  = 3'd1,
    ALU_SUB  = 3'd2,
    ALU_AND  = 3'd3,
    ALU_OR   = 3'd4
  } alu_func_e;

  typedef enum logic [1:0] {
    PC_HOLD = 2'd0,
    PC_INC  = 2'd1,
    PC_JUMP = 2'd2
  } pc_ctrl_e;

  typedef enum logic [2:0] {
    S_INIT    = 3'd0,
    S_FETCH   = 3'd1,
    S_DECODE  = 3'd2,
    S_EXECUTE = 3'd3,
    S_WB      = 3'd4
  } state_e;

  // Instruction class produced by the decoder.
  typedef enum logic [1:0] {
    IC_NOP  = 2'd0,
    IC_ALU  = 2'd1,   // register-writing ALU instruction
    IC_JUMP = 2'd2
  } iclass_e;

  typedef struct packed {
    logic [OPC_W-1:0]   opcode;
    logic [RADDR_W-1:0] rd;
    logic [RADDR_W-1:0] rs;
    logic [IMM_W-1:0]   imm;
  } instr_t;

endpackage
