// instr_decoder: maps the 4-bit opcode to the datapath controls.
//
// Purely combinational. For each opcode it gives the ALU function
// (alu_func), whether the ALU B operand is the immediate (alu_in_sel = 1) or
// the Rs register (0), and the instruction class the state machine
// sequences: IC_ALU (register-writing ALU operation), IC_JUMP (conditional
// jump) or IC_NOP (unused opcodes). The opcode-to-function mapping of
// opcodes 0x0, 0x2, 0x5, 0x9 and 0xA follows the design's worked
// instruction sequence; the others are this design's choices (see cpu_pkg).
module instr_decoder
  import cpu_pkg::*;
(
  input  logic [OPC_W-1:0] opcode,
  output logic [2:0]       alu_func,
  output logic             alu_in_sel,
  output iclass_e          iclass
);

  always_comb begin
    alu_func   = ALU_PASS;
    alu_in_sel = 1'b0;
    iclass     = IC_ALU;
    case (opcode)
      OP_LDI:  begin alu_func = ALU_PASS; alu_in_sel = 1'b1; end
      OP_ADD:  begin alu_func = ALU_ADD;  alu_in_sel = 1'b0; end
      OP_ADDI: begin alu_func = ALU_ADD;  alu_in_sel = 1'b1; end
      OP_AND:  begin alu_func = ALU_AND;  alu_in_sel = 1'b0; end
      OP_ANDI: begin alu_func = ALU_AND;  alu_in_sel = 1'b1; end
      OP_SUB:  begin alu_func = ALU_SUB;  alu_in_sel = 1'b0; end
      OP_SUBI: begin alu_func = ALU_SUB;  alu_in_sel = 1'b1; end
      OP_ORI:  begin alu_func = ALU_OR;   alu_in_sel = 1'b1; end
      OP_OR:   begin alu_func = ALU_OR;   alu_in_sel = 1'b0; end
      OP_JNZ:  iclass = IC_JUMP;
      default: iclass = IC_NOP;
    endcase
  end

endmodule
