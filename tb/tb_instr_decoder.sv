// tb_instr_decoder: checks the decoder against the instruction table,
// written out here independently, for all 16 opcodes.
module tb_instr_decoder;
  import cpu_pkg::*;
  logic [3:0] opcode;
  logic [2:0] alu_func;
  logic       alu_in_sel;
  iclass_e    iclass;
  int checks = 0, failures = 0;

  instr_decoder dut (.opcode, .alu_func, .alu_in_sel, .iclass);

  // {class, func, sel} per opcode: class 1 ALU, 2 jump, 0 no-op
  logic [5:0] table_exp [16] = '{
    {2'd1, 3'd0, 1'b1},  // 0 LDI
    {2'd1, 3'd1, 1'b0},  // 1 ADD
    {2'd1, 3'd1, 1'b1},  // 2 ADDI
    {2'd1, 3'd3, 1'b0},  // 3 AND
    {2'd1, 3'd3, 1'b1},  // 4 ANDI
    {2'd1, 3'd2, 1'b0},  // 5 SUB
    {2'd1, 3'd2, 1'b1},  // 6 SUBI
    {2'd0, 3'd0, 1'b0},  // 7 -
    {2'd1, 3'd4, 1'b1},  // 8 ORI
    {2'd1, 3'd4, 1'b0},  // 9 OR
    {2'd2, 3'd0, 1'b0},  // A JNZ
    {2'd0, 3'd0, 1'b0}, {2'd0, 3'd0, 1'b0}, {2'd0, 3'd0, 1'b0},
    {2'd0, 3'd0, 1'b0}, {2'd0, 3'd0, 1'b0}
  };

  initial begin
    #10000 failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      opcode = 4'(i);
      #1;
      checks++;
      if (iclass != iclass_e'(table_exp[i][5:4])) begin
        failures++; $display("FAIL opcode %h class %0d", i, iclass);
      end
      if (table_exp[i][5:4] == 2'd1) begin
        checks += 2;
        if (alu_func != table_exp[i][3:1]) begin
          failures++; $display("FAIL opcode %h func %0d", i, alu_func);
        end
        if (alu_in_sel != table_exp[i][0]) begin
          failures++; $display("FAIL opcode %h sel %0d", i, alu_in_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
