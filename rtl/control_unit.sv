// control_unit: instruction register plus control state machine.
//
// The instruction register loads the RAM output ins while en_ram_out is
// high; its opcode and rd fields drive the state machine, which produces the
// datapath controls (alu_func, alu_in_sel, en_group, en_pc, pc_ctrl, reg_en)
// and the RAM read request en_ram_in. ir_out carries the whole instruction
// to the datapath, which takes rd, rs and the immediate from it. The split
// into an instruction register and a state machine and the port names
// follow the design's RTL control unit schematic; the zero input (the ALU
// flag the conditional jump tests) is this design's addition. rst is active
// low.
module control_unit
  import cpu_pkg::*;
#(
  parameter int unsigned FETCH_CYCLES = 2
) (
  input  logic               clk,
  input  logic               rst,         // active low
  input  logic               alu_end,
  input  logic               zero,
  input  logic               en_ram_out,  // RAM output valid
  input  logic [INSTR_W-1:0] ins,         // RAM output
  output logic [2:0]         alu_func,
  output logic               alu_in_sel,
  output logic               en_ram_in,   // RAM read request
  output logic               en_group,
  output logic               en_pc,
  output logic [1:0]         pc_ctrl,
  output logic [NREGS-1:0]   reg_en,
  output logic [INSTR_W-1:0] ir_out,
  output state_e             state
);

  instr_t instr;

  ir u_ir (
    .clk    (clk),
    .rst    (rst),
    .en_in  (en_ram_out),
    .ins    (ins),
    .ir_out (ir_out)
  );

  assign instr = instr_t'(ir_out);

  state_transition #(.FETCH_CYCLES(FETCH_CYCLES)) u_fsm (
    .clk            (clk),
    .rst            (rst),
    .alu_end        (alu_end),
    .zero           (zero),
    .opcode         (instr.opcode),
    .rd             (instr.rd),
    .alu_func       (alu_func),
    .alu_in_sel     (alu_in_sel),
    .en_fetch       (en_ram_in),
    .en_group_pulse (en_group),
    .en_pc          (en_pc),
    .pc_ctrl        (pc_ctrl),
    .reg_en         (reg_en),
    .state          (state)
  );

endmodule
