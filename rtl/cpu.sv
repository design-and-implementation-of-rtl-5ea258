// cpu: top level of the 16-bit multi-cycle CPU.
//
// The control unit and the datapath are joined as in the architecture
// overview: control signals flow from the control unit to the datapath,
// state signals (alu_end, zero) flow back. Instructions come from an
// external instruction RAM through a simple read interface:
//   addr       (out) address of the instruction to read, the PC
//   en_ram_in  (out) one-cycle read request
//   ins        (in)  instruction word, expected one cycle after the request
//                    and held until the next request
//   en_ram_out (in)  RAM output valid; the instruction register loads ins
//                    while it is high
// With FETCH_CYCLES = 2 an ALU instruction takes 7 clock cycles, a jump 4
// and a no-operation 3. q (the four registers), ir_out and state are
// brought out for observation. rst is active low.
module cpu
  import cpu_pkg::*;
#(
  parameter int unsigned FETCH_CYCLES = 2
) (
  input  logic                         clk,
  input  logic                         rst,        // active low
  input  logic [INSTR_W-1:0]           ins,
  input  logic                         en_ram_out,
  output logic                         en_ram_in,
  output logic [PC_W-1:0]              addr,
  output logic [NREGS-1:0][DATA_W-1:0] q,
  output logic [INSTR_W-1:0]           ir_out,
  output state_e                       state
);

  logic [2:0]         alu_func;
  logic               alu_in_sel, en_group, en_pc, alu_end, zero;
  logic [1:0]         pc_ctrl;
  logic [NREGS-1:0]   reg_en;
  instr_t             instr;

  control_unit #(.FETCH_CYCLES(FETCH_CYCLES)) u_cu (
    .clk        (clk),
    .rst        (rst),
    .alu_end    (alu_end),
    .zero       (zero),
    .en_ram_out (en_ram_out),
    .ins        (ins),
    .alu_func   (alu_func),
    .alu_in_sel (alu_in_sel),
    .en_ram_in  (en_ram_in),
    .en_group   (en_group),
    .en_pc      (en_pc),
    .pc_ctrl    (pc_ctrl),
    .reg_en     (reg_en),
    .ir_out     (ir_out),
    .state      (state)
  );

  assign instr = instr_t'(ir_out);

  datapath u_dp (
    .clk        (clk),
    .rst        (rst),
    .en_in      (en_group),
    .rd         (instr.rd),
    .rs         (instr.rs),
    .reg_en     (reg_en),
    .offset     (instr.imm),
    .alu_func   (alu_func),
    .alu_in_sel (alu_in_sel),
    .en_pc      (en_pc),
    .pc_ctrl    (pc_ctrl),
    .en_out     (alu_end),
    .zero       (zero),
    .pc_out     (addr),
    .q          (q)
  );

endmodule
