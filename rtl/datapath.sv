// datapath: register group, ALU input mux, ALU and program counter.
//
// An operation runs as a chain of one-cycle stages linked by enable pulses:
// en_in starts the register group, which reads R[rd] and R[rs]; its en_out
// starts the ALU mux, which forms alu_a = R[rd] and alu_b = R[rs] or the
// immediate (alu_in_sel); its en_out starts the ALU, whose en_out (brought
// out as en_out, the control unit's alu_end) marks alu_out valid three
// cycles after en_in. The result returns to the register group's d_in and is
// written into the registers selected by reg_en. The program counter is
// controlled separately by en_pc and pc_ctrl and jumps to offset. The
// blocks, their connections and the port names follow the design's RTL
// datapath schematic; the zero flag output and the q register view are this
// design's additions. rst is active low.
module datapath
  import cpu_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst,        // active low
  input  logic                       en_in,      // start an operation
  input  logic [RADDR_W-1:0]         rd,
  input  logic [RADDR_W-1:0]         rs,
  input  logic [NREGS-1:0]           reg_en,
  input  logic [IMM_W-1:0]           offset,
  input  logic [2:0]                 alu_func,
  input  logic                       alu_in_sel,
  input  logic                       en_pc,
  input  logic [1:0]                 pc_ctrl,
  output logic                       en_out,     // ALU result valid
  output logic                       zero,
  output logic [PC_W-1:0]            pc_out,
  output logic [NREGS-1:0][DATA_W-1:0] q
);

  logic [DATA_W-1:0] rd_q, rs_q, alu_a, alu_b, alu_out;
  logic              grp_en_out, mux_en_out;

  reg_group u_reg_group (
    .clk    (clk),
    .rst    (rst),
    .en_in  (en_in),
    .rd     (rd),
    .rs     (rs),
    .reg_en (reg_en),
    .d_in   (alu_out),
    .rd_q   (rd_q),
    .rs_q   (rs_q),
    .en_out (grp_en_out),
    .q      (q)
  );

  alu_mux u_alu_mux (
    .clk        (clk),
    .rst        (rst),
    .en_in      (grp_en_out),
    .alu_in_sel (alu_in_sel),
    .offset     (offset),
    .rd_q       (rd_q),
    .rs_q       (rs_q),
    .alu_a      (alu_a),
    .alu_b      (alu_b),
    .en_out     (mux_en_out)
  );

  alu u_alu (
    .clk      (clk),
    .rst      (rst),
    .en_in    (mux_en_out),
    .alu_a    (alu_a),
    .alu_b    (alu_b),
    .alu_func (alu_func),
    .alu_out  (alu_out),
    .zero     (zero),
    .en_out   (en_out)
  );

  pc u_pc (
    .clk         (clk),
    .rst         (rst),
    .en_in       (en_pc),
    .offset_addr (offset),
    .pc_ctrl     (pc_ctrl),
    .pc_out      (pc_out)
  );

endmodule
