// alu_mux: selects the ALU operands.
//
// When en_in (operands valid from the register group) is high at a rising
// edge, alu_a loads the Rd operand and alu_b loads either the Rs operand
// (alu_in_sel = 0) or the zero-extended 8-bit immediate of the instruction
// (alu_in_sel = 1); en_out goes high for the next cycle to start the ALU.
// The choice between register and immediate under alu_in_sel follows the
// design description; the registered outputs and en_in/en_out handshake
// follow its RTL schematic. The polarity of alu_in_sel and the zero
// extension of the immediate are this design's choices.
//
// Reset (rst, active low) clears the outputs.
module alu_mux
  import cpu_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned IW = IMM_W
) (
  input  logic          clk,
  input  logic          rst,        // active low
  input  logic          en_in,
  input  logic          alu_in_sel, // 1: immediate, 0: Rs register
  input  logic [IW-1:0] offset,     // instruction immediate
  input  logic [DW-1:0] rd_q,
  input  logic [DW-1:0] rs_q,
  output logic [DW-1:0] alu_a,
  output logic [DW-1:0] alu_b,
  output logic          en_out
);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      alu_a  <= '0;
      alu_b  <= '0;
      en_out <= 1'b0;
    end else begin
      en_out <= en_in;
      if (en_in) begin
        alu_a <= rd_q;
        alu_b <= alu_in_sel ? DW'(offset) : rs_q;
      end
    end
  end

endmodule
