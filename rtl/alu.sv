// alu: the arithmetic logic unit of the datapath.
//
// When en_in is high at a rising edge, alu_out loads f(alu_a, alu_b) with f
// chosen by alu_func, the zero flag records whether that result is zero, and
// en_out goes high for the next cycle (it is the alu_end signal the state
// machine waits for). Functions: 0 pass B (used by load immediate), 1 add,
// 2 subtract (a - b), 3 bitwise AND, 4 bitwise OR; other codes give 0.
// Addition, subtraction, AND and OR are the operations the design names;
// the codes for pass B, add, subtract and OR follow its worked instruction
// sequence, the code for AND and the zero flag (kept for the conditional
// jump) are this design's choices. Results wrap modulo 2^16; no carry or
// overflow flag is kept.
//
// Reset (rst, active low) clears alu_out, zero and en_out.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst,       // active low
  input  logic          en_in,
  input  logic [DW-1:0] alu_a,
  input  logic [DW-1:0] alu_b,
  input  logic [2:0]    alu_func,
  output logic [DW-1:0] alu_out,
  output logic          zero,      // last result was zero
  output logic          en_out     // result valid (one cycle)
);

  logic [DW-1:0] result;

  always_comb begin
    unique case (alu_func)
      ALU_PASS: result = alu_b;
      ALU_ADD:  result = alu_a + alu_b;
      ALU_SUB:  result = alu_a - alu_b;
      ALU_AND:  result = alu_a & alu_b;
      ALU_OR:   result = alu_a | alu_b;
      default:  result = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      alu_out <= '0;
      zero    <= 1'b1;
      en_out  <= 1'b0;
    end else begin
      en_out <= en_in;
      if (en_in) begin
        alu_out <= result;
        zero    <= (result == '0);
      end
    end
  end

endmodule
