// pc: the program counter.
//
// At a rising edge with en_in high, pc_ctrl selects: 0 hold, 1 increment,
// 2 jump to the zero-extended 8-bit offset_addr of the instruction (an
// absolute target); code 3 holds. With en_in low the counter holds. pc_out
// is the address of the next instruction to fetch and starts at 0 after
// reset (rst, active low). Hold, increment and jump under pc_ctrl follow the
// design description; the codes, the absolute jump target and the reset
// value are this design's choices (the worked instruction 0xA007 at address
// 7 jumps to itself, which an absolute target of 7 gives).
module pc
  import cpu_pkg::*;
#(
  parameter int unsigned PW = PC_W,
  parameter int unsigned IW = IMM_W
) (
  input  logic          clk,
  input  logic          rst,          // active low
  input  logic          en_in,
  input  logic [IW-1:0] offset_addr,
  input  logic [1:0]    pc_ctrl,
  output logic [PW-1:0] pc_out
);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      pc_out <= '0;
    end else if (en_in) begin
      unique case (pc_ctrl)
        PC_INC:  pc_out <= pc_out + 1'b1;
        PC_JUMP: pc_out <= PW'(offset_addr);
        default: pc_out <= pc_out;
      endcase
    end
  end

endmodule
