// ir: the instruction register.
//
// Loads the 16-bit instruction ins from the instruction RAM at every rising
// edge where en_in (the RAM's output-valid signal, en_ram_out) is high, and
// holds it otherwise. ir_out feeds the decoder and the datapath fields.
// The RAM output only changes after a fetch request, so the register keeps
// the current instruction for the whole instruction cycle. Reset (rst,
// active low) clears it to 0x0000.
module ir
  import cpu_pkg::*;
#(
  parameter int unsigned IW = INSTR_W
) (
  input  logic          clk,
  input  logic          rst,     // active low
  input  logic          en_in,
  input  logic [IW-1:0] ins,
  output logic [IW-1:0] ir_out
);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst)       ir_out <= '0;
    else if (en_in) ir_out <= ins;
  end

endmodule
