// reg_group: the register group, four general registers R0..R3.
//
// Read: when en_in is high at a rising clock edge, the registers selected by
// rd and rs are copied into the output registers rd_q and rs_q, and en_out
// goes high for the next cycle to tell the ALU mux that its operands are
// ready. Write: at every rising edge each register Ri whose write enable
// reg_en[i] is set loads d_in (the ALU result). reg_en is one-hot, one bit
// per register, as the control unit drives it; the register set, the rd/rs
// address selects and the reg_en enable follow the design description, the
// registered read ports and the en_in/en_out handshake follow its RTL
// schematic. A read and a write of the same register in one cycle return the
// old value.
//
// Reset (rst, active low) clears all registers and en_out. q brings out the
// register contents for observation.
module reg_group
  import cpu_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned NR = NREGS,
  parameter int unsigned AW = RADDR_W
) (
  input  logic                 clk,
  input  logic                 rst,      // active low
  input  logic                 en_in,    // read request
  input  logic [AW-1:0]        rd,
  input  logic [AW-1:0]        rs,
  input  logic [NR-1:0]        reg_en,   // one-hot write enable
  input  logic [DW-1:0]        d_in,
  output logic [DW-1:0]        rd_q,
  output logic [DW-1:0]        rs_q,
  output logic                 en_out,   // operands valid (one cycle)
  output logic [NR-1:0][DW-1:0] q
);

  logic [NR-1:0][DW-1:0] regs;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      regs <= '0;
    end else begin
      for (int i = 0; i < int'(NR); i++)
        if (reg_en[i]) regs[i] <= d_in;
    end
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      rd_q   <= '0;
      rs_q   <= '0;
      en_out <= 1'b0;
    end else begin
      en_out <= en_in;
      if (en_in) begin
        rd_q <= regs[rd];
        rs_q <= regs[rs];
      end
    end
  end

  assign q = regs;

  // Only one register may be written per cycle.
  a_reg_en_onehot: assert property (@(posedge clk) $onehot0(reg_en))
    else $error("reg_en not one-hot: %b", reg_en);

endmodule
