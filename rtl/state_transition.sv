// state_transition: the control state machine of the CPU.
//
// States: Initial -> Fetch -> Decode -> Execute -> Write back, then Fetch
// again. The five states and their forward order follow the design's state
// transfer diagram; the return to Fetch, the skipping of Write back by jumps
// and no-operations, and the cycle timing below are this design's choices.
//
//   Initial  one cycle after reset.
//   Fetch    FETCH_CYCLES cycles. In the first, en_fetch requests the
//            instruction at pc_out from the RAM and en_pc/pc_ctrl = increment
//            advance the PC. The remaining cycles let the RAM answer and the
//            instruction register load (RAM read latency of one cycle).
//   Decode   one cycle. The opcode in the instruction register is decoded;
//            for an ALU instruction en_group_pulse starts the datapath
//            (register read, then operand mux, then ALU, one cycle each).
//            No-operation opcodes return to Fetch.
//   Execute  ALU instruction: alu_func and alu_in_sel are driven and the
//            machine waits for alu_end from the ALU. Jump: if the ALU zero
//            flag is clear, en_pc with pc_ctrl = jump loads the target; then
//            Fetch.
//   Write    one cycle: reg_en sets the bit of register rd so the ALU result
//   back     is stored.
//
// An ALU instruction therefore takes 2 + 1 + 3 + 1 = 7 cycles with the
// default FETCH_CYCLES = 2, a jump 4 cycles and a no-operation 3 cycles.
// Outputs are decoded from the state (Moore). rst is active low. An
// assertion checks that alu_end only arrives while an ALU instruction waits
// in Execute.
module state_transition
  import cpu_pkg::*;
#(
  parameter int unsigned FETCH_CYCLES = 2
) (
  input  logic               clk,
  input  logic               rst,            // active low
  input  logic               alu_end,        // ALU result valid
  input  logic               zero,           // last ALU result was zero
  input  logic [OPC_W-1:0]   opcode,
  input  logic [RADDR_W-1:0] rd,
  output logic [2:0]         alu_func,
  output logic               alu_in_sel,
  output logic               en_fetch,       // instruction RAM read request
  output logic               en_group_pulse, // start register read
  output logic               en_pc,
  output logic [1:0]         pc_ctrl,
  output logic [NREGS-1:0]   reg_en,
  output state_e             state
);

  localparam int unsigned CW = (FETCH_CYCLES > 1) ? $clog2(FETCH_CYCLES) : 1;

  state_e        state_q, state_d;
  logic [CW-1:0] fcnt_q, fcnt_d;

  logic [2:0] dec_func;
  logic       dec_sel;
  iclass_e    dec_class;

  instr_decoder u_dec (
    .opcode     (opcode),
    .alu_func   (dec_func),
    .alu_in_sel (dec_sel),
    .iclass     (dec_class)
  );

  always_comb begin
    state_d = state_q;
    fcnt_d  = fcnt_q;
    unique case (state_q)
      S_INIT: state_d = S_FETCH;
      S_FETCH: begin
        if (fcnt_q == CW'(FETCH_CYCLES - 1)) begin
          fcnt_d  = '0;
          state_d = S_DECODE;
        end else begin
          fcnt_d = fcnt_q + 1'b1;
        end
      end
      S_DECODE: state_d = (dec_class == IC_NOP) ? S_FETCH : S_EXECUTE;
      S_EXECUTE: begin
        if (dec_class == IC_JUMP) state_d = S_FETCH;
        else if (alu_end)         state_d = S_WB;
      end
      S_WB:    state_d = S_FETCH;
      default: state_d = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      state_q <= S_INIT;
      fcnt_q  <= '0;
    end else begin
      state_q <= state_d;
      fcnt_q  <= fcnt_d;
    end
  end

  always_comb begin
    alu_func       = ALU_PASS;
    alu_in_sel     = 1'b0;
    en_fetch       = 1'b0;
    en_group_pulse = 1'b0;
    en_pc          = 1'b0;
    pc_ctrl        = PC_HOLD;
    reg_en         = '0;
    unique case (state_q)
      S_FETCH: begin
        if (fcnt_q == '0) begin
          en_fetch = 1'b1;
          en_pc    = 1'b1;
          pc_ctrl  = PC_INC;
        end
      end
      S_DECODE: en_group_pulse = (dec_class == IC_ALU);
      S_EXECUTE: begin
        if (dec_class == IC_JUMP) begin
          en_pc   = !zero;
          pc_ctrl = PC_JUMP;
        end else begin
          alu_func   = dec_func;
          alu_in_sel = dec_sel;
        end
      end
      S_WB:    reg_en[rd] = 1'b1;
      default: ;
    endcase
  end

  assign state = state_q;

  // Handshake rule: the datapath answers only while the machine waits in
  // Execute for an ALU instruction.
  a_alu_end_in_execute: assert property (@(posedge clk) disable iff (!rst)
      alu_end |-> (state_q == S_EXECUTE && dec_class == IC_ALU))
    else $error("alu_end outside Execute (state %s)", state_q.name());

endmodule
