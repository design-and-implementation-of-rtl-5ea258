// tb_state_transition: self-checking test of the control state machine.
// A model of the datapath answers each en_group_pulse with alu_end three
// cycles later, as the register group / mux / ALU chain does. For random
// opcodes, rd values and zero flags the test observes one instruction cycle
// (from one fetch request to the next) and checks: the state order
// Initial -> Fetch -> Decode -> Execute (-> Write back), one fetch request
// with a PC increment, one register-read pulse and one write of rd for ALU
// instructions, the ALU function and operand select while the ALU samples
// them, a PC jump exactly when a jump finds zero clear, and the cycle count
// (7 for ALU, 4 for jump, 3 for no-op).
module tb_state_transition;
  import cpu_pkg::*;
  logic clk = 0, rst = 0, alu_end, zero = 0;
  logic [3:0] opcode = 4'hF;
  logic [1:0] rd = 0;
  logic [2:0] alu_func;
  logic alu_in_sel, en_fetch, en_group_pulse, en_pc;
  logic [1:0] pc_ctrl;
  logic [3:0] reg_en;
  state_e state;
  logic [2:0] pipe;
  int checks = 0, failures = 0;

  state_transition dut (.clk, .rst, .alu_end, .zero, .opcode, .rd, .alu_func,
                        .alu_in_sel, .en_fetch, .en_group_pulse, .en_pc,
                        .pc_ctrl, .reg_en, .state);

  // datapath latency model: en_group_pulse -> alu_end three edges later
  always_ff @(posedge clk or negedge rst)
    if (!rst) pipe <= '0;
    else      pipe <= {pipe[1:0], en_group_pulse};
  assign alu_end = pipe[2];

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h exp %h (opcode %h)", what, got, exp, opcode);
    end
  endtask

  // expected class, function and select, written out per opcode
  function automatic int cls(logic [3:0] op);
    if (op == 4'h7 || op > 4'hA) return 0;
    if (op == 4'hA) return 2;
    return 1;
  endfunction
  function automatic logic [2:0] fn(logic [3:0] op);
    case (op)
      4'h0: return 3'd0;
      4'h1, 4'h2: return 3'd1;
      4'h3, 4'h4: return 3'd3;
      4'h5, 4'h6: return 3'd2;
      default: return 3'd4;
    endcase
  endfunction
  function automatic logic sel(logic [3:0] op);
    return op inside {4'h0, 4'h2, 4'h4, 4'h6, 4'h8};
  endfunction

  int n_alu = 0, n_jump_taken = 0, n_jump_not = 0, n_nop = 0;

  initial begin
    int cycles, fetches, pulses, writes, jumps, incs, alu_seen;
    state_e prev;
    bit order_ok;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset state", state, S_INIT);
    rst = 1;
    @(negedge clk);
    check("after init", state, S_FETCH);
    check("first fetch", en_fetch, 1);
    for (int i = 0; i < 300; i++) begin
      // here: negedge of the first Fetch cycle
      opcode = $urandom(); rd = $urandom(); zero = $urandom();
      if (i < 16) opcode = 4'(i);
      cycles = 0; fetches = 0; pulses = 0; writes = 0; jumps = 0; incs = 0;
      alu_seen = 0; order_ok = 1; prev = S_INIT;
      do begin
        if (en_fetch) fetches++;
        if (en_pc && pc_ctrl == PC_INC) incs++;
        if (en_pc && pc_ctrl == PC_JUMP) jumps++;
        if (en_group_pulse) pulses++;
        if (reg_en != 0) begin
          writes++;
          check("reg_en one-hot rd", reg_en, 4'b0001 << rd);
        end
        // pipe[1] high: the ALU samples its function at the coming edge
        if (pipe[1]) begin
          alu_seen++;
          check("alu_func", alu_func, fn(opcode));
        end
        if (pipe[0]) check("alu_in_sel", alu_in_sel, sel(opcode));
        if (cycles > 0 && state < prev && state != S_FETCH) order_ok = 0;
        prev = state;
        @(negedge clk);
        cycles++;
      end while (!(state == S_FETCH && en_fetch) && cycles < 50);
      check("state order", order_ok, 1);
      check("fetch requests", fetches, 1);
      check("pc increments", incs, 1);
      case (cls(opcode))
        1: begin
          n_alu++;
          check("cycles alu", cycles, 7);
          check("read pulses", pulses, 1);
          check("writes", writes, 1);
          check("alu sampled", alu_seen, 1);
          check("jumps", jumps, 0);
        end
        2: begin
          if (zero) n_jump_not++; else n_jump_taken++;
          check("cycles jump", cycles, 4);
          check("pulses", pulses, 0);
          check("writes", writes, 0);
          check("jump taken", jumps, zero ? 0 : 1);
        end
        default: begin
          n_nop++;
          check("cycles nop", cycles, 3);
          check("pulses", pulses, 0);
          check("writes", writes, 0);
          check("jumps", jumps, 0);
        end
      endcase
    end
    checks++;
    if (n_alu == 0 || n_jump_taken == 0 || n_jump_not == 0 || n_nop == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("alu=%0d jump_taken=%0d jump_not_taken=%0d nop=%0d", n_alu, n_jump_taken, n_jump_not, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
