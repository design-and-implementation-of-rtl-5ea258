// tb_control_unit: self-checking test of the control unit (instruction
// register plus state machine) against the instruction RAM model.
// The test keeps its own program counter, driven by the unit's en_pc and
// pc_ctrl, and a three-cycle model of the datapath that answers en_group
// with alu_end. For a random program it checks that every fetch reads the
// address the counter holds, that the instruction register holds that
// word when the unit leaves Decode, that an ALU instruction writes exactly
// register rd, and that a jump loads its target exactly when zero is clear.
module tb_control_unit;
  import cpu_pkg::*;
  logic clk = 0, rst = 0, zero = 0, alu_end;
  logic [15:0] ins, ir_out, pcm = 0, fetched_addr = 0;
  logic en_ram_out, en_ram_in, alu_in_sel, en_group, en_pc;
  logic [2:0] alu_func;
  logic [1:0] pc_ctrl;
  logic [3:0] reg_en;
  logic [2:0] pipe;
  state_e state;
  int checks = 0, failures = 0;
  int n_alu = 0, n_jt = 0, n_jn = 0;

  ins_ram u_ram (.clk, .en_ram_in, .addr(pcm), .ins, .en_ram_out);

  control_unit dut (.clk, .rst, .alu_end, .zero, .en_ram_out, .ins, .alu_func,
                    .alu_in_sel, .en_ram_in, .en_group, .en_pc, .pc_ctrl,
                    .reg_en, .ir_out, .state);

  always_ff @(posedge clk or negedge rst)
    if (!rst) pipe <= '0;
    else      pipe <= {pipe[1:0], en_group};
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
      failures++; $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // test's program counter
  always_ff @(posedge clk)
    if (rst && en_pc) begin
      if (pc_ctrl == PC_INC)  pcm <= pcm + 1;
      if (pc_ctrl == PC_JUMP) pcm <= {8'h00, ir_out[7:0]};
    end

  initial begin
    logic [15:0] w;
    for (int i = 0; i < 256; i++) begin
      w = $urandom();
      if (w[15:12] == 4'hA) w[7:0] = 8'($urandom_range(0, 255));
      u_ram.mem[i] = w;
    end
    repeat (3) @(posedge clk);
    rst = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (en_ram_in) fetched_addr = pcm;
      if (state == S_DECODE) check("ir holds fetched word", ir_out, u_ram.mem[fetched_addr]);
      if (reg_en != 0) begin
        n_alu++;
        check("write rd", reg_en, 4'b0001 << ir_out[11:10]);
      end
      if (state == S_EXECUTE && ir_out[15:12] == 4'hA) begin
        if (zero) n_jn++; else n_jt++;
        check("jump iff not zero", en_pc && pc_ctrl == PC_JUMP, !zero);
      end
      zero = $urandom();
    end
    checks++;
    if (n_alu == 0 || n_jt == 0 || n_jn == 0) begin
      failures++; $display("FAIL coverage alu=%0d jt=%0d jn=%0d", n_alu, n_jt, n_jn);
    end
    $display("writes=%0d jumps_taken=%0d jumps_not_taken=%0d", n_alu, n_jt, n_jn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
