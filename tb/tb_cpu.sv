// tb_cpu: end-to-end test of the CPU with its default parameters.
// For each of several random programs the instruction RAM model is loaded,
// the CPU is reset and run, and an instruction-level reference model of the
// instruction set steps in lockstep: each time the CPU issues a new fetch,
// the instruction before it has retired, and the test compares all four
// registers and the fetch address with the model, and the cycles the
// instruction took with 7 (ALU), 4 (jump) or 3 (no-operation).
// Each program starts with a countdown loop (backward jump taken several
// times, then falling through) followed by random instructions whose jumps
// go forward. The test counts every mechanism it relies on (each ALU
// function, register and immediate operands, zero results, jumps taken
// forward and backward, jumps not taken, no-operations) and fails if one
// never happened.
module tb_cpu;
  import cpu_pkg::*;
  localparam int PROGRAMS = 12;
  localparam int STEPS    = 200;

  logic clk = 0, rst = 0;
  logic [15:0] ins, addr, ir_out;
  logic en_ram_in, en_ram_out;
  logic [3:0][15:0] q;
  state_e state;
  int checks = 0, failures = 0;

  ins_ram u_ram (.clk, .en_ram_in, .addr, .ins, .en_ram_out);
  cpu dut (.clk, .rst, .ins, .en_ram_out, .en_ram_in, .addr, .q, .ir_out, .state);

  always #5 clk = ~clk;
  initial begin
    repeat (PROGRAMS * STEPS * 8 + 10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // reference model state
  logic [15:0] mr [4];
  logic [15:0] mpc;
  logic        mzero;
  int cnt [string];
  string mechanisms [12] = '{"alu_pass_ldi", "alu_add", "alu_sub", "alu_and",
    "alu_or", "operand_imm", "operand_reg", "zero_result", "jump_taken_backward",
    "jump_taken_forward", "jump_not_taken", "nop"};

  function automatic void bump(string k);
    if (cnt.exists(k)) cnt[k]++; else cnt[k] = 1;
  endfunction

  // executes one instruction; returns the cycles it should take
  function automatic int model_step(logic [15:0] w);
    logic [3:0] op = w[15:12];
    logic [1:0] d = w[11:10], s = w[9:8];
    logic [15:0] imm = {8'h00, w[7:0]}, r;
    logic [15:0] here = mpc;
    mpc = mpc + 1;
    case (op)
      4'h0: r = imm;
      4'h1: r = mr[d] + mr[s];
      4'h2: r = mr[d] + imm;
      4'h3: r = mr[d] & mr[s];
      4'h4: r = mr[d] & imm;
      4'h5: r = mr[d] - mr[s];
      4'h6: r = mr[d] - imm;
      4'h8: r = mr[d] | imm;
      4'h9: r = mr[d] | mr[s];
      4'hA: begin
        if (!mzero) begin
          mpc = imm;
          bump(imm <= here ? "jump_taken_backward" : "jump_taken_forward");
        end else bump("jump_not_taken");
        return 4;
      end
      default: begin bump("nop"); return 3; end
    endcase
    case (op)
      4'h0: bump("alu_pass_ldi");
      4'h1, 4'h2: bump("alu_add");
      4'h3, 4'h4: bump("alu_and");
      4'h5, 4'h6: bump("alu_sub");
      default: bump("alu_or");
    endcase
    bump(op inside {4'h0, 4'h2, 4'h4, 4'h6, 4'h8} ? "operand_imm" : "operand_reg");
    if (r == 0) bump("zero_result");
    mr[d] = r;
    mzero = (r == 0);
    return 7;
  endfunction

  task automatic load_program();
    logic [15:0] w;
    // countdown loop: R3 = 3..6; loop: R3 -= 1; if R3 != 0 goto loop
    u_ram.mem[0] = {4'h0, 2'd3, 2'd0, 8'($urandom_range(3, 6))};
    u_ram.mem[1] = {4'h6, 2'd3, 2'd0, 8'd1};
    u_ram.mem[2] = {4'hA, 2'd0, 2'd0, 8'd1};
    for (int i = 3; i < 256; i++) begin
      w = $urandom();
      if (w[15:12] == 4'hA) w[7:0] = 8'($urandom_range(i + 1, 255));
      if (w[15:12] == 4'hA && i == 255) w[15:12] = 4'h0;
      if (i % 7 == 0) w = {4'h5, w[11:10], w[11:10], 8'h00};  // Rd - Rd = 0
      u_ram.mem[i] = w;
    end
  endtask

  initial begin
    logic [15:0] cur_addr;
    int cycles, exp_cycles;
    bit started;
    for (int p = 0; p < PROGRAMS; p++) begin
      rst = 0;
      load_program();
      for (int k = 0; k < 4; k++) mr[k] = 0;
      mpc = 0; mzero = 1;
      repeat (3) @(negedge clk);
      check("reset registers", q, 0);
      check("reset pc", addr, 0);
      rst = 1;
      started = 0; cycles = 0;
      for (int n = 0; n <= STEPS; ) begin
        @(negedge clk);
        cycles++;
        if (state == S_FETCH && en_ram_in) begin
          if (started) begin
            exp_cycles = model_step(u_ram.mem[cur_addr % 256]);
            for (int k = 0; k < 4; k++) check($sformatf("R%0d", k), q[k], mr[k]);
            check("fetch address", addr, mpc);
            check("cycles per instruction", cycles, exp_cycles);
            n++;
          end
          started = 1;
          cur_addr = addr;
          cycles = 0;
        end
      end
    end
    foreach (cnt[k]) $display("  %-22s %0d", k, cnt[k]);
    foreach (mechanisms[i]) begin
      checks++;
      if (!cnt.exists(mechanisms[i])) begin
        failures++; $display("FAIL mechanism never exercised: %s", mechanisms[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
