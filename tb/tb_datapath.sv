// tb_datapath: self-checking test of the datapath.
// Each operation raises en_in for one cycle with rd, rs, the immediate,
// alu_func and alu_in_sel held; the test checks that en_out comes exactly
// three cycles later with the expected result, then writes it back with a
// one-hot reg_en and compares all four registers with a model. The program
// counter is exercised between operations (increment, jump, hold) and the
// zero flag is checked after every ALU operation.
module tb_datapath;
  import cpu_pkg::*;
  logic clk = 0, rst = 0, en_in = 0, alu_in_sel = 0, en_pc = 0;
  logic [1:0] rd = 0, rs = 0, pc_ctrl = 0;
  logic [3:0] reg_en = 0;
  logic [7:0] offset = 0;
  logic [2:0] alu_func = 0;
  logic en_out, zero;
  logic [15:0] pc_out;
  logic [3:0][15:0] q;
  logic [15:0] m [4];
  logic [15:0] mpc;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .en_in, .rd, .rs, .reg_en, .offset, .alu_func,
                .alu_in_sel, .en_pc, .pc_ctrl, .en_out, .zero, .pc_out, .q);

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

  initial begin
    logic [15:0] a, b, r;
    int lat;
    repeat (2) @(posedge clk);
    rst = 1;
    for (int k = 0; k < 4; k++) m[k] = 0;
    mpc = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      rd = $urandom(); rs = $urandom(); offset = $urandom();
      alu_func = 3'($urandom_range(0, 4)); alu_in_sel = $urandom();
      if (i < 8) begin alu_func = 3'd0; alu_in_sel = 1; end   // load registers
      if (i % 13 == 0) begin alu_func = 3'd2; alu_in_sel = 0; rs = rd; end
      a = m[rd]; b = alu_in_sel ? {8'h00, offset} : m[rs];
      case (alu_func)
        3'd0: r = b;
        3'd1: r = a + b;
        3'd2: r = a - b;
        3'd3: r = a & b;
        default: r = a | b;
      endcase
      en_in = 1;
      lat = 0;
      do begin
        @(negedge clk);
        en_in = 0;
        lat++;
      end while (!en_out && lat < 10);
      check("latency", lat, 3);
      check("zero", zero, r == 0);
      reg_en = 4'b0001 << rd;
      // program counter step in the same cycle
      en_pc = $urandom(); pc_ctrl = $urandom();
      @(negedge clk);
      m[rd] = r;
      if (en_pc) case (pc_ctrl)
        2'd1: mpc = mpc + 1;
        2'd2: mpc = {8'h00, offset};
        default: ;
      endcase
      reg_en = 0; en_pc = 0;
      for (int k = 0; k < 4; k++) check($sformatf("R%0d", k), q[k], m[k]);
      check("pc", pc_out, mpc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
