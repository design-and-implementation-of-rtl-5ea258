// tb_alu: self-checking test of the ALU.
// Applies random operands with every function code (including unused ones),
// checks alu_out, the zero flag and that en_out follows en_in by exactly one
// cycle, and that the outputs hold while en_in is low.
module tb_alu;
  import cpu_pkg::*;
  logic clk = 0, rst = 0, en_in = 0;
  logic [15:0] a = 0, b = 0, out;
  logic [2:0] func = 0;
  logic zero, en_out;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst, .en_in, .alu_a(a), .alu_b(b), .alu_func(func),
           .alu_out(out), .zero, .en_out);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] ref_f(logic [2:0] f, logic [15:0] x, logic [15:0] y);
    case (f)
      3'd0: return y;
      3'd1: return x + y;
      3'd2: return x - y;
      3'd3: return x & y;
      3'd4: return x | y;
      default: return 16'h0;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] exp;
    repeat (2) @(posedge clk);
    rst = 1;
    @(negedge clk);
    check("en_out after reset", en_out, 0);
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = $urandom(); b = $urandom(); func = 3'($urandom_range(0, 7));
      if (i % 10 == 0) b = a;           // make zero results likely for SUB
      en_in = 1;
      exp = ref_f(func, a, b);
      @(negedge clk);
      en_in = 0;
      check("en_out pulse", en_out, 1);
      check($sformatf("func %0d", func), out, exp);
      check("zero", zero, exp == 0);
      a = ~a; b = ~b;                   // inputs change, en_in low: hold
      @(negedge clk);
      check("en_out low", en_out, 0);
      check("hold", out, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
