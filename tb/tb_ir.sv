// tb_ir: self-checking test of the instruction register.
// Checks reset to 0, loading when en_in is high and holding when low.
module tb_ir;
  logic clk = 0, rst = 0, en_in = 0;
  logic [15:0] ins = 0, ir_out, model;
  int checks = 0, failures = 0;

  ir dut (.clk, .rst, .en_in, .ins, .ir_out);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
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
    ins = 16'hBEEF; en_in = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset", ir_out, 0);
    rst = 1; model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ins = $urandom(); en_in = $urandom();
      @(negedge clk);
      if (en_in) model = ins;
      check(en_in ? "load" : "hold", ir_out, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
