// tb_pc: self-checking test of the program counter.
// Random en_in / pc_ctrl / offset sequences are compared with a model:
// hold, increment (with 16-bit wrap), absolute jump to the offset, and
// code 3 holding. Also checks the reset value 0.
module tb_pc;
  logic clk = 0, rst = 0, en_in = 0;
  logic [7:0] offset = 0;
  logic [1:0] pc_ctrl = 0;
  logic [15:0] pc_out, model;
  int checks = 0, failures = 0;

  pc dut (.clk, .rst, .en_in, .offset_addr(offset), .pc_ctrl, .pc_out);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst = 1;
    model = 0;
    check("reset", pc_out, 0);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en_in = $urandom_range(0, 4) != 0;
      pc_ctrl = $urandom();
      offset = $urandom();
      @(negedge clk);
      if (en_in) case (pc_ctrl)
        2'd1: model = model + 1;
        2'd2: model = {8'h00, offset};
        default: ;
      endcase
      check($sformatf("en=%0d ctrl=%0d", en_in, pc_ctrl), pc_out, model);
      en_in = 0;
    end
    // Wrap: jump to 0xFF then count past 0xFFFF.
    @(negedge clk); en_in = 1; pc_ctrl = 2'd2; offset = 8'hFF;
    @(negedge clk); pc_ctrl = 2'd1;
    repeat (16'hFFFF - 16'h00FF) @(negedge clk);
    check("count to ffff", pc_out, 16'hFFFF);
    @(negedge clk);
    check("wrap", pc_out, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
