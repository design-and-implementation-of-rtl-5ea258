// tb_alu_mux: self-checking test of the ALU operand mux.
// Checks alu_a = rd_q, alu_b = rs_q or the zero-extended immediate under
// alu_in_sel, the one-cycle en_in -> en_out delay and holding while idle.
module tb_alu_mux;
  logic clk = 0, rst = 0, en_in = 0, sel = 0;
  logic [7:0] offset = 0;
  logic [15:0] rd_q = 0, rs_q = 0, alu_a, alu_b;
  logic en_out;
  int checks = 0, failures = 0;

  alu_mux dut (.clk, .rst, .en_in, .alu_in_sel(sel), .offset, .rd_q, .rs_q,
               .alu_a, .alu_b, .en_out);

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
    logic [15:0] ea, eb;
    repeat (2) @(posedge clk);
    rst = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      rd_q = $urandom(); rs_q = $urandom(); offset = $urandom(); sel = $urandom();
      en_in = 1;
      ea = rd_q; eb = sel ? {8'h00, offset} : rs_q;
      @(negedge clk);
      en_in = 0;
      check("en_out", en_out, 1);
      check("alu_a", alu_a, ea);
      check(sel ? "alu_b imm" : "alu_b reg", alu_b, eb);
      rd_q = ~rd_q; rs_q = ~rs_q; offset = ~offset; sel = ~sel;
      @(negedge clk);
      check("en_out low", en_out, 0);
      check("hold a", alu_a, ea);
      check("hold b", alu_b, eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
