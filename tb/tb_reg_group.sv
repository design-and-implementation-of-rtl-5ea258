// tb_reg_group: self-checking test of the register group.
// Random one-hot writes and random reads of two ports are compared with a
// model of four registers; also checks reset to zero, the one-cycle
// en_in -> en_out delay and that a read in the cycle of a write returns
// the old contents.
module tb_reg_group;
  logic clk = 0, rst = 0, en_in = 0;
  logic [1:0] rd = 0, rs = 0;
  logic [3:0] reg_en = 0;
  logic [15:0] d_in = 0, rd_q, rs_q;
  logic en_out;
  logic [3:0][15:0] q;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  reg_group dut (.clk, .rst, .en_in, .rd, .rs, .reg_en, .d_in, .rd_q, .rs_q,
                 .en_out, .q);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
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
    logic [15:0] erd, ers;
    int w;
    repeat (2) @(posedge clk);
    rst = 1;
    for (int i = 0; i < 4; i++) begin model[i] = 0; check("reset", q[i], 0); end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      w = $urandom_range(0, 4);                 // 4: no write
      reg_en = (w < 4) ? 4'(1 << w) : 4'b0;
      d_in = $urandom();
      rd = $urandom(); rs = $urandom();
      en_in = $urandom_range(0, 3) != 0;
      erd = model[rd]; ers = model[rs];         // old value on read/write clash
      @(negedge clk);
      if (w < 4) model[w] = d_in;
      check("en_out", en_out, en_in);
      if (en_in) begin
        check("rd_q", rd_q, erd);
        check("rs_q", rs_q, ers);
      end
      reg_en = 0; en_in = 0;
      for (int k = 0; k < 4; k++) check($sformatf("q%0d", k), q[k], model[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
