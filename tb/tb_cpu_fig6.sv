// tb_cpu_fig6: runs the eight-instruction demonstration program
//   0: 0000  LDI  R0, 0x00      4: 5102  SUB  R0, R1
//   1: 0008  LDI  R0, 0x08      5: 9102  OR   R0, R1
//   2: 0402  LDI  R1, 0x02      6: 2102  ADDI R0, 0x02
//   3: 2401  ADDI R1, 0x01      7: A007  JNZ  0x07   (loops on itself)
// and checks the register contents after every instruction: R0 takes
// 0000, 0008, 0005, 0007, 0009 and R1 takes 0002, 0003, R2 and R3 stay
// 0000. After the jump the CPU must keep fetching address 7. The last test
// is the total cycle count to the first fetch of the jump's target:
// 7 ALU instructions of 7 cycles and one jump of 4, plus the Initial cycle.
module tb_cpu_fig6;
  import cpu_pkg::*;
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
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  logic [15:0] prog [8] = '{16'h0000, 16'h0008, 16'h0402, 16'h2401,
                            16'h5102, 16'h9102, 16'h2102, 16'hA007};
  // expected {R0, R1} after instruction i
  logic [31:0] after [8] = '{{16'h0000, 16'h0000}, {16'h0008, 16'h0000},
                             {16'h0008, 16'h0002}, {16'h0008, 16'h0003},
                             {16'h0005, 16'h0003}, {16'h0007, 16'h0003},
                             {16'h0009, 16'h0003}, {16'h0009, 16'h0003}};

  initial begin
    int fetch_no, cycles;
    for (int i = 0; i < 8; i++) u_ram.mem[i] = prog[i];
    repeat (3) @(negedge clk);
    rst = 1;
    fetch_no = 0; cycles = 0;
    while (fetch_no < 12) begin
      @(negedge clk);
      cycles++;
      if (state == S_FETCH && en_ram_in) begin
        if (fetch_no > 0) begin
          check($sformatf("R0 after %0d", fetch_no - 1), q[0], after[fetch_no > 8 ? 7 : fetch_no - 1][31:16]);
          check($sformatf("R1 after %0d", fetch_no - 1), q[1], after[fetch_no > 8 ? 7 : fetch_no - 1][15:0]);
          check("R2", q[2], 0);
          check("R3", q[3], 0);
        end
        if (fetch_no < 8) check("fetch address", addr, 16'(fetch_no));
        else              check("jump loops on 7", addr, 16'd7);
        if (fetch_no == 8) check("cycles to jump target", cycles, 1 + 7 * 7 + 4);
        fetch_no++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
