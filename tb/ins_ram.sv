// ins_ram: behavioural model of the instruction RAM the CPU reads from.
// Not part of the CPU. A read request en_ram_in at a rising edge loads
// ins with mem[addr] (the low address bits index the array; the address
// wraps at DEPTH words), so the word is available one cycle after the
// request and is held until the next request. en_ram_out, the "output valid"
// signal, rises at the first clock edge and stays high. Testbenches fill
// mem directly before releasing the CPU reset.
module ins_ram #(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        en_ram_in,
  input  logic [15:0] addr,
  output logic [15:0] ins,
  output logic        en_ram_out
);

  logic [15:0] mem [DEPTH];

  initial begin
    ins        = '0;
    en_ram_out = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    en_ram_out <= 1'b1;
    if (en_ram_in) ins <= mem[addr % DEPTH];
  end

endmodule
