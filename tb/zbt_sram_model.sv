// zbt_sram_model: behavioural model of a 256K x 32 ZBT SRAM (8 Mbit) read port.
// Not synthesizable logic of the design: the board uses an off-the-shelf part.
// The address is sampled on a rising edge and the data appear on the pins two
// rising edges later (2-cycle pipelined latency). Testbenches fill 'mem' directly.
module zbt_sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];
  logic [31:0] stage = '0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  initial rdata = '0;
  always @(posedge clk) begin
    stage <= rd ? mem[addr] : 32'hDEAD_BEEF;
    rdata <= stage;
  end
endmodule
