// sram_512kx8: behavioural model of the external 512K x 8 asynchronous SRAM
// for simulation only. Reads are combinational (data out while CS_N and
// OE_N are low); a write takes effect at the end of the CLK1M cycle in which
// CS_N and WR_N are low. The array starts at zero.
module sram_512kx8 (
  input  logic        clk1m,
  input  logic [18:0] a,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  input  logic        cs_n,
  input  logic        oe_n,
  input  logic        wr_n
);
  logic [7:0] mem [0:524287];
  initial for (int i = 0; i < 524288; i++) mem[i] = 8'h00;
  always @(posedge clk1m) if (!cs_n && !wr_n) mem[a] <= d_in;
  assign d_out = (!cs_n && !oe_n) ? mem[a] : 8'h00;
endmodule
