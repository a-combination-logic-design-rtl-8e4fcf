// sram_model: behavioural model of an asynchronous 64K x 8 SRAM chip for
// simulation. Reads are combinational from the address while chip and
// output enables are low; a write is taken at the clock edge while chip
// and write enables are low. Contents start at zero. Not synthesizable
// logic of the controller: it stands for the external memory device.
module sram_model #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [7:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;

  always_ff @(posedge clk)
    if (!ce_n && !we_n) mem[addr] <= wdata;

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : 8'h00;
endmodule
