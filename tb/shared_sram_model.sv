// shared_sram_model: behavioural model of the on-chip SRAM that the host
// processor and the FPGA fabric share (FPGA-side slave port only). One port,
// 32-bit words, address and write data sampled on the rising edge; the read
// data is registered, so it shows the word addressed one clock earlier.
// The host side is modelled by the testbench accessing mem directly.
module shared_sram_model #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic [AW-1:0] address,
  input  logic          write,
  input  logic [31:0]   writedata,
  output logic [31:0]   readdata
);
  logic [31:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always @(posedge clk) begin
    if (write) mem[address] <= writedata;
    readdata <= mem[address];
  end
endmodule
