// m10k_256x32: 256-word x 32-bit simple dual-port RAM of the kind FPGA tools
// map to one M10K block: write on the clock edge when we is high, read data
// registered (the word at read_address one edge later; a read of the word
// being written returns the old contents). A test memory of the original
// design; nothing else in the detector uses it.
module m10k_256x32 (
  input  logic        clk,
  input  logic        we,
  input  logic [7:0]  write_address,
  input  logic [7:0]  read_address,
  input  logic [31:0] d,
  output logic [31:0] q
);
  logic [31:0] mem [256];
  always_ff @(posedge clk) begin
    if (we) mem[write_address] <= d;
    q <= mem[read_address];
  end
endmodule
