// mlab_20x32: 20-word x 32-bit simple dual-port RAM of the size FPGA tools
// map to one MLAB (LUT RAM): write on the clock edge when wren is high, read
// data registered (old contents on a simultaneous read of the written
// word). Addresses 20..255 are ignored on writes and read as zero. A test
// memory of the original design; nothing else in the detector uses it.
module mlab_20x32 (
  input  logic               clock,
  input  logic               wren,
  input  logic [7:0]         writeaddr,
  input  logic [7:0]         readaddr,
  input  logic signed [31:0] data,
  output logic signed [31:0] q
);
  localparam int unsigned DEPTH = 20;
  logic signed [31:0] mem [DEPTH];
  always_ff @(posedge clock) begin
    if (wren && writeaddr < 8'(DEPTH)) mem[5'(writeaddr)] <= data;
    q <= (readaddr < 8'(DEPTH)) ? mem[5'(readaddr)] : '0;
  end
endmodule
